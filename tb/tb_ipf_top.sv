// tb_ipf_top: end-to-end run of the prefetching front end with all parameters at
// their defaults (512-byte direct-mapped cache, 8-byte lines, 8-entry loop table,
// 8-line prefetch runs, 8-cycle memory).
//
// A small in-order core model fetches and executes a program trace, one instruction
// per cycle when it hits. The program has a straight-line prologue, a loop whose
// 640-byte body is larger than the cache (so every iteration finds the loop header
// evicted by the end of the body), and an epilogue. The loop branch is annotated
// (LoopBranchEnable) and its address pair is loaded into the loop table.
// The program is run three times, in PF_OFF, PF_LOOP and PF_WCET mode, resetting the
// cache between runs. Checked: every fetched instruction against memory; in PF_OFF
// the exact cycle count against a reference cache model (1 cycle per hit, 1 + 8 per
// miss); in PF_LOOP one loop redirect per executed loop branch, each starting the
// prefetch run at the loop header; that both prefetch modes finish in fewer cycles
// than PF_OFF on this loop; and that every mechanism (hit, miss, merge with an
// in-flight prefetch, prefetch fill and drop, loop redirect, sequential trigger,
// software prefetch and its replacement by a newer one, mode switch) happened at
// least once. The fill bypass needs cycle-exact alignment and is exercised by
// tb_icache.
// The prefetch fields are placed as a WCET-oriented compiler would: for every
// instruction that misses in the reference cache model, an earlier instruction of
// the same basic block, at most 8 (the miss penalty) places before it, carries the
// distance.
module tb_ipf_top;
  import ipf_pkg::*;
  import tb_mem_pkg::*;

  localparam int LAT   = 8;
  localparam int ITER  = 6;

  logic        clk = 0, rst_n = 0;
  pf_mode_e    mode;
  logic        tbl_clear, tbl_we, tbl_valid;
  logic [2:0]  tbl_idx;
  logic [31:0] tbl_branch, tbl_header;
  logic        fetch_valid, fetch_ready, fetch_resp_valid;
  logic [31:0] fetch_addr, fetch_resp_instr;
  logic        exec_valid, loop_branch_en;
  logic [31:0] exec_pc, exec_instr;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_resp_data;
  ipf_ev_t     ev;
  int          n_req;

  ipf_top dut (.*);

  main_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data),
    .n_req(n_req));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- program trace ----------------
  localparam int          BODY     = 160;             // 640-byte loop body
  localparam logic [31:0] LOOP_HDR = 32'h0000_1040;
  localparam logic [31:0] LOOP_BR  = LOOP_HDR + 32'(BODY - 1) * 4;
  localparam logic [31:0] EPILOG   = LOOP_HDR + 32'(BODY) * 4;

  typedef struct {
    logic [31:0] pc;
    logic        lb;
    logic [3:0]  pfd;
    int          blk;     // static basic block
    int          pos;     // position in the block (schedule slot, one per cycle)
  } op_t;
  op_t prog[$];

  // Appends one dynamic instance of static basic block `blk`.
  function automatic void add_block(int blk, logic [31:0] start, int n, logic last_is_lb);
    for (int i = 0; i < n; i++) begin
      op_t o;
      o.pc  = start + 32'(i) * 4;
      o.lb  = last_is_lb && (i == n - 1);
      o.pfd = 4'd0;
      o.blk = blk;
      o.pos = i;
      prog.push_back(o);
    end
  endfunction

  // Compiler side of the WCET-oriented scheme, done here in the testbench: every
  // static instruction that misses in the reference cache model is a statically
  // missed instruction Ip. Its prefetch is carried by the earliest instruction If of
  // the same block with a free field, at most MP = LAT slots before it, so the
  // distance is PD = min(MP, sched(Ip) - sched(If)). Each instruction carries at most
  // one prefetch; the first instruction of a block cannot be covered.
  bit          missed  [int];     // by pc
  logic [3:0]  field   [int];     // by pc
  task automatic annotate_wcet();
    logic [28:0] line [64];
    logic [63:0] v;
    v = '0;
    foreach (prog[i]) begin
      logic [31:0] a;
      a = prog[i].pc;
      if (!(v[a[8:3]] && line[a[8:3]] == a[31:3])) missed[int'(a)] = 1;
      v[a[8:3]] = 1; line[a[8:3]] = a[31:3];
    end
    foreach (prog[i]) begin
      int p, lo;
      logic [31:0] a;
      a = prog[i].pc;
      if (missed.exists(int'(a)) && prog[i].pos > 0 && !covered(a)) begin
        lo = prog[i].pos - LAT;
        if (lo < 0) lo = 0;
        for (p = lo; p < prog[i].pos; p++) begin
          logic [31:0] c;
          c = a - 32'(prog[i].pos - p) * 4;
          if (!field.exists(int'(c))) begin
            field[int'(c)] = 4'(prog[i].pos - p);
            break;
          end
        end
      end
    end
    foreach (prog[i]) if (field.exists(int'(prog[i].pc))) prog[i].pfd = field[int'(prog[i].pc)];
  endtask

  // true if some carrier already prefetches pc a
  function automatic bit covered(logic [31:0] a);
    for (int d = 1; d <= 15; d++)
      if (field.exists(int'(a) - 4 * d) && field[int'(a) - 4 * d] == 4'(d)) return 1;
    return 0;
  endfunction

  initial begin
    add_block(0, 32'h0000_1000, 16, 0);         // prologue
    for (int it = 0; it < ITER; it++)
      add_block(1, LOOP_HDR, BODY, 1);          // loop body, ends in the loop branch
    add_block(2, EPILOG, 32, 0);                // epilogue
    annotate_wcet();
  end

  // ---------------- event counters ----------------
  int c_hit, c_miss, c_merge, c_byp, c_pff, c_pfd, c_redir, c_seq, c_sw, c_swo, c_lb;
  int c_redir_hdr_ok;
  bit redir_d;
  always @(posedge clk) if (rst_n) begin
    c_hit   += int'(ev.cache.demand_hit);
    c_miss  += int'(ev.cache.demand_miss);
    c_merge += int'(ev.cache.miss_merge);
    c_byp   += int'(ev.cache.fill_bypass);
    c_pff   += int'(ev.cache.pf_fill);
    c_pfd   += int'(ev.cache.pf_drop);
    c_redir += int'(ev.loop_redirect);
    c_seq   += int'(ev.seq_trigger);
    c_sw    += int'(ev.sw_prefetch);
    c_swo   += int'(ev.sw_overwrite);
    c_lb    += int'(exec_valid && loop_branch_en);
    // the cycle after a redirect, the prefetcher must offer the header line
    if (redir_d && dut.u_nnl.pf_valid && dut.u_nnl.pf_addr == LOOP_HDR) c_redir_hdr_ok++;
    redir_d <= ev.loop_redirect;
  end

  // totals over all runs, for the coverage check
  int t_hit, t_miss, t_merge, t_byp, t_pff, t_pfd, t_redir, t_seq, t_sw, t_swo, t_modes;

  // ---------------- reference cache (PF_OFF only) ----------------
  int ref_cycles;
  task automatic reference_cycles();
    logic [28:0] line [64];
    logic [63:0] v;
    v = '0;
    ref_cycles = 0;
    foreach (prog[i]) begin
      logic [31:0] a;
      a = prog[i].pc;
      if (v[a[8:3]] && line[a[8:3]] == a[31:3]) ref_cycles += 1;
      else ref_cycles += 1 + LAT;
      v[a[8:3]] = 1; line[a[8:3]] = a[31:3];
    end
  endtask

  // ---------------- core model ----------------
  task automatic run_program(pf_mode_e m, output int cycles);
    int i, c0;
    bit will_accept;
    // reset and load the loop table
    @(negedge clk);
    rst_n = 0; mode = m;
    fetch_valid = 0; exec_valid = 0; loop_branch_en = 0; exec_pc = 0; exec_instr = 0;
    tbl_clear = 0; tbl_we = 0; tbl_valid = 0; tbl_idx = 0; tbl_branch = 0; tbl_header = 0;
    @(negedge clk);
    rst_n = 1;
    // entry 3: the real loop; entry 5: a loop elsewhere in the program image
    tbl_we = 1; tbl_idx = 3; tbl_valid = 1; tbl_branch = LOOP_BR; tbl_header = LOOP_HDR;
    @(negedge clk);
    tbl_idx = 5; tbl_branch = 32'h0000_2100; tbl_header = 32'h0000_2000;
    @(negedge clk);
    tbl_we = 0;
    c_hit = 0; c_miss = 0; c_merge = 0; c_byp = 0; c_pff = 0; c_pfd = 0;
    c_redir = 0; c_seq = 0; c_sw = 0; c_swo = 0; c_lb = 0; c_redir_hdr_ok = 0;
    // run
    i = 0;
    fetch_valid = 1; fetch_addr = prog[0].pc;
    c0 = cyc;
    #1 will_accept = fetch_valid && fetch_ready;
    forever begin
      @(negedge clk);
      exec_valid = 0; loop_branch_en = 0;
      if (fetch_resp_valid) begin
        check(fetch_resp_instr == mem_word(prog[i].pc),
              $sformatf("instruction at %h: %h", prog[i].pc, fetch_resp_instr));
        exec_valid     = 1;
        exec_pc        = prog[i].pc;
        exec_instr     = fetch_resp_instr;
        exec_instr[9:6] = prog[i].pfd;
        loop_branch_en = prog[i].lb;
        i++;
        if (i == prog.size()) begin
          cycles = cyc - c0;
          fetch_valid = 0;
          @(negedge clk);
          exec_valid = 0; loop_branch_en = 0;
          break;
        end
        fetch_valid = 1; fetch_addr = prog[i].pc;
      end else if (will_accept) begin
        fetch_valid = 0;
      end
      #1 will_accept = fetch_valid && fetch_ready;
    end
    // let outstanding fills drain before the next reset
    repeat (2 * LAT) @(negedge clk);
    t_hit += c_hit; t_miss += c_miss; t_merge += c_merge; t_byp += c_byp;
    t_pff += c_pff; t_pfd += c_pfd; t_redir += c_redir; t_seq += c_seq;
    t_sw += c_sw; t_swo += c_swo; t_modes++;
    $display("%-7s cycles=%0d hit=%0d miss=%0d merge=%0d bypass=%0d pf_fill=%0d pf_drop=%0d redirect=%0d seq=%0d sw=%0d sw_over=%0d",
             m.name(), cycles, c_hit, c_miss, c_merge, c_byp, c_pff, c_pfd, c_redir, c_seq,
             c_sw, c_swo);
  endtask

  initial begin
    int cyc_off, cyc_loop, cyc_wcet;
    mode = PF_OFF;
    t_hit = 0; t_miss = 0; t_merge = 0; t_byp = 0; t_pff = 0; t_pfd = 0;
    t_redir = 0; t_seq = 0; t_sw = 0; t_swo = 0; t_modes = 0; redir_d = 0;
    #1;
    reference_cycles();

    run_program(PF_OFF, cyc_off);
    check(cyc_off == ref_cycles, $sformatf("PF_OFF cycles %0d, reference %0d", cyc_off, ref_cycles));
    check(c_pff == 0 && c_redir == 0 && c_sw == 0, "prefetching active in PF_OFF");
    check(c_miss + c_hit == prog.size(), "fetch count in PF_OFF");

    run_program(PF_LOOP, cyc_loop);
    check(c_lb == ITER, $sformatf("loop branches executed %0d", c_lb));
    check(c_redir == ITER, $sformatf("loop redirects %0d, expected %0d", c_redir, ITER));
    check(c_redir_hdr_ok == ITER, $sformatf("runs starting at the header %0d", c_redir_hdr_ok));
    check(c_sw == 0, "software prefetch active in PF_LOOP");
    check(cyc_loop < cyc_off, $sformatf("PF_LOOP %0d not faster than PF_OFF %0d", cyc_loop, cyc_off));

    run_program(PF_WCET, cyc_wcet);
    check(c_redir == 0 && c_seq == 0, "hardware prefetcher active in PF_WCET");
    check(c_sw > 0, "no software prefetch decoded");
    check(cyc_wcet < cyc_off, $sformatf("PF_WCET %0d not faster than PF_OFF %0d", cyc_wcet, cyc_off));

    // mechanism coverage
    check(t_hit   > 0, "no demand hit");
    check(t_miss  > 0, "no demand miss");
    check(t_merge > 0, "no miss merged with an in-flight prefetch");
    check(t_pff   > 0, "no prefetch fill");
    check(t_pfd   > 0, "no prefetch drop");
    check(t_redir > 0, "no loop redirect");
    check(t_seq   > 0, "no sequential trigger");
    check(t_sw    > 0, "no software prefetch");
    check(t_swo   > 0, "no software prefetch overwrite");
    check(t_modes == 3, "not all modes run");
    $display("normalised cycles: loop %0d/1000, wcet %0d/1000",
             cyc_loop * 1000 / cyc_off, cyc_wcet * 1000 / cyc_off);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
