// core_model: simulation-only in-order core that fetches and executes a fixed program
// trace through ipf_top's fetch and execute ports.
//
// The program has the shape of a two-dimensional array walk: a prologue, an outer loop
// whose body holds an inner loop, and an epilogue. Loop branches are annotated
// (loop_branch_en), and instructions four places before a line start carry prefetch
// distance 4. After `start` the core issues a fetch, executes the instruction in the
// cycle its response arrives and fetches the next one in the same cycle, so hits run
// at one instruction per cycle. It checks every fetched word against tb_mem_pkg and
// reports the cycle count, the mismatches and the loop branches it executed.
// The expected cycle count of a run without prefetching is available from
// ref_cycles(), a direct-mapped cache model with a 1-cycle hit and a 1+LAT miss.
module core_model #(
  parameter int unsigned LAT = 8
) (
  input  logic        clk,
  input  logic        start,
  output logic        done,
  output int          cycles,
  output int          mismatches,
  output int          n_loop_branches,
  output logic        fetch_valid,
  input  logic        fetch_ready,
  output logic [31:0] fetch_addr,
  input  logic        fetch_resp_valid,
  input  logic [31:0] fetch_resp_instr,
  output logic        exec_valid,
  output logic [31:0] exec_pc,
  output logic [31:0] exec_instr,
  output logic        loop_branch_en
);
  import tb_mem_pkg::*;

  localparam logic [31:0] OUTER_HDR = 32'h0000_1040;   // 24 instructions
  localparam logic [31:0] INNER_HDR = 32'h0000_10A0;   // 40 instructions
  localparam logic [31:0] INNER_BR  = INNER_HDR + 32'd39 * 4;
  localparam logic [31:0] OUTER_TL  = INNER_HDR + 32'd40 * 4;   // 24 instructions
  localparam logic [31:0] OUTER_BR  = OUTER_TL + 32'd23 * 4;
  localparam int OUTER = 4, INNER = 5;

  typedef struct {
    logic [31:0] pc;
    logic        lb;
    logic [3:0]  pfd;
  } op_t;
  op_t prog[$];

  function automatic void add_block(logic [31:0] s, int n, logic last_is_lb);
    for (int i = 0; i < n; i++) begin
      op_t o;
      o.pc  = s + 32'(i) * 4;
      o.lb  = last_is_lb && (i == n - 1);
      o.pfd = (i + 4 < n && ((o.pc + 16) & 32'h7) == 0) ? 4'd4 : 4'd0;
      prog.push_back(o);
    end
  endfunction

  initial begin
    add_block(32'h0000_1000, 16, 0);
    for (int o = 0; o < OUTER; o++) begin
      add_block(OUTER_HDR, 24, 0);
      for (int i = 0; i < INNER; i++) add_block(INNER_HDR, 40, 1);
      add_block(OUTER_TL, 24, 1);
    end
    // epilogue placed 512 bytes above the outer header: it evicts the loop code
    add_block(OUTER_HDR + 32'd512, 48, 0);
  end

  function automatic int ref_cycles();
    logic [28:0] line [64];
    logic [63:0] v;
    int c;
    v = '0; c = 0;
    foreach (prog[i]) begin
      logic [31:0] a;
      a = prog[i].pc;
      c += (v[a[8:3]] && line[a[8:3]] == a[31:3]) ? 1 : 1 + int'(LAT);
      v[a[8:3]] = 1; line[a[8:3]] = a[31:3];
    end
    return c;
  endfunction

  initial begin
    int i, c0, cyc;
    bit will_accept;
    done = 0; cycles = 0; mismatches = 0; n_loop_branches = 0;
    fetch_valid = 0; fetch_addr = 0;
    exec_valid = 0; exec_pc = 0; exec_instr = 0; loop_branch_en = 0;
    cyc = 0;
    @(negedge clk);
    while (!start) @(negedge clk);
    i = 0;
    fetch_valid = 1; fetch_addr = prog[0].pc;
    c0 = cyc;
    #1 will_accept = fetch_valid && fetch_ready;
    forever begin
      @(negedge clk);
      cyc++;
      exec_valid = 0; loop_branch_en = 0;
      if (fetch_resp_valid) begin
        if (fetch_resp_instr != mem_word(prog[i].pc)) mismatches++;
        exec_valid      = 1;
        exec_pc         = prog[i].pc;
        exec_instr      = fetch_resp_instr;
        exec_instr[9:6] = prog[i].pfd;
        loop_branch_en  = prog[i].lb;
        if (prog[i].lb) n_loop_branches++;
        i++;
        if (i == prog.size()) begin
          cycles = cyc - c0;
          fetch_valid = 0;
          @(negedge clk);
          exec_valid = 0; loop_branch_en = 0;
          done = 1;
          break;
        end
        fetch_valid = 1; fetch_addr = prog[i].pc;
      end else if (will_accept) begin
        fetch_valid = 0;
      end
      #1 will_accept = fetch_valid && fetch_ready;
    end
  end
endmodule
