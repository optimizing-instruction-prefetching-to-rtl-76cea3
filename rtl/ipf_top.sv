// ipf_top: instruction-fetch front end with worst-case-oriented instruction prefetching.
//
// It joins the L1 instruction cache to two prefetch sources, chosen by `mode`:
//   PF_LOOP  the loop-directed Next-N-Line prefetcher. Executed instructions drive a
//            Next-N-Line address generator (prefetch the lines after the current
//            one). When an instruction marked as a loop branch executes, its address
//            goes to the loop branch address register, an associative search of the
//            loop table finds the loop header, and the mux makes the prefetch run start
//            at the header instead, because in the worst case the loop branch is taken.
//   PF_WCET  compiler-inserted prefetches: a non-zero prefetch-distance field in an
//            executed instruction prefetches the instruction that far ahead.
//   PF_OFF   no prefetching.
// The source that is not selected is held idle. The loop table is loaded through the
// tbl_* port before the program runs.
//
// Interface: fetch port (req/resp, see icache), execute report (exec_valid, exec_pc,
//            exec_instr, loop_branch_en = LoopBranchEnable), main-memory port, and
//            event pulses `ev` for counting what each mechanism did.
// Timing:    a fetch hit answers in the next cycle, a miss after the memory latency
//            more. An executed instruction reaches the prefetch port two cycles later
//            on the loop path (register, then prefetcher) and one cycle later on the
//            software path.
// The loop-prefetch structure follows the block diagram of the design; the mode
// switch between the two schemes and all handshakes are this design's choices.
module ipf_top
  import ipf_pkg::*;
#(
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned CACHE_BYTES  = 512,
  parameter int unsigned LINE_BYTES   = 8,
  parameter int unsigned LOOP_ENTRIES = 8,
  parameter int unsigned PF_LINES     = 8,
  parameter int unsigned PF_FIELD_LSB = 6,
  parameter int unsigned PF_FIELD_W   = 4,
  localparam int unsigned LINE_W      = LINE_BYTES * 8,
  localparam int unsigned TIDX_W      = (LOOP_ENTRIES > 1) ? $clog2(LOOP_ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  pf_mode_e           mode,
  // loop table load
  input  logic               tbl_clear,
  input  logic               tbl_we,
  input  logic [TIDX_W-1:0]  tbl_idx,
  input  logic               tbl_valid,
  input  logic [ADDR_W-1:0]  tbl_branch,
  input  logic [ADDR_W-1:0]  tbl_header,
  // demand fetch
  input  logic               fetch_valid,
  output logic               fetch_ready,
  input  logic [ADDR_W-1:0]  fetch_addr,
  output logic               fetch_resp_valid,
  output logic [INSTR_W-1:0] fetch_resp_instr,
  // executed instructions
  input  logic               exec_valid,
  input  logic [ADDR_W-1:0]  exec_pc,
  input  logic [INSTR_W-1:0] exec_instr,
  input  logic               loop_branch_en,
  // main memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic [ADDR_W-1:0]  mem_req_addr,
  input  logic               mem_resp_valid,
  input  logic [LINE_W-1:0]  mem_resp_data,
  // events
  output ipf_ev_t            ev
);

  logic loop_on, wcet_on;
  assign loop_on = (mode == PF_LOOP);
  assign wcet_on = (mode == PF_WCET);

  // ---------------- loop-directed Next-N-Line prefetcher ----------------
  logic [ADDR_W-1:0]                   lb_addr;
  logic                                lb_en;
  logic [LOOP_ENTRIES-1:0]             ent_valid;
  logic [LOOP_ENTRIES-1:0][ADDR_W-1:0] ent_branch, ent_header;
  logic                                lt_hit;
  logic [TIDX_W-1:0]                   lt_hit_idx;
  logic [ADDR_W-1:0]                   lt_header;
  logic                                seq_valid;
  logic [ADDR_W-1:0]                   seq_addr;
  logic                                start_valid;
  logic [ADDR_W-1:0]                   start_addr;
  logic                                hw_pf_valid, hw_pf_ready, hw_busy;
  logic [ADDR_W-1:0]                   hw_pf_addr;

  loop_branch_addr_reg #(.ADDR_W(ADDR_W)) u_lbreg (
    .clk, .rst_n,
    .exec_valid     (exec_valid && loop_on),
    .loop_branch_en (loop_branch_en),
    .exec_pc        (exec_pc),
    .lb_addr        (lb_addr),
    .lb_en          (lb_en)
  );

  loop_table #(.ENTRIES(LOOP_ENTRIES), .ADDR_W(ADDR_W)) u_ltab (
    .clk, .rst_n,
    .clear      (tbl_clear),
    .wr_en      (tbl_we),
    .wr_idx     (tbl_idx),
    .wr_valid   (tbl_valid),
    .wr_branch  (tbl_branch),
    .wr_header  (tbl_header),
    .ent_valid  (ent_valid),
    .ent_branch (ent_branch),
    .ent_header (ent_header)
  );

  loop_assoc_search #(.ENTRIES(LOOP_ENTRIES), .ADDR_W(ADDR_W)) u_search (
    .en         (lb_en),
    .key        (lb_addr),
    .ent_valid  (ent_valid),
    .ent_branch (ent_branch),
    .ent_header (ent_header),
    .hit        (lt_hit),
    .hit_idx    (lt_hit_idx),
    .header     (lt_header)
  );

  nnl_addr_gen #(.ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES)) u_agen (
    .clk, .rst_n,
    .exec_valid (exec_valid && loop_on),
    .exec_pc    (exec_pc),
    .seq_valid  (seq_valid),
    .seq_addr   (seq_addr)
  );

  prefetch_addr_mux #(.ADDR_W(ADDR_W)) u_mux (
    .sel       (lb_en && lt_hit),
    .in1_valid (lt_hit),
    .in1       (lt_header),
    .in0_valid (seq_valid),
    .in0       (seq_addr),
    .out_valid (start_valid),
    .out       (start_addr)
  );

  nnl_prefetcher #(.ADDR_W(ADDR_W), .LINE_BYTES(LINE_BYTES), .N_LINES(PF_LINES)) u_nnl (
    .clk, .rst_n,
    .enable      (loop_on),
    .start_valid (start_valid),
    .start_addr  (start_addr),
    .pf_valid    (hw_pf_valid),
    .pf_addr     (hw_pf_addr),
    .pf_ready    (hw_pf_ready),
    .busy        (hw_busy)
  );

  // ---------------- WCET-oriented software prefetch ----------------
  logic              sw_pf_valid, sw_pf_ready, sw_fire, sw_over;
  logic [ADDR_W-1:0] sw_pf_addr;

  wcet_pf_decoder #(
    .ADDR_W(ADDR_W), .INSTR_W(INSTR_W), .INSTR_BYTES(INSTR_BYTES),
    .FIELD_LSB(PF_FIELD_LSB), .FIELD_W(PF_FIELD_W)
  ) u_swpf (
    .clk, .rst_n,
    .enable       (wcet_on),
    .exec_valid   (exec_valid),
    .exec_pc      (exec_pc),
    .exec_instr   (exec_instr),
    .pf_valid     (sw_pf_valid),
    .pf_addr      (sw_pf_addr),
    .pf_ready     (sw_pf_ready),
    .sw_prefetch  (sw_fire),
    .sw_overwrite (sw_over)
  );

  // ---------------- prefetch source select and cache ----------------
  logic              pf_valid, pf_ready;
  logic [ADDR_W-1:0] pf_addr;
  icache_ev_t        cache_ev;

  always_comb begin
    pf_valid = 1'b0;
    pf_addr  = hw_pf_addr;
    unique case (mode)
      PF_LOOP: begin pf_valid = hw_pf_valid; pf_addr = hw_pf_addr; end
      PF_WCET: begin pf_valid = sw_pf_valid; pf_addr = sw_pf_addr; end
      default: ;
    endcase
  end
  assign hw_pf_ready = loop_on && pf_ready;
  assign sw_pf_ready = wcet_on && pf_ready;

  icache #(.ADDR_W(ADDR_W), .CACHE_BYTES(CACHE_BYTES), .LINE_BYTES(LINE_BYTES)) u_icache (
    .clk, .rst_n,
    .req_valid      (fetch_valid),
    .req_ready      (fetch_ready),
    .req_addr       (fetch_addr),
    .resp_valid     (fetch_resp_valid),
    .resp_instr     (fetch_resp_instr),
    .pf_valid       (pf_valid),
    .pf_ready       (pf_ready),
    .pf_addr        (pf_addr),
    .mem_req_valid  (mem_req_valid),
    .mem_req_ready  (mem_req_ready),
    .mem_req_addr   (mem_req_addr),
    .mem_resp_valid (mem_resp_valid),
    .mem_resp_data  (mem_resp_data),
    .ev             (cache_ev)
  );

  always_comb begin
    ev               = '0;
    ev.cache         = cache_ev;
    ev.loop_redirect = start_valid && lb_en && lt_hit;
    ev.seq_trigger   = start_valid && !(lb_en && lt_hit);
    ev.sw_prefetch   = sw_fire;
    ev.sw_overwrite  = sw_over;
  end

endmodule
