// icache: direct-mapped L1 instruction cache with a demand port, a prefetch port and
// a one-line fill engine.
//
// Default geometry: 512 bytes in 8-byte lines (64 lines, two 32-bit instructions per
// line), direct-mapped, one cycle hit latency. Main memory returns a whole line a
// fixed number of cycles after accepting a request.
//
// Demand port: a fetch is accepted when req_ready is high. A hit returns the
// instruction in the next cycle (resp_valid). A miss starts a fill and returns the
// instruction one cycle after the line arrives, so the miss penalty equals the memory
// latency (8 cycles in the default system). The cache blocks on a miss. Two cases cut
// the penalty: a miss on a line that a prefetch is already fetching waits for that fill
// instead of starting another (miss_merge), and a fetch accepted in the cycle its line
// arrives is served straight from memory data (fill_bypass).
//
// Prefetch port: a prefetch is accepted when pf_ready is high. If its line is present,
// already being fetched, or the line of the waiting demand miss, it is dropped at once.
// Otherwise it starts a fill if the fill engine is free and no demand miss needs it;
// demand misses always win. Prefetched lines are written into the cache like demand
// lines and replace whatever occupied their set.
//
// Memory port: mem_req_valid/mem_req_ready/mem_req_addr (line aligned), then one
// mem_resp_valid pulse with the line in mem_resp_data. mem_req_valid may rise in the
// same cycle as a missing fetch is accepted. One fill is outstanding at a time.
//
// The size, organisation and latencies come from the evaluated configuration; the
// single outstanding fill, demand priority, the merge and bypass paths and the port
// protocols are design choices.
module icache
  import ipf_pkg::*;
#(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned CACHE_BYTES = 512,
  parameter int unsigned LINE_BYTES  = 8,
  localparam int unsigned LINE_W     = LINE_BYTES * 8,
  localparam int unsigned LINES      = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W      = $clog2(LINES),
  localparam int unsigned TAG_W      = ADDR_W - IDX_W - OFF_W,
  localparam int unsigned WSEL_W     = (OFF_W > 2) ? OFF_W - 2 : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // demand fetch
  input  logic               req_valid,
  output logic               req_ready,
  input  logic [ADDR_W-1:0]  req_addr,
  output logic               resp_valid,
  output logic [INSTR_W-1:0] resp_instr,
  // prefetch
  input  logic               pf_valid,
  output logic               pf_ready,
  input  logic [ADDR_W-1:0]  pf_addr,
  // main memory
  output logic               mem_req_valid,
  input  logic               mem_req_ready,
  output logic [ADDR_W-1:0]  mem_req_addr,
  input  logic               mem_resp_valid,
  input  logic [LINE_W-1:0]  mem_resp_data,
  // events
  output icache_ev_t         ev
);

  typedef logic [ADDR_W-OFF_W-1:0] line_t;

  // storage
  logic [LINES-1:0]             valid_q;
  logic [TAG_W-1:0]             tag_q  [LINES];
  logic [LINE_W-1:0]            data_q [LINES];

  // demand side
  typedef enum logic {D_IDLE, D_MISS} dstate_e;
  dstate_e                      dstate_q;
  logic [ADDR_W-1:0]            dmiss_addr_q;

  // fill engine
  logic                         fill_busy_q;
  logic                         fill_req_q;   // request not yet accepted by memory
  line_t                        fill_line_q;

  function automatic logic [INSTR_W-1:0] pick_word(logic [LINE_W-1:0] line,
                                                   logic [ADDR_W-1:0] a);
    logic [WSEL_W-1:0] w;
    w = WSEL_W'(a[OFF_W-1:0] >> 2);
    return line[w*INSTR_W +: INSTR_W];
  endfunction

  // ---------------- lookup ----------------
  line_t            req_line, pf_line, dm_line;
  logic [IDX_W-1:0] req_idx, pf_idx;
  logic             req_hit, req_byp, accept;
  logic             pf_present, pf_inflight, pf_is_dm, pf_drop, pf_can_fill;
  logic             dm_need, start_dm, start_pf, start_fill;
  line_t            start_line;

  assign req_line = req_addr[ADDR_W-1:OFF_W];
  assign req_idx  = req_addr[OFF_W +: IDX_W];
  assign pf_line  = pf_addr[ADDR_W-1:OFF_W];
  assign pf_idx   = pf_addr[OFF_W +: IDX_W];
  assign dm_line  = dmiss_addr_q[ADDR_W-1:OFF_W];

  assign req_ready = (dstate_q == D_IDLE);
  assign accept    = req_valid && req_ready;
  assign req_hit   = valid_q[req_idx] && (tag_q[req_idx] == req_addr[ADDR_W-1 -: TAG_W]);
  assign req_byp   = !req_hit && mem_resp_valid && fill_busy_q && (fill_line_q == req_line);

  // A demand miss needs the fill engine unless its line is already on the way.
  always_comb begin
    dm_need = 1'b0;
    if (accept && !req_hit && !req_byp)
      dm_need = !(fill_busy_q && fill_line_q == req_line);
    else if (dstate_q == D_MISS)
      dm_need = !(fill_busy_q && fill_line_q == dm_line);
  end

  assign pf_present  = valid_q[pf_idx] && (tag_q[pf_idx] == pf_addr[ADDR_W-1 -: TAG_W]);
  assign pf_inflight = fill_busy_q && (fill_line_q == pf_line);
  assign pf_is_dm    = (dstate_q == D_MISS) && (dm_line == pf_line);
  assign pf_drop     = pf_present || pf_inflight || pf_is_dm;
  assign pf_can_fill = !fill_busy_q && !dm_need;
  assign pf_ready    = pf_drop || pf_can_fill;

  assign start_dm   = dm_need && !fill_busy_q;
  assign start_pf   = pf_valid && !pf_drop && pf_can_fill;
  assign start_fill = start_dm || start_pf;
  assign start_line = start_dm ? ((dstate_q == D_MISS) ? dm_line : req_line) : pf_line;

  assign mem_req_valid = start_fill || fill_req_q;
  assign mem_req_addr  = {(start_fill ? start_line : fill_line_q), {OFF_W{1'b0}}};

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= '0;
      dstate_q     <= D_IDLE;
      dmiss_addr_q <= '0;
      fill_busy_q  <= 1'b0;
      fill_req_q   <= 1'b0;
      fill_line_q  <= '0;
      resp_valid   <= 1'b0;
      resp_instr   <= '0;
    end else begin
      resp_valid <= 1'b0;

      // fill engine
      if (start_fill) begin
        fill_busy_q <= 1'b1;
        fill_line_q <= start_line;
        fill_req_q  <= !mem_req_ready;
      end else if (fill_req_q && mem_req_ready) begin
        fill_req_q <= 1'b0;
      end
      if (mem_resp_valid && fill_busy_q) begin
        fill_busy_q <= 1'b0;
        valid_q[fill_line_q[IDX_W-1:0]] <= 1'b1;
      end

      // demand side
      if (accept) begin
        if (req_hit) begin
          resp_valid <= 1'b1;
          resp_instr <= pick_word(data_q[req_idx], req_addr);
        end else if (req_byp) begin
          resp_valid <= 1'b1;
          resp_instr <= pick_word(mem_resp_data, req_addr);
        end else begin
          dstate_q     <= D_MISS;
          dmiss_addr_q <= req_addr;
        end
      end else if (dstate_q == D_MISS && mem_resp_valid && fill_busy_q
                   && fill_line_q == dm_line) begin
        dstate_q   <= D_IDLE;
        resp_valid <= 1'b1;
        resp_instr <= pick_word(mem_resp_data, dmiss_addr_q);
      end
    end
  end

  // tag and data arrays, written when a fill completes
  always_ff @(posedge clk) begin
    if (mem_resp_valid && fill_busy_q) begin
      tag_q[fill_line_q[IDX_W-1:0]]  <= fill_line_q[ADDR_W-OFF_W-1 -: TAG_W];
      data_q[fill_line_q[IDX_W-1:0]] <= mem_resp_data;
    end
  end

  // ---------------- events ----------------
  always_comb begin
    ev             = '0;
    ev.demand_hit  = accept && req_hit;
    ev.fill_bypass = accept && req_byp;
    ev.demand_miss = accept && !req_hit && !req_byp;
    ev.miss_merge  = ev.demand_miss && fill_busy_q && (fill_line_q == req_line);
    ev.pf_fill     = start_pf;
    ev.pf_drop     = pf_valid && pf_drop;
  end

  // ---------------- protocol checks ----------------
  a_one_fill : assert property (@(posedge clk) disable iff (!rst_n)
    start_fill |-> !fill_busy_q);
  a_no_stray_resp : assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> fill_busy_q);
  a_demand_first : assert property (@(posedge clk) disable iff (!rst_n)
    !(start_dm && start_pf));

endmodule
