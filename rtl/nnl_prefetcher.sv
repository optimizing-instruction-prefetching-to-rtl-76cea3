// nnl_prefetcher: the Next-N-Line prefetcher that sends line prefetches to the
// instruction cache.
//
// It keeps a window of lines to prefetch, [next, end). A start request for line S
// means "the N lines from S on are wanted". If that range continues the current
// window (end-N <= S <= end) the window end moves to S+N, lines already offered are
// not offered again and lines below S, which execution has passed, are skipped: the
// classic Next-N-Line behaviour for straight-line code. Any other S (a jump, such as
// the redirect to a loop header) abandons the rest of the window and starts a new
// one at S. Each line of the window is offered to the cache with a valid/ready
// handshake, lowest first.
//
// Interface: enable (low: idle, window emptied), start_valid/start_addr, and the
//            prefetch port pf_valid/pf_addr/pf_ready towards the cache.
// Timing:    a start request is registered; the first prefetch of a new run is offered
//            in the next cycle and one prefetch can be accepted per cycle.
// N = 8 lines is the distance that gave the best worst-case result in the evaluation;
// the window rule and the handshake are design choices.
module nnl_prefetcher #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 8,
  parameter int unsigned N_LINES    = 8,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned LN_W      = ADDR_W - OFF_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              start_valid,
  input  logic [ADDR_W-1:0] start_addr,
  output logic              pf_valid,
  output logic [ADDR_W-1:0] pf_addr,
  input  logic              pf_ready,
  output logic              busy
);

  logic [LN_W-1:0] next_line;   // next line to offer
  logic [LN_W-1:0] end_line;    // one past the last line of the window
  logic [LN_W-1:0] req_line, req_end, next_adv;
  logic            extend;

  assign req_line = start_addr[ADDR_W-1:OFF_W];
  assign req_end  = req_line + LN_W'(N_LINES);
  assign extend   = (req_line <= end_line) && (req_end >= end_line);
  // next line after this cycle's handshake, never below the requested start
  assign next_adv = (pf_valid && pf_ready) ? next_line + 1'b1 : next_line;
  assign busy     = next_line != end_line;
  assign pf_valid = busy;
  assign pf_addr  = {next_line, {OFF_W{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_line <= '0;
      end_line  <= '0;
    end else if (!enable) begin
      end_line <= next_line;
    end else begin
      if (start_valid && !extend) begin
        next_line <= req_line;
        end_line  <= req_end;
      end else if (start_valid) begin
        next_line <= (req_line > next_adv) ? req_line : next_adv;
        end_line  <= req_end;
      end else begin
        next_line <= next_adv;
      end
    end
  end

  // The window never holds more than N lines.
  a_window_bound : assert property (@(posedge clk) disable iff (!rst_n)
    (end_line - next_line) <= LN_W'(N_LINES));

endmodule
