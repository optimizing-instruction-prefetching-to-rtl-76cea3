// prefetch_addr_mux: chooses where a prefetch run starts.
//
// Input 1 is the loop header found by the associative search, input 0 the sequential
// address from the Next-N-Line address generator. Select 1 is taken when a loop branch
// was executed and found in the loop table; otherwise the sequential address passes.
// The valid of the chosen input travels with the address.
//
// Interface: sel, (in1_valid, in1), (in0_valid, in0) -> (out_valid, out).
// Timing:    combinational.
// The two inputs and their numbering follow the figure of the design. Driving the
// select from "loop branch and table hit" rather than from LoopBranchEnable alone is
// a design choice, so that a loop branch missing from the table falls back to
// sequential prefetching.
module prefetch_addr_mux #(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              sel,
  input  logic              in1_valid,
  input  logic [ADDR_W-1:0] in1,
  input  logic              in0_valid,
  input  logic [ADDR_W-1:0] in0,
  output logic              out_valid,
  output logic [ADDR_W-1:0] out
);

  always_comb begin
    if (sel) begin
      out_valid = in1_valid;
      out       = in1;
    end else begin
      out_valid = in0_valid;
      out       = in0;
    end
  end

endmodule
