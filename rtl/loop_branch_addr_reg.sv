// loop_branch_addr_reg: the loop branch address register of the loop-directed
// prefetcher.
//
// When the core executes an instruction annotated as a loop branch it raises
// LoopBranchEnable together with the instruction's address. This register keeps that
// address for the associative search of the loop table and delays LoopBranchEnable
// by the same cycle, so the search result and the mux select line up.
//
// Interface: exec_valid/exec_pc/loop_branch_en come from the execute stage in the
//            same cycle. lb_addr holds the last loop branch address; lb_en is a
//            one-cycle pulse in the cycle after a loop branch executed.
// Timing:    one register stage. The address is kept between loop branches.
// The register and its enable follow the figure of the design; registering the
// enable alongside the address and clearing both on reset are design choices.
module loop_branch_addr_reg #(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              exec_valid,
  input  logic              loop_branch_en,
  input  logic [ADDR_W-1:0] exec_pc,
  output logic [ADDR_W-1:0] lb_addr,
  output logic              lb_en
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lb_addr <= '0;
      lb_en   <= 1'b0;
    end else begin
      lb_en <= exec_valid && loop_branch_en;
      if (exec_valid && loop_branch_en) lb_addr <= exec_pc;
    end
  end

endmodule
