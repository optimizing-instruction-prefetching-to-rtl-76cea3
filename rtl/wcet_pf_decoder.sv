// wcet_pf_decoder: decoder for the software instruction-prefetch field of the
// WCET-oriented scheme.
//
// Every instruction carries a small "instruction prefetching address field" holding the
// forward distance, in instructions, from itself to an instruction that the static
// cache analysis found to miss. Zero means no prefetch. When an instruction with a
// non-zero field executes, this block forms PC + field * INSTR_BYTES and offers it to
// the instruction cache as a non-blocking prefetch. It holds one pending request; if a
// newer one arrives before the cache accepts the older, the newer replaces it and
// sw_overwrite pulses.
//
// Interface: enable (low: nothing decoded, pending request dropped), exec_valid/
//            exec_pc/exec_instr, and the prefetch port pf_valid/pf_addr/pf_ready.
// Timing:    the request is offered from the cycle after the instruction executes.
// The 4-bit field and its meaning (relative distance, zero = none) follow the document;
// its position (bits 9:6, inside the MIPS shift-amount field), counting the distance
// in instructions and the single pending entry are design choices.
module wcet_pf_decoder #(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned INSTR_W     = 32,
  parameter int unsigned INSTR_BYTES = 4,
  parameter int unsigned FIELD_LSB   = 6,
  parameter int unsigned FIELD_W     = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               exec_valid,
  input  logic [ADDR_W-1:0]  exec_pc,
  input  logic [INSTR_W-1:0] exec_instr,
  output logic               pf_valid,
  output logic [ADDR_W-1:0]  pf_addr,
  input  logic               pf_ready,
  output logic               sw_prefetch,
  output logic               sw_overwrite
);

  logic [FIELD_W-1:0] pf_dist;
  logic               fire;

  assign pf_dist = exec_instr[FIELD_LSB +: FIELD_W];
  assign fire = enable && exec_valid && (pf_dist != '0);
  assign sw_prefetch  = fire;
  assign sw_overwrite = fire && pf_valid && !pf_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_valid <= 1'b0;
      pf_addr  <= '0;
    end else if (!enable) begin
      pf_valid <= 1'b0;
    end else if (fire) begin
      pf_valid <= 1'b1;
      pf_addr  <= exec_pc + ADDR_W'(pf_dist) * ADDR_W'(INSTR_BYTES);
    end else if (pf_ready) begin
      pf_valid <= 1'b0;
    end
  end

endmodule
