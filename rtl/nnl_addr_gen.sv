// nnl_addr_gen: the Next-N-Line prefetching address generator.
//
// It watches the addresses of executed instructions. Whenever execution enters a cache
// line other than the one of the previous executed instruction, it emits the address
// of the following line, which is where a sequential Next-N-Line prefetch run starts.
// Staying inside one line produces no new request.
//
// Interface: exec_valid/exec_pc from the execute stage; seq_valid is a one-cycle pulse
//            with seq_addr, the line-aligned address of the next line.
// Timing:    one register stage, so the request lines up with the loop branch address
//            register and the associative search.
// Prefetching the lines that follow the current one is the document's sequential
// policy; triggering on entry into a new line is a design choice.
module nnl_addr_gen #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned LINE_BYTES = 8,
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              exec_valid,
  input  logic [ADDR_W-1:0] exec_pc,
  output logic              seq_valid,
  output logic [ADDR_W-1:0] seq_addr
);

  logic [ADDR_W-OFF_W-1:0] last_line;
  logic                    last_known;
  logic [ADDR_W-OFF_W-1:0] cur_line;

  assign cur_line = exec_pc[ADDR_W-1:OFF_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_line  <= '0;
      last_known <= 1'b0;
      seq_valid  <= 1'b0;
      seq_addr   <= '0;
    end else begin
      seq_valid <= 1'b0;
      if (exec_valid) begin
        last_line  <= cur_line;
        last_known <= 1'b1;
        if (!last_known || cur_line != last_line) begin
          seq_valid <= 1'b1;
          seq_addr  <= {cur_line + 1'b1, {OFF_W{1'b0}}};
        end
      end
    end
  end

endmodule
