// main_mem_model: behavioural model of the main memory behind the instruction cache,
// for simulation only. It has a fixed access latency (8 cycles by default) and no size
// limit: a line request accepted at one clock edge has its data sampled by the
// requester LAT edges later. It serves one request at a time and counts them.
// Contents come from tb_mem_pkg::mem_word.
module main_mem_model #(
  parameter int unsigned LAT        = 8,
  parameter int unsigned LINE_BYTES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic [31:0]             req_addr,
  output logic                    resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_data,
  output int                      n_req
);
  logic        busy;
  int          cnt;
  logic [31:0] addr;

  assign req_ready  = !busy;
  assign resp_valid = busy && cnt == 0;

  always_comb begin
    for (int w = 0; w < LINE_BYTES / 4; w++)
      resp_data[w*32 +: 32] = tb_mem_pkg::mem_word(addr + 32'(w) * 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      cnt   <= 0;
      addr  <= '0;
      n_req <= 0;
    end else if (busy) begin
      if (cnt == 0) busy <= 1'b0;
      else cnt <= cnt - 1;
    end else if (req_valid) begin
      busy  <= 1'b1;
      cnt   <= int'(LAT) - 1;
      addr  <= req_addr;
      n_req <= n_req + 1;
    end
  end
endmodule
