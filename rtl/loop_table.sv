// loop_table: the hardware table of loop branch / loop header address pairs.
//
// Loop branches and their headers are known at compile time, so the table is loaded
// by software before the program runs, one entry per write. Each entry holds a valid
// bit, the loop branch address and the loop header (the branch target). All entries
// are visible in parallel for the associative search.
//
// Interface: wr_en/wr_idx/wr_branch/wr_header write one entry; wr_valid sets or
//            clears its valid bit. clear invalidates all entries.
// Timing:    writes take effect at the next clock edge; reads are combinational.
// Eight entries follow the evaluated configuration; the write port, the valid bits
// and reset-to-empty are design choices.
module loop_table #(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned ADDR_W  = 32,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic                           wr_en,
  input  logic [IDX_W-1:0]               wr_idx,
  input  logic                           wr_valid,
  input  logic [ADDR_W-1:0]              wr_branch,
  input  logic [ADDR_W-1:0]              wr_header,
  output logic [ENTRIES-1:0]             ent_valid,
  output logic [ENTRIES-1:0][ADDR_W-1:0] ent_branch,
  output logic [ENTRIES-1:0][ADDR_W-1:0] ent_header
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid  <= '0;
      ent_branch <= '0;
      ent_header <= '0;
    end else if (clear) begin
      ent_valid <= '0;
    end else if (wr_en && (32'(wr_idx) < ENTRIES)) begin
      ent_valid[wr_idx]  <= wr_valid;
      ent_branch[wr_idx] <= wr_branch;
      ent_header[wr_idx] <= wr_header;
    end
  end

endmodule
