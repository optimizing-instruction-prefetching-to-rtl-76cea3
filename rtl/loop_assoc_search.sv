// loop_assoc_search: the associative search circuit of the loop-directed prefetcher.
//
// Activated by LoopBranchEnable, it compares the loop branch address register with
// the loop branch address of every valid table entry at once and returns the loop
// header address of the matching entry. If several entries match (the table was
// loaded with a duplicate) the lowest index wins.
//
// Interface: en and key from loop_branch_addr_reg, the entry arrays from loop_table;
//            hit, hit_idx and header are the result.
// Timing:    purely combinational.
// The search function is the document's; the priority rule for duplicates and
// forcing hit low while disabled are design choices.
module loop_assoc_search #(
  parameter int unsigned ENTRIES = 8,
  parameter int unsigned ADDR_W  = 32,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic                           en,
  input  logic [ADDR_W-1:0]              key,
  input  logic [ENTRIES-1:0]             ent_valid,
  input  logic [ENTRIES-1:0][ADDR_W-1:0] ent_branch,
  input  logic [ENTRIES-1:0][ADDR_W-1:0] ent_header,
  output logic                           hit,
  output logic [IDX_W-1:0]               hit_idx,
  output logic [ADDR_W-1:0]              header
);

  logic [ENTRIES-1:0] match;

  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      match[i] = en && ent_valid[i] && (ent_branch[i] == key);
    end
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    header  = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (match[i]) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
        header  = ent_header[i];
      end
    end
  end

endmodule
