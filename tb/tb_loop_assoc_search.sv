// tb_loop_assoc_search: fills random tables (with deliberate duplicates and invalid
// entries) and searches for present and absent keys, checking hit, the index of the
// lowest matching valid entry and its header against a linear scan.
module tb_loop_assoc_search;
  localparam int ENTRIES = 8;
  logic                     en;
  logic [31:0]              key, header;
  logic [ENTRIES-1:0]       ent_valid;
  logic [ENTRIES-1:0][31:0] ent_branch, ent_header;
  logic                     hit;
  logic [2:0]               hit_idx;
  int checks = 0, failures = 0, n_hits = 0, n_miss = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  loop_assoc_search dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic       e_hit;
    logic [2:0] e_idx;
    logic [31:0] e_hdr;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ent_valid = 8'($urandom);
      for (int e = 0; e < ENTRIES; e++) begin
        ent_branch[e] = 32'h100 + 32'($urandom_range(0, 11)) * 4;
        ent_header[e] = $urandom;
      end
      en  = ($urandom_range(0, 7) != 0);
      key = 32'h100 + 32'($urandom_range(0, 15)) * 4;
      #1;
      e_hit = 0; e_idx = 0; e_hdr = 0;
      for (int e = 0; e < ENTRIES; e++)
        if (!e_hit && en && ent_valid[e] && ent_branch[e] == key) begin
          e_hit = 1; e_idx = 3'(e); e_hdr = ent_header[e];
        end
      if (e_hit) n_hits++; else n_miss++;
      checks++;
      if (hit !== e_hit || (e_hit && (hit_idx !== e_idx || header !== e_hdr))) begin
        failures++;
        if (failures < 10)
          $display("t=%0d key=%h hit=%0b/%0b idx=%0d/%0d hdr=%h/%h", t, key, hit, e_hit,
                   hit_idx, e_idx, header, e_hdr);
      end
    end
    checks++;
    if (n_hits == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
