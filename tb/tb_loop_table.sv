// tb_loop_table: writes, overwrites, invalidates and clears the loop table and
// compares every entry with a shadow copy held in the testbench after each operation.
module tb_loop_table;
  localparam int ENTRIES = 8;
  logic                           clk = 0, rst_n = 0;
  logic                           clear, wr_en, wr_valid;
  logic [2:0]                     wr_idx;
  logic [31:0]                    wr_branch, wr_header;
  logic [ENTRIES-1:0]             ent_valid;
  logic [ENTRIES-1:0][31:0]       ent_branch, ent_header;
  logic [ENTRIES-1:0]             s_valid;
  logic [31:0]                    s_branch [ENTRIES];
  logic [31:0]                    s_header [ENTRIES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  loop_table dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    for (int e = 0; e < ENTRIES; e++) begin
      checks++;
      if (ent_valid[e] !== s_valid[e] ||
          (s_valid[e] && (ent_branch[e] !== s_branch[e] || ent_header[e] !== s_header[e]))) begin
        failures++;
        if (failures < 10)
          $display("%s: entry %0d valid=%0b/%0b branch=%h/%h header=%h/%h", what, e,
                   ent_valid[e], s_valid[e], ent_branch[e], s_branch[e],
                   ent_header[e], s_header[e]);
      end
    end
  endtask

  initial begin
    clear = 0; wr_en = 0; wr_valid = 0; wr_idx = 0; wr_branch = 0; wr_header = 0;
    s_valid = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    compare("after reset");
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      clear     = ($urandom_range(0, 40) == 0);
      wr_en     = ($urandom_range(0, 1) == 1);
      wr_valid  = ($urandom_range(0, 5) != 0);
      wr_idx    = 3'($urandom);
      wr_branch = $urandom;
      wr_header = $urandom;
      @(posedge clk);
      if (clear) s_valid = '0;
      else if (wr_en) begin
        s_valid[wr_idx]  = wr_valid;
        s_branch[wr_idx] = wr_branch;
        s_header[wr_idx] = wr_header;
      end
      #1 compare("random op");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
