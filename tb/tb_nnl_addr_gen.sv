// tb_nnl_addr_gen: executes a random walk of instruction addresses (sequential steps,
// repeats inside a line and jumps) and checks that a request for the next 8-byte line
// appears exactly one cycle after execution enters a new line, and at no other time.
module tb_nnl_addr_gen;
  logic        clk = 0, rst_n = 0;
  logic        exec_valid, seq_valid;
  logic [31:0] exec_pc, seq_addr;
  int checks = 0, failures = 0, n_req = 0;
  logic [28:0] last_line;
  logic        known;
  logic        e_valid;
  logic [31:0] e_addr;

  always #5 clk = ~clk;

  nnl_addr_gen dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exec_valid = 0; exec_pc = 32'h400;
    known = 0; last_line = 0; e_addr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      exec_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 5))
        0:       exec_pc = 32'h400 + 32'($urandom_range(0, 255)) * 4;
        1:       exec_pc = exec_pc;
        default: exec_pc = exec_pc + 4;
      endcase
      @(posedge clk);
      e_valid = 0;
      if (exec_valid) begin
        if (!known || exec_pc[31:3] != last_line) begin
          e_valid = 1;
          e_addr  = {exec_pc[31:3] + 29'd1, 3'b000};
        end
        known = 1; last_line = exec_pc[31:3];
      end
      #1;
      checks++;
      if (seq_valid !== e_valid || (e_valid && seq_addr !== e_addr)) begin
        failures++;
        if (failures < 10)
          $display("t=%0d pc=%h seq_valid=%0b/%0b addr=%h/%h", t, exec_pc, seq_valid,
                   e_valid, seq_addr, e_addr);
      end
      if (e_valid) n_req++;
    end
    checks++;
    if (n_req == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
