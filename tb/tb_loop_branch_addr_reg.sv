// tb_loop_branch_addr_reg: random execute traffic into the loop branch address
// register. A reference model kept in the testbench predicts, every cycle, the held
// address and the one-cycle-delayed LoopBranchEnable, and both outputs are compared.
module tb_loop_branch_addr_reg;
  logic        clk = 0, rst_n = 0;
  logic        exec_valid, loop_branch_en;
  logic [31:0] exec_pc, lb_addr;
  logic        lb_en;
  int          checks = 0, failures = 0;
  logic [31:0] exp_addr;
  logic        exp_en;
  int          n_loop = 0;

  always #5 clk = ~clk;

  loop_branch_addr_reg dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exec_valid = 0; loop_branch_en = 0; exec_pc = 0;
    exp_addr = 0; exp_en = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      exec_valid     = ($urandom_range(0, 3) != 0);
      loop_branch_en = ($urandom_range(0, 4) == 0);
      exec_pc        = {$urandom, 2'b00} >> 2 << 2;
      @(posedge clk);
      exp_en = exec_valid && loop_branch_en;
      if (exec_valid && loop_branch_en) begin
        exp_addr = exec_pc;
        n_loop++;
      end
      #1;
      checks++;
      if (lb_en !== exp_en || lb_addr !== exp_addr) begin
        failures++;
        if (failures < 10)
          $display("mismatch cycle %0d: lb_en=%0b exp %0b lb_addr=%h exp %h",
                   i, lb_en, exp_en, lb_addr, exp_addr);
      end
    end
    checks++;
    if (n_loop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
