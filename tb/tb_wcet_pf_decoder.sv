// tb_wcet_pf_decoder: executes instructions with random prefetch fields (4 bits at
// bit 6) and random cache readiness. A reference model predicts the pending request:
// a non-zero field d at PC must be offered as PC + 4*d in the next cycle and held until
// accepted, a newer request replaces an unaccepted one, and zero fields do nothing.
module tb_wcet_pf_decoder;
  logic        clk = 0, rst_n = 0;
  logic        enable, exec_valid, pf_valid, pf_ready, sw_prefetch, sw_overwrite;
  logic [31:0] exec_pc, exec_instr, pf_addr;
  int checks = 0, failures = 0, n_fire = 0, n_over = 0;
  logic        m_valid;
  logic [31:0] m_addr;
  logic [3:0]  d;

  always #5 clk = ~clk;

  wcet_pf_decoder dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_fire;
    enable = 1; exec_valid = 0; exec_pc = 0; exec_instr = 0; pf_ready = 0;
    m_valid = 0; m_addr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      enable     = ($urandom_range(0, 60) != 0);
      exec_valid = ($urandom_range(0, 3) != 0);
      exec_pc    = 32'h1000 + 32'($urandom_range(0, 1023)) * 4;
      d          = ($urandom_range(0, 2) == 0) ? 4'($urandom) : 4'd0;
      exec_instr = $urandom;
      exec_instr[9:6] = d;
      pf_ready   = ($urandom_range(0, 3) == 0);
      #1;
      e_fire = enable && exec_valid && d != 0;
      checks++;
      if (pf_valid !== m_valid || (m_valid && pf_addr !== m_addr) ||
          sw_prefetch !== e_fire || sw_overwrite !== (e_fire && m_valid && !pf_ready)) begin
        failures++;
        if (failures < 10)
          $display("t=%0d pf_valid=%0b/%0b pf_addr=%h/%h fire=%0b/%0b", t, pf_valid, m_valid,
                   pf_addr, m_addr, sw_prefetch, e_fire);
      end
      if (e_fire) n_fire++;
      if (e_fire && m_valid && !pf_ready) n_over++;
      @(posedge clk);
      if (!enable) m_valid = 0;
      else if (e_fire) begin
        m_valid = 1; m_addr = exec_pc + 32'(d) * 4;
      end else if (pf_ready) m_valid = 0;
    end
    checks++;
    if (n_fire == 0 || n_over == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
