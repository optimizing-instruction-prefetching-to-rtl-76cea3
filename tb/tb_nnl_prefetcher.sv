// tb_nnl_prefetcher: first a directed run (one start request, cache always ready)
// that must produce exactly N line prefetches on N consecutive cycles from the start
// line, beginning the cycle after the request; then random start requests, enables
// and ready patterns compared cycle by cycle with a reference model of the prefetch
// window: a start S with end-N <= S <= end moves the end to S+N without repeating
// lines and skips lines below S; any other start begins a new window.
module tb_nnl_prefetcher;
  localparam int N = 8;
  logic        clk = 0, rst_n = 0;
  logic        enable, start_valid, pf_valid, pf_ready, busy;
  logic [31:0] start_addr, pf_addr;
  int checks = 0, failures = 0, n_extend = 0, n_restart = 0, n_issue = 0;
  // reference window [m_next, m_end) of the run that started at m_start
  logic [28:0] m_next, m_start, m_end;
  int          m_rem;

  always #5 clk = ~clk;

  nnl_prefetcher dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(string what);
    checks++;
    if (pf_valid !== (m_rem != 0) || (m_rem != 0 && pf_addr !== {m_next, 3'b000})) begin
      failures++;
      if (failures < 10)
        $display("%s: pf_valid=%0b exp %0b pf_addr=%h exp %h", what, pf_valid, m_rem != 0,
                 pf_addr, {m_next, 3'b000});
    end
  endtask

  initial begin
    int first_cycle, cyc;
    enable = 1; start_valid = 0; start_addr = 0; pf_ready = 1;
    m_rem = 0; m_next = 0; m_start = 0; m_end = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // directed: one run at full rate
    @(negedge clk);
    start_valid = 1; start_addr = 32'h0000_1234;
    @(negedge clk);
    start_valid = 0;
    cyc = 0; first_cycle = -1;
    for (int k = 0; k < N + 4; k++) begin
      checks++;
      if (k < N) begin
        if (!(pf_valid && pf_addr == 32'h1230 + 32'(k) * 8)) begin
          failures++;
          $display("directed k=%0d pf_valid=%0b pf_addr=%h", k, pf_valid, pf_addr);
        end
      end else if (pf_valid) begin
        failures++;
        $display("directed: more than N prefetches");
      end
      @(negedge clk);
    end
    // the reference model takes over from the state the directed run left
    m_start = 29'(32'h1230 >> 3); m_next = m_start + N; m_end = m_next; m_rem = 0;
    // random
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      enable      = ($urandom_range(0, 50) != 0);
      start_valid = ($urandom_range(0, 9) == 0);
      if ($urandom_range(0, 1) == 0)
        start_addr = {m_end - 29'($urandom_range(0, N + 1)), 3'($urandom)};
      else start_addr = 32'h2000 + 32'($urandom_range(0, 63)) * 8 + 32'($urandom_range(0, 7));
      pf_ready = ($urandom_range(0, 2) != 0);
      #1 check_outputs("random");
      @(posedge clk);
      if (!enable) begin
        m_end = m_next;
      end else if (start_valid && !(start_addr[31:3] <= m_end && start_addr[31:3] + N >= m_end)) begin
        m_next = start_addr[31:3]; m_start = start_addr[31:3]; m_end = m_next + N;
        n_restart++;
      end else begin
        if (m_rem != 0 && pf_ready) begin
          m_next = m_next + 1; n_issue++;
        end
        if (start_valid) begin
          if (start_addr[31:3] > m_next) m_next = start_addr[31:3];
          m_end = start_addr[31:3] + N; n_extend++;
        end
      end
      m_rem = int'(m_end - m_next);
      checks++;
      if (m_rem > N) begin failures++; $display("model window exceeds N"); end
    end
    checks++;
    if (n_extend == 0 || n_restart == 0 || n_issue == 0) begin
      failures++;
      $display("coverage: extend=%0d restart=%0d issued=%0d", n_extend, n_restart, n_issue);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
