// tb_icache: the instruction cache with the 8-cycle main-memory model.
// Directed part: a cold miss must take 1 + 8 cycles and a hit 1 cycle; a line
// prefetched well ahead must then hit; a fetch of a line still being prefetched must
// merge with that fill and wait less than a full miss; a fetch in the cycle the line
// arrives must be served by the bypass; a prefetch of a present line must be dropped;
// two addresses 512 bytes apart must evict each other (direct mapped). Random part:
// mixed fetches and prefetches over 2 KB, every returned instruction compared with
// the memory contents, and a hit/miss reference model of the tag array.
module tb_icache;
  import ipf_pkg::*;
  import tb_mem_pkg::*;
  localparam int LAT = 8;
  logic        clk = 0, rst_n = 0;
  logic        req_valid, req_ready, resp_valid;
  logic [31:0] req_addr, resp_instr;
  logic        pf_valid, pf_ready;
  logic [31:0] pf_addr;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_resp_data;
  icache_ev_t  ev;
  int          n_req;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_hit = 0, n_miss = 0, n_merge = 0, n_byp = 0, n_pff = 0, n_pfd = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    n_hit  += int'(ev.demand_hit);  n_miss += int'(ev.demand_miss);
    n_merge += int'(ev.miss_merge); n_byp  += int'(ev.fill_bypass);
    n_pff  += int'(ev.pf_fill);     n_pfd  += int'(ev.pf_drop);
  end

  icache dut (.*);
  main_mem_model #(.LAT(LAT)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data),
    .n_req(n_req));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  // Fetch one instruction; returns cycles from acceptance to response.
  task automatic fetch(input logic [31:0] a, output int lat);
    int c0;
    @(negedge clk);
    req_valid = 1; req_addr = a;
    #1;
    while (!req_ready) begin @(negedge clk); #1; end
    c0 = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    lat = cyc - c0;
    check(resp_instr == mem_word(a), $sformatf("data at %h: %h exp %h", a, resp_instr, mem_word(a)));
  endtask

  // Offer one prefetch and wait until it is taken.
  task automatic prefetch(input logic [31:0] a);
    @(negedge clk);
    pf_valid = 1; pf_addr = a;
    #1;
    while (!pf_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    pf_valid = 0;
  endtask

  // reference tag model for the random phase
  logic [28:0] m_line [64];
  logic [63:0] m_val;

  initial begin
    int lat, d0;
    req_valid = 0; req_addr = 0; pf_valid = 0; pf_addr = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    fetch(32'h0000_0100, lat);
    check(lat == 1 + LAT, $sformatf("cold miss latency %0d", lat));
    fetch(32'h0000_0104, lat);
    check(lat == 1, $sformatf("hit latency %0d", lat));

    // prefetch well ahead, then hit
    prefetch(32'h0000_0200);
    repeat (LAT + 2) @(negedge clk);
    fetch(32'h0000_0204, lat);
    check(lat == 1, $sformatf("prefetched line latency %0d", lat));
    check(n_pff == 1, $sformatf("prefetch fills %0d", n_pff));

    // prefetch of a present line is dropped
    d0 = n_pfd;
    prefetch(32'h0000_0100);
    @(negedge clk);
    check(n_pfd == d0 + 1, "prefetch of present line not dropped");

    // late prefetch: demand merges with the fill in flight
    prefetch(32'h0000_0340);
    repeat (3) @(negedge clk);
    d0 = n_req;
    fetch(32'h0000_0340, lat);
    check(lat < 1 + LAT && lat >= 1, $sformatf("merged miss latency %0d", lat));
    check(n_merge == 1, $sformatf("merges %0d", n_merge));
    check(n_req == d0, "merged miss issued a second memory request");

    // bypass: fetch presented in the cycle the prefetched line arrives
    prefetch(32'h0000_0408);
    while (!mem_resp_valid) @(negedge clk);
    req_valid = 1; req_addr = 32'h0000_040C;
    #1 check(req_ready, "cache not ready in bypass cycle");
    @(negedge clk);
    req_valid = 0;
    check(resp_valid && resp_instr == mem_word(32'h40C), "bypass response");
    check(n_byp == 1, $sformatf("bypasses %0d", n_byp));

    // direct-mapped conflict: 0x100 and 0x300 are 512 bytes apart and share set 0x20
    fetch(32'h0000_0100, lat);
    check(lat == 1, "0x100 should still be cached");
    fetch(32'h0000_0340, lat);
    check(lat == 1, "0x340 should be cached");
    fetch(32'h0000_0300, lat);
    check(lat == 1 + LAT, $sformatf("conflict miss latency %0d", lat));
    fetch(32'h0000_0100, lat);
    check(lat == 1 + LAT, $sformatf("evicted line latency %0d", lat));

    // random phase with a tag reference model (all fills complete before checking)
    repeat (LAT + 2) @(negedge clk);
    #1 rst_n = 0;
    #1 rst_n = 1;
    m_val = '0;
    for (int t = 0; t < 1500; t++) begin
      logic [31:0] a;
      bit exp_hit;
      a = 32'h0000_1000 + 32'($urandom_range(0, 511)) * 4;
      if ($urandom_range(0, 2) == 0) begin
        logic [31:0] p;
        p = 32'h0000_1000 + 32'($urandom_range(0, 255)) * 8;
        prefetch(p);
        // the reference model counts the line once its fill has surely completed
        repeat (LAT + 2) @(negedge clk);
        m_val[p[8:3]] = 1; m_line[p[8:3]] = p[31:3];
      end
      exp_hit = m_val[a[8:3]] && m_line[a[8:3]] == a[31:3];
      fetch(a, lat);
      check(lat == (exp_hit ? 1 : 1 + LAT),
            $sformatf("random fetch %h lat %0d exp_hit %0b", a, lat, exp_hit));
      m_val[a[8:3]] = 1; m_line[a[8:3]] = a[31:3];
    end
    check(n_hit > 0 && n_miss > 0 && n_pfd > 0 && n_pff > 0, "random coverage");
    $display("hits=%0d misses=%0d merges=%0d bypass=%0d pf_fill=%0d pf_drop=%0d",
             n_hit, n_miss, n_merge, n_byp, n_pff, n_pfd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
