// tb_prefetch_distance: the prefetching-distance sweep. Five copies of ipf_top run
// the same nested-loop program side by side: one without prefetching and four with
// loop-directed prefetch runs of 2, 4, 8 and 16 lines (LP-2, LP-4, LP-8, LP-16). The
// loop table holds both loops. Checked in every copy: all fetched words, one loop
// redirect per executed loop branch, and for the copy without prefetching the exact
// cycle count of a reference cache model. The normalised cycle count of each distance
// is printed; which distance wins depends on the program and is not checked.
module tb_prefetch_distance;
  import ipf_pkg::*;

  localparam int LAT   = 8;
  localparam int LANES = 5;
  localparam int DIST [LANES] = '{8, 2, 4, 8, 16};

  logic        clk = 0, rst_n = 0, start = 0;
  logic        tbl_we;
  logic [2:0]  tbl_idx;
  logic [31:0] tbl_branch, tbl_header;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic [LANES-1:0] done;
  int               cycles [LANES];
  int               mism   [LANES];
  int               nlb    [LANES];
  int               nredir [LANES];

  for (genvar g = 0; g < LANES; g++) begin : lane
    logic        fetch_valid, fetch_ready, fetch_resp_valid;
    logic [31:0] fetch_addr, fetch_resp_instr;
    logic        exec_valid, loop_branch_en;
    logic [31:0] exec_pc, exec_instr;
    logic        mem_req_valid, mem_req_ready, mem_resp_valid;
    logic [31:0] mem_req_addr;
    logic [63:0] mem_resp_data;
    ipf_ev_t     ev;
    int          n_req;

    ipf_top #(.PF_LINES(DIST[g])) dut (
      .clk, .rst_n,
      .mode       (g == 0 ? PF_OFF : PF_LOOP),
      .tbl_clear  (1'b0), .tbl_we, .tbl_idx, .tbl_valid(1'b1), .tbl_branch, .tbl_header,
      .fetch_valid, .fetch_ready, .fetch_addr, .fetch_resp_valid, .fetch_resp_instr,
      .exec_valid, .exec_pc, .exec_instr, .loop_branch_en,
      .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_resp_valid, .mem_resp_data,
      .ev);

    main_mem_model #(.LAT(LAT)) u_mem (
      .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
      .req_addr(mem_req_addr), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data),
      .n_req(n_req));

    core_model #(.LAT(LAT)) u_core (
      .clk, .start, .done(done[g]), .cycles(cycles[g]), .mismatches(mism[g]),
      .n_loop_branches(nlb[g]),
      .fetch_valid, .fetch_ready, .fetch_addr, .fetch_resp_valid, .fetch_resp_instr,
      .exec_valid, .exec_pc, .exec_instr, .loop_branch_en);

    initial nredir[g] = 0;
    always @(posedge clk) if (rst_n && ev.loop_redirect) nredir[g]++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_c;
    tbl_we = 0; tbl_idx = 0; tbl_branch = 0; tbl_header = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    tbl_we = 1; tbl_idx = 0;
    tbl_branch = lane[0].u_core.INNER_BR; tbl_header = lane[0].u_core.INNER_HDR;
    @(negedge clk);
    tbl_idx = 1;
    tbl_branch = lane[0].u_core.OUTER_BR; tbl_header = lane[0].u_core.OUTER_HDR;
    @(negedge clk);
    tbl_we = 0;
    start = 1;
    while (done != '1) @(negedge clk);
    ref_c = lane[0].u_core.ref_cycles();
    checks++;
    if (cycles[0] != ref_c) begin
      failures++;
      $display("no-prefetch cycles %0d, reference %0d", cycles[0], ref_c);
    end
    for (int g = 0; g < LANES; g++) begin
      checks++;
      if (mism[g] != 0) begin failures++; $display("lane %0d: %0d wrong words", g, mism[g]); end
      checks++;
      if (g != 0 && nredir[g] != nlb[g]) begin
        failures++;
        $display("lane %0d: %0d redirects for %0d loop branches", g, nredir[g], nlb[g]);
      end
      checks++;
      if (nlb[g] == 0) failures++;
      if (g == 0) $display("Base   cycles=%0d (reference %0d)", cycles[g], ref_c);
      else $display("LP-%-3d cycles=%0d normalised=%0d/1000", DIST[g], cycles[g],
                    cycles[g] * 1000 / cycles[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
