// tb_prefetch_addr_mux: random select and inputs; the output valid and address must
// come from input 1 when select is high and from input 0 otherwise.
module tb_prefetch_addr_mux;
  logic        sel, in1_valid, in0_valid, out_valid;
  logic [31:0] in1, in0, out;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  prefetch_addr_mux dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      sel = 1'($urandom); in1_valid = 1'($urandom); in0_valid = 1'($urandom);
      in1 = $urandom; in0 = $urandom;
      #1;
      checks++;
      if (out_valid !== (sel ? in1_valid : in0_valid) || out !== (sel ? in1 : in0)) begin
        failures++;
        if (failures < 10) $display("t=%0d sel=%0b out=%h", t, sel, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
