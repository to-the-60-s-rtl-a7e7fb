// tb_perf_counters: random ce and retired pulses; the counters must equal
// the number of pulses seen since the last clear.
module tb_perf_counters;
  logic clk = 0, rst_n = 0, ce = 0, clear = 0, retired = 0;
  always #5 clk = ~clk;
  logic [31:0] cycles, instrs;
  int nc = 0, ni = 0;
  int checks = 0, failures = 0;

  perf_counters dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      ce = 1'($urandom_range(0, 1));
      retired = ce && $urandom_range(0, 4) != 0;
      clear = ($urandom_range(0, 999) == 0);
      @(posedge clk);
      if (clear) begin nc = 0; ni = 0; end
      else begin nc += int'(ce); ni += int'(retired); end
      #1;
      checks++;
      if (cycles != 32'(nc) || instrs != 32'(ni)) begin
        failures++;
        if (failures < 10) $display("FAIL: cycles %0d/%0d instrs %0d/%0d", cycles, nc, instrs, ni);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
