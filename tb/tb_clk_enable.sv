// tb_clk_enable: with the default divider of 10 (50 MHz to 5 MHz) the enable
// must be high for exactly one board-clock cycle in every 10, the first time
// 10 cycles after reset is released.
module tb_clk_enable;
  logic clk = 0, rst_n = 0, ce;
  always #10 clk = ~clk;   // 50 MHz
  int checks = 0, failures = 0, n = 0, last = -1, first = -1;

  clk_enable dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 1; c <= 1000; c++) begin
      @(posedge clk); #1;
      if (ce) begin
        n++;
        if (first < 0) first = c;
        if (last >= 0) begin
          checks++;
          if (c - last != 10) begin failures++; $display("FAIL: period %0d", c - last); end
        end
        last = c;
      end
    end
    checks++; if (n != 100) begin failures++; $display("FAIL: %0d enables in 1000 cycles", n); end
    checks++; if (first != 10) begin failures++; $display("FAIL: first enable at cycle %0d", first); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
