// tb_agc_ram: random reads and writes against an array model. Read data
// appears one clock after the address (one-cycle latency), a read of the
// address being written returns the old word, and nothing changes while en
// is low.
module tb_agc_ram;
  import agc_pkg::*;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  logic [RAM_AW-1:0] rd_addr, wr_addr;
  word_t rd_data, wr_data;
  logic wr_en;
  word_t model [2048];
  word_t expect_q;
  int checks = 0, failures = 0;

  agc_ram dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    wr_en = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    expect_q = '0;
    @(negedge clk); en = 1; @(negedge clk);
    expect_q = model[0];
    for (int it = 0; it < 20000; it++) begin
      en = ($urandom_range(0, 4) != 0);
      rd_addr = RAM_AW'($urandom_range(0, 63));
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : RAM_AW'($urandom_range(0, 63));
      wr_en = 1'($urandom_range(0, 1));
      wr_data = 15'($urandom);
      @(posedge clk);
      if (en) begin
        expect_q = model[rd_addr];
        if (wr_en) model[wr_addr] = wr_data;
      end
      #1;
      check(rd_data == expect_q, $sformatf("read %h expected %h", rd_data, expect_q));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
