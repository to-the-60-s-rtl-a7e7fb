// tb_io_regfile: random channel writes and reads against a model: output
// channels 0-7 store CPU writes (when en is high) and report them on the
// strobe, input channels 8-14 read the I/O unit's registers and ignore CPU
// writes, channels 15 and up read zero.
module tb_io_regfile;
  import agc_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  always #5 clk = ~clk;
  logic [8:0] rd_ch, wr_ch;
  word_t rd_data, wr_data;
  logic wr_en, wr_strobe;
  word_t in_regs [NUM_CH];
  word_t out_regs [NUM_CH];
  logic [CH_W-1:0] wr_ch_o;
  word_t model [8];
  int checks = 0, failures = 0;

  io_regfile dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    foreach (in_regs[i]) in_regs[i] = 15'($urandom);
    wr_en = 0; wr_ch = 0; wr_data = 0; rd_ch = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      en = $urandom_range(0, 3) != 0;
      wr_en = 1'($urandom_range(0, 1));
      wr_ch = 9'($urandom_range(0, 20));
      wr_data = 15'($urandom);
      #1;
      check(wr_strobe == (en && wr_en && wr_ch < 8) && (!wr_strobe || wr_ch_o == wr_ch[3:0]), "strobe");
      @(posedge clk);
      if (en && wr_en && wr_ch < 8) model[wr_ch[2:0]] = wr_data;
      #1;
      in_regs[$urandom_range(8, 14)] = 15'($urandom);
      for (int c = 0; c < 20; c++) begin
        rd_ch = 9'(c); #0.1;
        if (c < 8) check(rd_data == model[c] && out_regs[c] == model[c], $sformatf("out ch %0d", c));
        else if (c < 15) check(rd_data == in_regs[c], $sformatf("in ch %0d", c));
        else check(rd_data == '0, $sformatf("ch %0d reads 0", c));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
