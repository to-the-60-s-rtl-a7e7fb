// tb_io_unit: the I/O unit on its own. Frames arriving on the receive byte
// port must land in the input channel registers; output channel writes
// reported by the CPU side must leave on the transmit byte port as frames
// with the channel's value.
module tb_io_unit;
  import agc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t out_regs [NUM_CH];
  word_t in_regs [NUM_CH];
  logic wr_strobe = 0; logic [CH_W-1:0] wr_ch = 0;
  logic [7:0] tx_data; logic tx_valid, tx_ready = 1;
  logic rx_valid = 0; logic [7:0] rx_data = 0; logic rx_dropped;
  int checks = 0, failures = 0;
  logic [7:0] got [$];

  io_unit dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic send(logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_data = b;
    @(negedge clk); rx_valid = 0;
  endtask

  always @(posedge clk) if (rst_n && tx_valid && tx_ready) got.push_back(tx_data);

  initial begin
    foreach (out_regs[i]) out_regs[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int c; word_t w;
      // receive path
      c = $urandom_range(8, 14); w = 15'($urandom);
      send({1'b1, w[14], 2'b00, 4'(c)}); send({1'b0, w[13:7]}); send({1'b0, w[6:0]});
      @(negedge clk);
      check(in_regs[c] == w, $sformatf("input channel %0d = %o, sent %o", c, in_regs[c], w));
      // transmit path
      c = $urandom_range(0, 7); w = 15'($urandom);
      got.delete();
      out_regs[c] = w; wr_ch = CH_W'(c); wr_strobe = 1;
      @(negedge clk); wr_strobe = 0;
      tx_ready = 1'($urandom_range(0, 1));
      repeat (12) @(negedge clk);
      tx_ready = 1;
      repeat (6) @(negedge clk);
      check(got.size() == 3 && got[0] == {1'b1, w[14], 2'b00, 4'(c)} &&
            got[1] == {1'b0, w[13:7]} && got[2] == {1'b0, w[6:0]},
            $sformatf("frame for channel %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
