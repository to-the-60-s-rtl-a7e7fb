// tb_uart_tx_framer: the CPU side writes random output channels at random
// times while the byte sink accepts bytes with random back-pressure. Frames
// are decoded independently ({1,w14,00,ch}, {0,w[13:7]}, {0,w[6:0]}) and
// checked: every frame carries a value the channel held, frames are always
// well formed, and after the writes stop the last value of every written
// channel is the last one sent. Writes to input channels send nothing.
module tb_uart_tx_framer;
  import agc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_strobe = 0; logic [CH_W-1:0] wr_ch = 0;
  word_t out_regs [NUM_CH];
  logic [7:0] tx_data; logic tx_valid, tx_ready = 0;
  int checks = 0, failures = 0;
  word_t last_sent [NUM_CH];
  bit    sent_any [NUM_CH];
  bit    written [NUM_CH];
  int    nbytes = 0, nframes = 0;
  logic [7:0] fb [3];

  uart_tx_framer dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      fb[nbytes % 3] = tx_data;
      nbytes++;
      if (nbytes % 3 == 0) begin
        int ch; word_t w;
        check(fb[0][7] && !fb[1][7] && !fb[2][7] && fb[0][5:4] == 2'b00, "frame format");
        ch = int'(fb[0][3:0]);
        w = {fb[0][6], fb[1][6:0], fb[2][6:0]};
        check(ch < 8 && written[ch], $sformatf("frame for channel %0d that was not written", ch));
        last_sent[ch] = w; sent_any[ch] = 1;
        nframes++;
      end
    end
  end

  initial begin
    foreach (out_regs[i]) begin out_regs[i] = '0; last_sent[i] = '0; sent_any[i] = 0; written[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      tx_ready = $urandom_range(0, 2) == 0;
      wr_strobe = 0;
      if ($urandom_range(0, 9) == 0) begin
        int c; c = $urandom_range(0, 14);
        if (c < 8) begin out_regs[c] = 15'($urandom); written[c] = 1; end
        wr_ch = CH_W'(c); wr_strobe = 1;
      end
    end
    @(negedge clk); wr_strobe = 0;
    repeat (400) begin @(negedge clk); tx_ready = 1'($urandom_range(0, 1)); end
    tx_ready = 1;
    repeat (100) @(negedge clk);
    check(!tx_valid, "framer idle at the end");
    check(nbytes % 3 == 0, "whole frames only");
    for (int c = 0; c < 8; c++)
      if (written[c]) check(sent_any[c] && last_sent[c] == out_regs[c],
                            $sformatf("channel %0d last sent %o, holds %o", c, last_sent[c], out_regs[c]));
    check(nframes > 50, $sformatf("%0d frames sent", nframes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
