// tb_uart_rx_parser: sends frames for random channels and values, mixed with
// stray data bytes and truncated frames (each followed by a new header),
// with random gaps between bytes.
// Every complete frame for an input channel (8-14) must produce exactly one
// write with the encoded value; frames for other channels, stray bytes and
// truncated frames must produce none.
module tb_uart_rx_parser;
  import agc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_valid = 0; logic [7:0] rx_data = 0;
  logic wr_en; logic [CH_W-1:0] wr_ch; word_t wr_data; logic dropped;
  int checks = 0, failures = 0;
  int exp_ch [$]; word_t exp_w [$];
  int nwr = 0, ndrop = 0;
  bit prev_trunc = 0;

  uart_rx_parser dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic send(logic [7:0] b);
    repeat ($urandom_range(0, 3)) @(negedge clk);
    rx_valid = 1; rx_data = b;
    @(negedge clk);
    rx_valid = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && dropped) ndrop++;
    if (rst_n && wr_en) begin
      nwr++;
      if (exp_ch.size() == 0) check(0, $sformatf("unexpected write ch %0d %o at %0t", wr_ch, wr_data, $time));
      else begin
        int c; word_t w;
        c = exp_ch.pop_front(); w = exp_w.pop_front();
        check(int'(wr_ch) == c && wr_data == w, $sformatf("write ch %0d %o, expected ch %0d %o", wr_ch, wr_data, c, w));
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      int c, kind; word_t w;
      c = $urandom_range(0, 15); w = 15'($urandom); kind = $urandom_range(0, 9);
      // a stray data byte right after a truncated frame would complete it
      if (kind == 0 && prev_trunc) kind = 2;
      prev_trunc = (kind == 1);
      if (kind == 0) send({1'b0, 7'($urandom)});                            // stray data byte
      else if (kind == 1) begin send({1'b1, w[14], 2'b00, 4'(c)}); send({1'b0, w[13:7]}); end  // truncated
      else begin
        if (c >= 8 && c < 15) begin exp_ch.push_back(c); exp_w.push_back(w); end
        send({1'b1, w[14], 2'b00, 4'(c)});
        send({1'b0, w[13:7]});
        send({1'b0, w[6:0]});
      end
    end
    repeat (5) @(negedge clk);
    check(exp_ch.size() == 0, $sformatf("%0d frames never written", exp_ch.size()));
    check(nwr > 200 && ndrop > 50, $sformatf("%0d writes, %0d drops", nwr, ndrop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
