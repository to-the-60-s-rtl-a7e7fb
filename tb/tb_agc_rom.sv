// tb_agc_rom: loads a 64-word image (word i = (37*i + 5) mod 2^15) from
// tb/tb_agc_rom.hex and checks both read ports: one-cycle latency,
// independent addresses, zeros beyond the image, and data held while en is
// low.
module tb_agc_rom;
  import agc_pkg::*;
  logic clk = 0, en = 0;
  always #5 clk = ~clk;
  logic [ROM_PW-1:0] addr_a, addr_b;
  word_t data_a, data_b, ea, eb;
  int checks = 0, failures = 0;

  agc_rom #(.INIT_FILE("tb/tb_agc_rom.hex")) dut (.*);

  function automatic word_t img(int i);
    return (i < 64) ? 15'((i * 37 + 5) % 32768) : '0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    addr_a = 0; addr_b = 0;
    @(negedge clk); en = 1; @(negedge clk);
    ea = img(0); eb = img(0);
    for (int it = 0; it < 2000; it++) begin
      en = ($urandom_range(0, 4) != 0);
      addr_a = ROM_PW'($urandom_range(0, 80));
      addr_b = (1'($urandom_range(0, 1))) ? ROM_PW'($urandom_range(0, 10239)) : ROM_PW'($urandom_range(0, 63));
      @(posedge clk);
      if (en) begin ea = img(int'(addr_a)); eb = img(int'(addr_b)); end
      #1;
      check(data_a == ea, $sformatf("port A %h expected %h", data_a, ea));
      check(data_b == eb, $sformatf("port B %h expected %h", data_b, eb));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
