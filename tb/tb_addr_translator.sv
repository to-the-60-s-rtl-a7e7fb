// tb_addr_translator: checks the logical-to-physical mapping against the
// printed memory map, for every logical address and every bank number:
// registers below 0020, erasable 0020-1377 unchanged, switched erasable bank
// b at 1400/2000/2400/3000/3400 for b = 0..4, switched fixed bank b at
// 10000 + b*2000, fixed-fixed 4000-7777 unchanged (ROM index = physical - 4000).
module tb_addr_translator;
  import agc_pkg::*;
  addr_t a; word_t eb, fb;
  logic is_reg, is_ram, is_rom;
  logic [3:0] reg_idx;
  logic [RAM_AW-1:0] ram_addr;
  logic [ROM_PW-1:0] rom_idx;
  int checks = 0, failures = 0;
  int ebase [5] = '{'o1400, 'o2000, 'o2400, 'o3000, 'o3400};

  addr_translator dut (.addr(a), .ebank(eb), .fbank(fb), .*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int b = 0; b < 8; b++) begin
      eb = 15'(b << 8) | 15'($urandom & 'o70377 & ~'o3400);
      fb = 15'(b << 10) | 15'($urandom & 'o60000 & ~'o16000);
      for (int i = 0; i < 4096; i++) begin
        a = addr_t'(i);
        #1;
        if (i < 'o20) begin
          check(is_reg && !is_ram && !is_rom && reg_idx == i[3:0], $sformatf("reg %o", i));
        end else if (i < 'o1400) begin
          check(!is_reg && is_ram && !is_rom && int'(ram_addr) == i, $sformatf("erasable %o", i));
        end else if (i < 'o2000) begin
          if (b < 5)
            check(is_ram && int'(ram_addr) == ebase[b] + (i - 'o1400), $sformatf("ebank %0d %o -> %o", b, i, ram_addr));
          else
            check(is_ram, $sformatf("ebank %0d %o is RAM", b, i));
        end else if (i < 'o4000) begin
          check(is_rom && !is_ram && !is_reg && int'(rom_idx) == 'o10000 + b * 'o2000 + (i - 'o2000) - 'o4000,
                $sformatf("fbank %0d %o -> %o", b, i, rom_idx));
        end else begin
          check(is_rom && int'(rom_idx) == i - 'o4000, $sformatf("fixed %o", i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
