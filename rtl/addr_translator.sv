// addr_translator: logical-to-physical address translation for the banked
// AGC memory map.
//
// A 12-bit logical address (octal 0000-7777) is split as follows:
//   0000-0017  CPU registers (register file index = addr[3:0])
//   0020-1377  unswitched erasable, RAM physical = logical
//   1400-1777  switched erasable, RAM physical = 1400 + EBANK*400 + addr[7:0]
//              (banks 0-4 land on RAM 1400-3777)
//   2000-3777  switched fixed, ROM physical = 10000 + FBANK*2000 + addr[9:0]
//              (banks 0-7 land on ROM 10000-27777)
//   4000-7777  fixed-fixed, ROM physical = logical
// ROM physical addresses run from 04000 to 27777 octal; rom_idx is that
// address minus 04000, i.e. an index into a 10240-word array.
//
// The region boundaries and the bank placements are the printed memory map.
// Where the bank number sits inside the EBANK and FBANK registers is this
// design's choice: bits 10:8 of EBANK and bits 12:10 of FBANK, the same bit
// positions the original machine used. EBANK values 5-7 fall outside the
// printed banks and wrap modulo the 2048-word RAM.
//
// Purely combinational.
module addr_translator
  import agc_pkg::*;
(
  input  addr_t              addr,
  input  word_t              ebank,   // EBANK register contents
  input  word_t              fbank,   // FBANK register contents
  output logic               is_reg,
  output logic               is_ram,
  output logic               is_rom,
  output logic [3:0]         reg_idx,
  output logic [RAM_AW-1:0]  ram_addr,
  output logic [ROM_PW-1:0]  rom_idx
);
  logic [2:0]  eb;
  logic [2:0]  fb;
  logic [14:0] rom_phys;

  assign eb = ebank[10:8];
  assign fb = fbank[12:10];

  always_comb begin
    is_reg   = 1'b0;
    is_ram   = 1'b0;
    is_rom   = 1'b0;
    reg_idx  = addr[3:0];
    ram_addr = '0;
    rom_phys = 15'o4000;
    if (addr < 12'o0020) begin
      is_reg = 1'b1;
    end else if (addr < 12'o1400) begin
      is_ram   = 1'b1;
      ram_addr = addr[RAM_AW-1:0];
    end else if (addr < 12'o2000) begin
      is_ram   = 1'b1;
      ram_addr = RAM_AW'(11'o1400 + {eb, 8'b0} + {3'b0, addr[7:0]});
    end else if (addr < 12'o4000) begin
      is_rom   = 1'b1;
      rom_phys = 15'o10000 + {2'b0, fb, 10'b0} + {5'b0, addr[9:0]};
    end else begin
      is_rom   = 1'b1;
      rom_phys = {3'b0, addr};
    end
    rom_idx = ROM_PW'(rom_phys - 15'o4000);
  end

endmodule
