// agc_rom: fixed memory holding the program and its constants.
//
// 10240 words of 15 bits covering physical addresses 04000-27777 octal: the
// 2048 fixed-fixed words followed by eight switchable banks of 1024 words.
// Two synchronous read ports in the manner of an FPGA block ROM: port A
// fetches instructions (address presented in fetch, word available in
// decode), port B reads constants for the operand (address in decode, data in
// execute). Both ports are gated by en, the CPU clock enable.
// The contents come from INIT_FILE, a $readmemh image indexed from physical
// address 04000; with an empty name the ROM starts as all zeros and a test
// bench may load it directly. Size and placement follow the printed memory
// map; the file format is this design's choice.
module agc_rom
  import agc_pkg::*;
#(
  parameter int    DEPTH     = 10240,
  parameter string INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              en,
  input  logic [ROM_PW-1:0] addr_a,
  output word_t             data_a,
  input  logic [ROM_PW-1:0] addr_b,
  output word_t             data_b
);
  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      data_a <= (int'(addr_a) < DEPTH) ? mem[addr_a] : '0;
      data_b <= (int'(addr_b) < DEPTH) ? mem[addr_b] : '0;
    end
  end

endmodule
