// agc_ram: erasable memory, 2048 words of 15 bits (physical 0000-3777 octal).
//
// Simple dual-port synchronous RAM in the manner of an FPGA block RAM: one
// read port and one write port, both clocked. The read address is presented
// in the decode stage and the data appears after the next clock edge, in
// execute; the write port is driven from writeback. Reading and writing one
// address in the same cycle returns the old contents. en gates both ports
// (it is the CPU clock enable), so the read data holds while the CPU is idle.
// The depth follows the printed memory map; the read-during-write behaviour
// and the lack of reset on the contents are this design's choice (contents
// start at zero in simulation).
module agc_ram
  import agc_pkg::*;
#(
  parameter int DEPTH = 2048
) (
  input  logic              clk,
  input  logic              en,
  input  logic [RAM_AW-1:0] rd_addr,
  output word_t             rd_data,
  input  logic              wr_en,
  input  logic [RAM_AW-1:0] wr_addr,
  input  word_t             wr_data
);
  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      rd_data <= mem[rd_addr];
      if (wr_en) mem[wr_addr] <= wr_data;
    end
  end

endmodule
