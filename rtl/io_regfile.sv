// io_regfile: the I/O channel registers seen by the CPU.
//
// The machine has NUM_CH = 15 I/O channels, numbered 0-14. Channels below
// IN_BASE are output channels: their registers live here, inside the CPU, and
// are written by WRITE, WAND and WOR in the writeback stage (on the clock
// edge, when en is high). Channels from IN_BASE up are input channels: their
// registers live in the I/O unit and arrive on in_regs; CPU writes to them are
// ignored. The read port (rd_ch, combinational) returns either kind, and zero
// for a channel number of 15 or more. Every accepted write is reported on
// wr_strobe/wr_ch so that the I/O unit can send the new value out. Output
// registers reset to zero.
//
// The count of 15 channels is the document's; the split into 8 output and 7
// input channels and the numbering are this design's choice.
module io_regfile
  import agc_pkg::*;
#(
  parameter int IN_BASE = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [8:0]          rd_ch,
  output word_t               rd_data,
  input  logic                wr_en,
  input  logic [8:0]          wr_ch,
  input  word_t               wr_data,
  input  word_t               in_regs  [NUM_CH],
  output word_t               out_regs [NUM_CH],
  output logic                wr_strobe,
  output logic [CH_W-1:0]     wr_ch_o
);
  word_t regs [NUM_CH];   // entries from IN_BASE up stay zero

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CH; i++) regs[i] <= '0;
    end else if (en && wr_en && wr_ch < 9'(IN_BASE)) begin
      regs[wr_ch[CH_W-1:0]] <= wr_data;
    end
  end

  assign wr_strobe = en && wr_en && (wr_ch < 9'(IN_BASE));
  assign wr_ch_o   = wr_ch[CH_W-1:0];

  always_comb begin
    if (rd_ch < 9'(IN_BASE))     rd_data = regs[rd_ch[CH_W-1:0]];
    else if (rd_ch < 9'(NUM_CH)) rd_data = in_regs[rd_ch[CH_W-1:0]];
    else                         rd_data = '0;
  end

  assign out_regs = regs;

endmodule
