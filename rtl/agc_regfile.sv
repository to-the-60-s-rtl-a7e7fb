// agc_regfile: the 16 CPU registers that occupy logical addresses 00-17 octal.
//
// Register 0 is the accumulator A, 1 is L (low product / scratch), 2 is Q
// (return address), 3 is EBANK, 4 is FBANK, 5 is Z (the program counter,
// which lives in the pipeline: reads return the value supplied on z_value and
// writes are handled as jumps by the pipeline), 6 is BB, 7 reads as zero and
// ignores writes, and 10-17 are plain storage.
//
// One general read port (rd_idx, combinational) serves the operand K; A, L,
// Q, EBANK and FBANK are also brought out directly. Writes happen on the clock
// edge when en is high: one general port (wk_*) and dedicated ports for A, L
// and Q, which an instruction such as XCH or MP uses alongside the general
// port. When two ports write the same register in one cycle, the dedicated
// port wins (in every supported order the two values are then equal).
// Reset clears all registers, so both bank registers start at bank 0.
//
// The count of 16 registers follows the document; their numbering is that of
// the original machine and beyond A, L, Q, EBANK and FBANK it is this
// design's choice.
module agc_regfile
  import agc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [3:0] rd_idx,
  output word_t      rd_data,
  input  word_t      z_value,
  input  logic       wk_en,
  input  logic [3:0] wk_idx,
  input  word_t      wk_data,
  input  logic       wa_en,
  input  word_t      wa_data,
  input  logic       wl_en,
  input  word_t      wl_data,
  input  logic       wq_en,
  input  word_t      wq_data,
  output word_t      reg_a,
  output word_t      reg_l,
  output word_t      reg_q,
  output word_t      reg_eb,
  output word_t      reg_fb
);
  word_t regs [NUM_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_REGS; i++) regs[i] <= '0;
    end else if (en) begin
      if (wk_en && wk_idx != REG_ZERO && wk_idx != REG_Z) regs[wk_idx] <= wk_data;
      if (wa_en) regs[REG_A] <= wa_data;
      if (wl_en) regs[REG_L] <= wl_data;
      if (wq_en) regs[REG_Q] <= wq_data;
    end
  end

  always_comb begin
    case (rd_idx)
      REG_ZERO: rd_data = '0;
      REG_Z:    rd_data = z_value;
      default:  rd_data = regs[rd_idx];
    endcase
  end

  assign reg_a  = regs[REG_A];
  assign reg_l  = regs[REG_L];
  assign reg_q  = regs[REG_Q];
  assign reg_eb = regs[REG_EB];
  assign reg_fb = regs[REG_FB];

endmodule
