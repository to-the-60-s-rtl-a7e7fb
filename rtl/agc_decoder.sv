// agc_decoder: turns a 15-bit instruction word into the control word that
// travels down the pipeline.
//
// Word layout (bit 14 is the most significant): order code in bits 14:12,
// address K in bits 11:0, quarter code in bits 11:10 for orders that address
// erasable memory only (their K is then bits 9:0). ext is high when the
// previous instruction was EXTEND and selects the extended order table.
// Supported basic orders: TC (with XLQ = TC 1, RETURN = TC 2, EXTEND = TC 6),
// TCF, LXCH, INCR, ADS, CA, CS, INDEX, TS, XCH, AD, MASK. Extended: READ,
// WRITE, RAND, WAND, ROR, WOR, RXOR (I/O channel in bits 8:0), BZF, QXCH, AUG,
// DIM, INDEX, SU, BZMF, MP. The document's remaining named instructions are
// the original machine's aliases and decode here as such: COM = CS A,
// DOUBLE = AD A, SQUARE = MP A, ZL = LXCH 7, ZQ = QXCH 7, TCAA = TS Z,
// NOOP = CA A (or TCF to the next word). Orders the design leaves out (CCS,
// DAS, DXCH, DV, MSU, DCA, DCS, EDRUPT, RESUME) and TC 0/3/4/5/7 execute as
// no-ops; the excluded ones raise ctrl.illegal.
//
// The subset of orders is the document's; the binary encodings are those of
// the original machine, which the document's assembler targets.
// Purely combinational.
module agc_decoder
  import agc_pkg::*;
(
  input  word_t instr,
  input  logic  ext,
  output ctrl_t ctrl
);
  logic [2:0] opc;
  logic [1:0] qc;
  addr_t      k12;
  addr_t      k10;

  assign opc = instr[14:12];
  assign qc  = instr[11:10];
  assign k12 = instr[11:0];
  assign k10 = {2'b00, instr[9:0]};

  always_comb begin
    ctrl    = '0;
    ctrl.op = OP_NOP;
    ctrl.k  = k12;
    if (!ext) begin
      unique case (opc)
        3'd0: begin
          unique case (k12)
            12'd1: begin ctrl.op = OP_XLQ; ctrl.rd_l = 1'b1; ctrl.rd_q = 1'b1;
                         ctrl.wr_l = 1'b1; ctrl.wr_q = 1'b1; end
            12'd2: begin ctrl.op = OP_RETURN; ctrl.rd_q = 1'b1; end
            12'd6: ctrl.op = OP_EXTEND;
            12'd0, 12'd3, 12'd4, 12'd5, 12'd7: ctrl.op = OP_NOP;
            default: begin ctrl.op = OP_TC; ctrl.wr_q = 1'b1; end
          endcase
        end
        3'd1: begin
          if (qc == 2'd0) ctrl.illegal = 1'b1;            // CCS
          else ctrl.op = OP_TCF;
        end
        3'd2: begin
          ctrl.k = k10;
          unique case (qc)
            2'd0: ctrl.illegal = 1'b1;                    // DAS
            2'd1: begin ctrl.op = OP_LXCH; ctrl.rd_k = 1'b1; ctrl.rd_l = 1'b1;
                        ctrl.wr_k = 1'b1; ctrl.wr_l = 1'b1; end
            2'd2: begin ctrl.op = OP_INCR; ctrl.rd_k = 1'b1; ctrl.wr_k = 1'b1; end
            2'd3: begin ctrl.op = OP_ADS; ctrl.rd_k = 1'b1; ctrl.rd_a = 1'b1;
                        ctrl.wr_k = 1'b1; ctrl.wr_a = 1'b1; end
          endcase
        end
        3'd3: begin ctrl.op = OP_CA; ctrl.rd_k = 1'b1; ctrl.wr_a = 1'b1; end
        3'd4: begin ctrl.op = OP_CS; ctrl.rd_k = 1'b1; ctrl.wr_a = 1'b1; end
        3'd5: begin
          ctrl.k = k10;
          unique case (qc)
            2'd0: begin
              if (k10 == 12'o17) ctrl.illegal = 1'b1;     // RESUME
              else begin ctrl.op = OP_INDEX; ctrl.rd_k = 1'b1; end
            end
            2'd1: ctrl.illegal = 1'b1;                    // DXCH
            2'd2: begin ctrl.op = OP_TS; ctrl.rd_a = 1'b1; ctrl.wr_k = 1'b1; end
            2'd3: begin ctrl.op = OP_XCH; ctrl.rd_k = 1'b1; ctrl.rd_a = 1'b1;
                        ctrl.wr_k = 1'b1; ctrl.wr_a = 1'b1; end
          endcase
        end
        3'd6: begin ctrl.op = OP_AD; ctrl.rd_k = 1'b1; ctrl.rd_a = 1'b1; ctrl.wr_a = 1'b1; end
        3'd7: begin ctrl.op = OP_MASK; ctrl.rd_k = 1'b1; ctrl.rd_a = 1'b1; ctrl.wr_a = 1'b1; end
      endcase
    end else begin
      unique case (opc)
        3'd0: begin
          ctrl.k = {3'b000, instr[8:0]};
          ctrl.rd_a = 1'b1;
          unique case (instr[11:9])
            3'd0: begin ctrl.op = OP_READ;  ctrl.rd_io = 1'b1; ctrl.wr_a = 1'b1; end
            3'd1: begin ctrl.op = OP_WRITE; ctrl.wr_io = 1'b1; end
            3'd2: begin ctrl.op = OP_RAND;  ctrl.rd_io = 1'b1; ctrl.wr_a = 1'b1; end
            3'd3: begin ctrl.op = OP_WAND;  ctrl.rd_io = 1'b1; ctrl.wr_a = 1'b1; ctrl.wr_io = 1'b1; end
            3'd4: begin ctrl.op = OP_ROR;   ctrl.rd_io = 1'b1; ctrl.wr_a = 1'b1; end
            3'd5: begin ctrl.op = OP_WOR;   ctrl.rd_io = 1'b1; ctrl.wr_a = 1'b1; ctrl.wr_io = 1'b1; end
            3'd6: begin ctrl.op = OP_RXOR;  ctrl.rd_io = 1'b1; ctrl.wr_a = 1'b1; end
            3'd7: begin ctrl.rd_a = 1'b0; ctrl.illegal = 1'b1; end   // EDRUPT
          endcase
        end
        3'd1: begin
          if (qc == 2'd0) ctrl.illegal = 1'b1;            // DV
          else begin ctrl.op = OP_BZF; ctrl.rd_a = 1'b1; end
        end
        3'd2: begin
          ctrl.k = k10;
          unique case (qc)
            2'd0: ctrl.illegal = 1'b1;                    // MSU
            2'd1: begin ctrl.op = OP_QXCH; ctrl.rd_k = 1'b1; ctrl.rd_q = 1'b1;
                        ctrl.wr_k = 1'b1; ctrl.wr_q = 1'b1; end
            2'd2: begin ctrl.op = OP_AUG; ctrl.rd_k = 1'b1; ctrl.wr_k = 1'b1; end
            2'd3: begin ctrl.op = OP_DIM; ctrl.rd_k = 1'b1; ctrl.wr_k = 1'b1; end
          endcase
        end
        3'd3, 3'd4: ctrl.illegal = 1'b1;                  // DCA, DCS
        3'd5: begin ctrl.op = OP_INDEX; ctrl.rd_k = 1'b1; end
        3'd6: begin
          if (qc == 2'd0) begin
            ctrl.op = OP_SU; ctrl.k = k10; ctrl.rd_k = 1'b1; ctrl.rd_a = 1'b1; ctrl.wr_a = 1'b1;
          end else begin
            ctrl.op = OP_BZMF; ctrl.rd_a = 1'b1;
          end
        end
        3'd7: begin ctrl.op = OP_MP; ctrl.rd_k = 1'b1; ctrl.rd_a = 1'b1;
                    ctrl.wr_a = 1'b1; ctrl.wr_l = 1'b1; end
      endcase
    end
  end

endmodule
