// agc_alu: the execute-stage arithmetic of the AGC-style CPU.
//
// Given the decoded order and its operands it produces every value the order
// writes back: the new A, L and Q, the value stored at K, the value written
// to an I/O channel and the jump target. All arithmetic is 15-bit one's
// complement: additions use an end-around carry, subtraction adds the
// inverted operand, and the multiplier works on sign and 14-bit magnitude.
// MP leaves a double-length product, high word in A and low word in L, each
// carrying the product's sign (a zero product is +0 in both words). The
// flags sign_bit (bit 14 of A) and eq_0 (A is +0 or -0) feed the branching
// logic. INDEX passes its operand out on k_out as the addend for the next
// instruction. Purely combinational.
//
// The operations follow the document's instruction table. Where the table
// gives DIM the same text as AUG, this design implements DIM as the original
// machine does (decrease the magnitude, leave zero alone). TC saves the
// address of the following instruction in Q.
module agc_alu
  import agc_pkg::*;
(
  input  op_e   op,
  input  addr_t k,
  input  word_t a,
  input  word_t l,
  input  word_t q,
  input  word_t m,        // operand read from K
  input  word_t io,       // I/O channel value
  input  addr_t pc1,      // address of the following instruction
  output word_t a_out,
  output word_t l_out,
  output word_t q_out,
  output word_t k_out,
  output word_t io_out,
  output addr_t target,
  output logic  sign_bit,
  output logic  eq_0
);
  logic        sp;
  logic [13:0] ma, mm;
  logic [27:0] mag;
  word_t       hi, lo;

  // sign-magnitude multiply
  always_comb begin
    ma  = a[14] ? ~a[13:0] : a[13:0];
    mm  = m[14] ? ~m[13:0] : m[13:0];
    mag = ma * mm;
    sp  = (a[14] ^ m[14]) && (mag != '0);
    hi  = {1'b0, mag[27:14]};
    lo  = {1'b0, mag[13:0]};
    if (sp) begin
      hi = ~hi;
      lo = ~lo;
    end
  end

  assign sign_bit = a[14];
  assign eq_0     = oc_is_zero(a);

  always_comb begin
    a_out  = a;
    l_out  = l;
    q_out  = q;
    k_out  = m;
    io_out = io;
    target = k;
    unique case (op)
      OP_TC:     q_out = word_t'(pc1);
      OP_RETURN: target = q[ADDR_W-1:0];
      OP_XLQ:    begin l_out = q; q_out = l; end
      OP_CA:     a_out = m;
      OP_CS:     a_out = oc_neg(m);
      OP_AD:     a_out = oc_add(a, m);
      OP_SU:     a_out = oc_add(a, oc_neg(m));
      OP_MASK:   a_out = a & m;
      OP_MP:     begin a_out = hi; l_out = lo; end
      OP_LXCH:   begin l_out = m; k_out = l; end
      OP_QXCH:   begin q_out = m; k_out = q; end
      OP_XCH:    begin a_out = m; k_out = a; end
      OP_TS:     k_out = a;
      OP_INCR:   k_out = oc_add(m, OC_ONE);
      OP_ADS:    begin a_out = oc_add(a, m); k_out = oc_add(a, m); end
      OP_AUG:    k_out = m[14] ? oc_add(m, OC_MONE) : oc_add(m, OC_ONE);
      OP_DIM:    k_out = oc_is_zero(m) ? m : (m[14] ? oc_add(m, OC_ONE) : oc_add(m, OC_MONE));
      OP_READ:   a_out = io;
      OP_WRITE:  io_out = a;
      OP_RAND:   a_out = a & io;
      OP_WAND:   begin a_out = a & io; io_out = a & io; end
      OP_ROR:    a_out = a | io;
      OP_WOR:    begin a_out = a | io; io_out = a | io; end
      OP_RXOR:   a_out = a ^ io;
      default:   ;
    endcase
    // a write to Z (for example TS Z, which is TCAA) jumps to the value written
    if (k == addr_t'(REG_Z) && (op == OP_TS || op == OP_XCH || op == OP_LXCH ||
        op == OP_QXCH || op == OP_INCR || op == OP_ADS || op == OP_AUG || op == OP_DIM))
      target = k_out[ADDR_W-1:0];
  end

endmodule
