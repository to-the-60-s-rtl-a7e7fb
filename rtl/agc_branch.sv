// agc_branch: branching logic of the execute stage.
//
// Decides whether the instruction in execute changes the flow of control.
// TC, TCF, RETURN and any write to the Z register always do; BZF does when A
// is zero (+0 or -0, flag eq_0); BZMF does when A is zero or negative
// (eq_0 or sign_bit). The target itself comes from the ALU. taken is
// qualified with valid so that a bubble never branches. Purely combinational.
// The conditions are those of the document's instruction table; treating a
// write to Z as a jump is the original machine's behaviour, which the
// document's TCAA (PC = A) relies on.
module agc_branch
  import agc_pkg::*;
(
  input  logic  valid,
  input  op_e   op,
  input  logic  wr_z,
  input  logic  sign_bit,
  input  logic  eq_0,
  output logic  taken
);
  always_comb begin
    unique case (op)
      OP_TC, OP_TCF, OP_RETURN: taken = 1'b1;
      OP_BZF:                   taken = eq_0;
      OP_BZMF:                  taken = eq_0 | sign_bit;
      default:                  taken = wr_z;
    endcase
    taken = taken & valid;
  end
endmodule
