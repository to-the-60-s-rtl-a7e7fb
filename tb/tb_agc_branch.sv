// tb_agc_branch: every order with every combination of flags, against the
// branch conditions of the instruction table.
module tb_agc_branch;
  import agc_pkg::*;
  logic valid, wr_z, sign_bit, eq_0, taken, exp_t;
  op_e op;
  int checks = 0, failures = 0;

  agc_branch dut (.*);

  initial begin
    for (int o = 0; o <= int'(OP_RXOR); o++) begin
      for (int f = 0; f < 16; f++) begin
        op = op_e'(o);
        {valid, wr_z, sign_bit, eq_0} = 4'(f);
        #1;
        case (op)
          OP_TC, OP_TCF, OP_RETURN: exp_t = 1;
          OP_BZF:  exp_t = eq_0;
          OP_BZMF: exp_t = eq_0 || sign_bit;
          default: exp_t = wr_z;
        endcase
        exp_t = exp_t && valid;
        checks++;
        if (taken !== exp_t) begin
          failures++;
          $display("FAIL: %s flags %b taken %b", op.name(), f[3:0], taken);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
