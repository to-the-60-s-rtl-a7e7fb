// tb_agc_alu: random operands for every order, checked against integer
// arithmetic: words are converted to signed values (a word with bit 14 set
// means minus its complement), the expected value computed with ordinary
// integers and converted back. Sums are kept free of overflow; an expected
// zero accepts either +0 or -0 where the one's complement adder may give -0.
module tb_agc_alu;
  import agc_pkg::*;
  op_e op; addr_t k, pc1, target;
  word_t a, l, q, m, io, a_out, l_out, q_out, k_out, io_out;
  logic sign_bit, eq_0;
  int checks = 0, failures = 0;

  agc_alu dut (.*);

  function automatic int val(word_t w);
    word_t nw;
    nw = ~w;
    return w[14] ? -int'(nw) : int'(w);
  endfunction
  function automatic word_t enc(int v);
    return (v < 0) ? ~15'(-v) : 15'(v);
  endfunction
  function automatic bit same(word_t got, int v);
    if (v == 0) return got == 15'h0 || got == 15'h7fff;
    return got == enc(v);
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic word_t rnd(int lim);
    int v;
    v = $urandom_range(0, lim);
    if (1'($urandom_range(0, 1))) v = -v;
    return enc(v);
  endfunction

  initial begin
    for (int it = 0; it < 4000; it++) begin
      a = rnd(8000); m = rnd(8000); l = 15'($urandom); q = 15'($urandom); io = 15'($urandom);
      k = addr_t'($urandom_range('o20, 'o7777)); pc1 = addr_t'($urandom);
      op = OP_AD;   #1; check(same(a_out, val(a) + val(m)), "AD");
      op = OP_SU;   #1; check(same(a_out, val(a) - val(m)), "SU");
      op = OP_ADS;  #1; check(same(a_out, val(a) + val(m)) && a_out == k_out, "ADS");
      op = OP_CS;   #1; check(same(a_out, -val(m)) || (val(m) == 0 && eq_0 == oc_is_zero(a)), "CS");
      op = OP_CA;   #1; check(a_out == m, "CA");
      op = OP_MASK; #1; check(a_out == (a & m), "MASK");
      op = OP_INCR; #1; check(same(k_out, val(m) + 1), "INCR");
      op = OP_AUG;  #1; check(same(k_out, (m[14] ? val(m) - 1 : val(m) + 1)), $sformatf("AUG %o -> %o", m, k_out));
      op = OP_DIM;  #1; check(same(k_out, (val(m) > 0) ? val(m) - 1 : (val(m) < 0) ? val(m) + 1 : 0), $sformatf("DIM %o -> %o", m, k_out));
      op = OP_MP;   #1;
      begin
        longint p; int hi, lo; bit neg;
        p = longint'(val(a)) * longint'(val(m));
        neg = p < 0; if (neg) p = -p;
        hi = int'(p >> 14); lo = int'(p & 'h3fff);
        check(a_out == (neg ? ~15'(hi) : 15'(hi)) && l_out == (neg ? ~15'(lo) : 15'(lo)),
              $sformatf("MP %o * %o = %o %o", a, m, a_out, l_out));
      end
      op = OP_XCH;  #1; check(a_out == m && k_out == a, "XCH");
      op = OP_LXCH; #1; check(l_out == m && k_out == l, "LXCH");
      op = OP_QXCH; #1; check(q_out == m && k_out == q, "QXCH");
      op = OP_TS;   #1; check(k_out == a && target == k, "TS");
      op = OP_XLQ;  #1; check(l_out == q && q_out == l, "XLQ");
      op = OP_TC;   #1; check(q_out == word_t'(pc1) && target == k, "TC");
      op = OP_RETURN; #1; check(target == q[11:0], "RETURN");
      op = OP_READ; #1; check(a_out == io, "READ");
      op = OP_WRITE; #1; check(io_out == a, "WRITE");
      op = OP_RAND; #1; check(a_out == (a & io), "RAND");
      op = OP_WAND; #1; check(a_out == (a & io) && io_out == (a & io), "WAND");
      op = OP_ROR;  #1; check(a_out == (a | io), "ROR");
      op = OP_WOR;  #1; check(a_out == (a | io) && io_out == (a | io), "WOR");
      op = OP_RXOR; #1; check(a_out == (a ^ io), "RXOR");
      check(sign_bit == (val(a) < 0 || a == 15'h7fff) && eq_0 == (val(a) == 0), "flags");
      k = 5; op = OP_TS; #1; check(target == a[11:0], "TS Z jumps to A");
    end
    // zero cases
    a = 15'h7fff; m = 15'd0; op = OP_AD; #1; check(eq_0, "eq_0 on -0");
    a = 15'd0; #1; check(eq_0 && !sign_bit, "eq_0 on +0");
    m = 15'd0; op = OP_DIM; #1; check(k_out == 15'd0, "DIM leaves +0");
    m = 15'h7fff; #1; check(k_out == 15'h7fff, "DIM leaves -0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
