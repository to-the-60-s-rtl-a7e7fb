// tb_agc_decoder: a table of instruction words, one or more per supported
// order and alias, with the order, operand address and read/write flags
// each must decode to; plus the orders left out, which must decode as
// flagged no-ops. Words use the original machine's octal encodings.
module tb_agc_decoder;
  import agc_pkg::*;
  word_t instr; logic ext; ctrl_t ctrl;
  int checks = 0, failures = 0;

  agc_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // flags: {rd_k, rd_a, rd_l, rd_q, rd_io, wr_k, wr_a, wr_l, wr_q, wr_io}
  task automatic t(string name, logic e, word_t w, op_e op, int k, logic [9:0] fl, logic ill = 0);
    instr = w; ext = e; #1;
    check(ctrl.op == op, $sformatf("%s: op %s", name, ctrl.op.name()));
    check(int'(ctrl.k) == k, $sformatf("%s: k %o expected %o", name, ctrl.k, k));
    check({ctrl.rd_k, ctrl.rd_a, ctrl.rd_l, ctrl.rd_q, ctrl.rd_io,
           ctrl.wr_k, ctrl.wr_a, ctrl.wr_l, ctrl.wr_q, ctrl.wr_io} == fl,
          $sformatf("%s: flags %b", name, {ctrl.rd_k, ctrl.rd_a, ctrl.rd_l, ctrl.rd_q, ctrl.rd_io,
           ctrl.wr_k, ctrl.wr_a, ctrl.wr_l, ctrl.wr_q, ctrl.wr_io}));
    check(ctrl.illegal == ill, $sformatf("%s: illegal %b", name, ctrl.illegal));
  endtask

  initial begin
    //               ext  word       op         k        rk ra rl rq ri wk wa wl wq wi
    t("TC 4321",     0, 15'o04321, OP_TC,     'o4321, 10'b00000_00010);
    t("XLQ",         0, 15'o00001, OP_XLQ,    1,      10'b00110_00110);
    t("RETURN",      0, 15'o00002, OP_RETURN, 2,      10'b00010_00000);
    t("EXTEND",      0, 15'o00006, OP_EXTEND, 6,      10'b00000_00000);
    t("INHINT",      0, 15'o00004, OP_NOP,    4,      10'b00000_00000);
    t("CCS",         0, 15'o10100, OP_NOP,    'o0100, 10'b00000_00000, 1);
    t("TCF 4100",    0, 15'o14100, OP_TCF,    'o4100, 10'b00000_00000);
    t("DAS",         0, 15'o20100, OP_NOP,    'o0100, 10'b00000_00000, 1);
    t("LXCH 100",    0, 15'o22100, OP_LXCH,   'o0100, 10'b10100_10100);
    t("ZL",          0, 15'o22007, OP_LXCH,   7,      10'b10100_10100);
    t("INCR 1401",   0, 15'o25401, OP_INCR,   'o1401, 10'b10000_10000);
    t("ADS 100",     0, 15'o26100, OP_ADS,    'o0100, 10'b11000_11000);
    t("CA 6000",     0, 15'o36000, OP_CA,     'o6000, 10'b10000_01000);
    t("NOOP=CA A",   0, 15'o30000, OP_CA,     0,      10'b10000_01000);
    t("CS 100",      0, 15'o40100, OP_CS,     'o0100, 10'b10000_01000);
    t("COM",         0, 15'o40000, OP_CS,     0,      10'b10000_01000);
    t("INDEX 101",   0, 15'o50101, OP_INDEX,  'o0101, 10'b10000_00000);
    t("RESUME",      0, 15'o50017, OP_NOP,    'o0017, 10'b00000_00000, 1);
    t("DXCH",        0, 15'o52100, OP_NOP,    'o0100, 10'b00000_00000, 1);
    t("TS 100",      0, 15'o54100, OP_TS,     'o0100, 10'b01000_10000);
    t("TCAA",        0, 15'o54005, OP_TS,     5,      10'b01000_10000);
    t("XCH 100",     0, 15'o56100, OP_XCH,    'o0100, 10'b11000_11000);
    t("AD 6001",     0, 15'o66001, OP_AD,     'o6001, 10'b11000_01000);
    t("DOUBLE",      0, 15'o60000, OP_AD,     0,      10'b11000_01000);
    t("MASK 6002",   0, 15'o76002, OP_MASK,   'o6002, 10'b11000_01000);
    t("READ 12",     1, 15'o00012, OP_READ,   'o12,   10'b01001_01000);
    t("WRITE 3",     1, 15'o01003, OP_WRITE,  3,      10'b01000_00001);
    t("RAND 11",     1, 15'o02011, OP_RAND,   'o11,   10'b01001_01000);
    t("WAND 2",      1, 15'o03002, OP_WAND,   2,      10'b01001_01001);
    t("ROR 10",      1, 15'o04010, OP_ROR,    'o10,   10'b01001_01000);
    t("WOR 4",       1, 15'o05004, OP_WOR,    4,      10'b01001_01001);
    t("RXOR 13",     1, 15'o06013, OP_RXOR,   'o13,   10'b01001_01000);
    t("EDRUPT",      1, 15'o07000, OP_NOP,    0,      10'b00000_00000, 1);
    t("DV",          1, 15'o10100, OP_NOP,    'o0100, 10'b00000_00000, 1);
    t("BZF 4200",    1, 15'o14200, OP_BZF,    'o4200, 10'b01000_00000);
    t("MSU",         1, 15'o20100, OP_NOP,    'o0100, 10'b00000_00000, 1);
    t("QXCH 100",    1, 15'o22100, OP_QXCH,   'o0100, 10'b10010_10010);
    t("ZQ",          1, 15'o22007, OP_QXCH,   7,      10'b10010_10010);
    t("AUG 100",     1, 15'o24100, OP_AUG,    'o0100, 10'b10000_10000);
    t("DIM 100",     1, 15'o26100, OP_DIM,    'o0100, 10'b10000_10000);
    t("DCA",         1, 15'o30100, OP_NOP,    'o0100, 10'b00000_00000, 1);
    t("DCS",         1, 15'o40100, OP_NOP,    'o0100, 10'b00000_00000, 1);
    t("INDEX ext",   1, 15'o50101, OP_INDEX,  'o0101, 10'b10000_00000);
    t("SU 100",      1, 15'o60100, OP_SU,     'o0100, 10'b11000_01000);
    t("BZMF 4300",   1, 15'o64300, OP_BZMF,   'o4300, 10'b01000_00000);
    t("MP 6000",     1, 15'o76000, OP_MP,     'o6000, 10'b11000_01100);
    t("SQUARE",      1, 15'o70000, OP_MP,     0,      10'b11000_01100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
