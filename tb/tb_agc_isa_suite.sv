// tb_agc_isa_suite: one test per instruction name, the way an instruction-set
// acceptance suite is run: each test executes a single instruction on the
// pipelined CPU and compares the machine state afterwards with the
// instruction-level reference model (tb_agc_model_pkg).
//
// The CPU runs with its RAM and ROM at their default sizes. Every test
// program has the same shape:
//   4000  CA/TS preamble: L, Q, erasable word 0100 and A get the test values
//         (the constants live at 6000-6003)
//   ....  the instruction under test (with EXTEND in front if it needs one)
//   ....  TCF 4300                      not-taken path
//   4200  INCR 0101; TCF 4300           taken path of branches, TC, RETURN
//   4300  TCF 4300                      halt
// Each of the 36 names (the 29 distinct orders and the 7 aliases COM,
// DOUBLE, SQUARE, ZL, ZQ, TCAA, NOOP) runs with eight sets of operands that
// mix +0, -0, +1, -1, the largest magnitudes and random words. After the
// halt the test compares A, L, Q, EBANK, FBANK, every RAM word, the output
// channels and the retired-instruction count with the model. A name passes
// when all eight runs match; the suite reports how many names passed.
module tb_agc_isa_suite;
  import agc_pkg::*;
  import tb_agc_model_pkg::*;

  localparam int RUNS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ce = 1'b1;
  always #5 clk = ~clk;

  logic [ROM_PW-1:0] rom_addr_a, rom_addr_b;
  word_t             rom_data_a, rom_data_b;
  logic [RAM_AW-1:0] ram_rd_addr, ram_wr_addr;
  word_t             ram_rd_data, ram_wr_data;
  logic              ram_wr_en;
  word_t             in_regs  [NUM_CH];
  word_t             out_regs [NUM_CH];
  logic              io_wr_strobe;
  logic [CH_W-1:0]   io_wr_ch;
  logic              retired, illegal, stall, redirect, serialize, indexed, extended;
  word_t             dbg_a, dbg_l, dbg_q;
  addr_t             dbg_pc_w;

  agc_rom u_rom (.clk, .en(ce), .addr_a(rom_addr_a), .data_a(rom_data_a),
                 .addr_b(rom_addr_b), .data_b(rom_data_b));
  agc_ram u_ram (.clk, .en(ce), .rd_addr(ram_rd_addr), .rd_data(ram_rd_data),
                 .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data));
  agc_cpu dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  agc_model mdl;
  int asm_pc;
  task automatic emit(logic [14:0] w); mdl.rom[asm_pc - 'o4000] = w; asm_pc++; endtask
  task automatic org(int a); asm_pc = a; endtask

  localparam int HALT = 'o4300;
  bit halted;
  int dut_retired;
  always @(posedge clk) begin
    if (!rst_n) begin
      halted <= 1'b0;
      dut_retired <= 0;
    end else if (retired && !halted) begin
      if (int'(dbg_pc_w) == HALT) halted <= 1'b1;
      else dut_retired <= dut_retired + 1;
    end
  end

  // one program on both the model and the CPU; returns 1 when they agree
  function automatic bit same_state(string name);
    bit ok; ok = 1;
    foreach (mdl.regs[r]) begin
      if (r == 5 || r == 7) continue;
      if (dut.u_rf.regs[r] != mdl.regs[r]) begin
        ok = 0;
        $display("  %s: reg %0d = %o, model %o", name, r, dut.u_rf.regs[r], mdl.regs[r]);
      end
    end
    for (int i = 'o20; i < 2048; i++)
      if (u_ram.mem[i] != mdl.ram[i]) begin
        ok = 0;
        $display("  %s: ram[%o] = %o, model %o", name, i, u_ram.mem[i], mdl.ram[i]);
      end
    for (int c = 0; c < 8; c++)
      if (out_regs[c] != mdl.och[c]) begin
        ok = 0;
        $display("  %s: channel %0d = %o, model %o", name, c, out_regs[c], mdl.och[c]);
      end
    return ok;
  endfunction

  task automatic run_one(string name, output bit ok);
    int guard;
    for (int i = 0; i < 10240; i++) u_rom.mem[i] = mdl.rom[i];
    for (int i = 0; i < 2048; i++) u_ram.mem[i] = '0;
    for (int i = 0; i < NUM_CH; i++) in_regs[i] = mdl.ich[i];
    guard = 0;
    while (int'(mdl.pc) != HALT && guard < 1000) begin mdl.step(); guard++; end
    @(negedge clk);
    rst_n = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    guard = 0;
    while (!halted && guard < 2000) begin @(negedge clk); guard++; end
    repeat (4) @(negedge clk);
    ok = halted && (dut_retired == mdl.steps) && same_state(name);
    if (!halted) $display("  %s: CPU did not reach the halt", name);
    else if (dut_retired != mdl.steps)
      $display("  %s: retired %0d, model %0d", name, dut_retired, mdl.steps);
  endtask

  // operands: special values first, then random words
  function automatic word_t operand(int run, int which);
    word_t sp [8];
    sp = '{15'o00000, 15'o77777, 15'o00001, 15'o77776, 15'o37777, 15'o40000, 15'o12345, 15'o54321};
    if (run < 4) return sp[(run * 3 + which) % 8];
    return 15'($urandom());
  endfunction

  // body of each test, by name
  task automatic body(string name, word_t a);
    case (name)
      "AD":     emit(AD('o100));
      "ADS":    emit(ADS('o100));
      "AUG":    begin emit(I_EXTEND); emit(AUG('o100)); end
      "BZF":    begin emit(I_EXTEND); emit(BZF('o4200)); end
      "BZMF":   begin emit(I_EXTEND); emit(BZMF('o4200)); end
      "CA":     emit(CA('o100));
      "COM":    emit(CS(0));
      "CS":     emit(CS('o100));
      "DIM":    begin emit(I_EXTEND); emit(DIM('o100)); end
      "DOUBLE": emit(AD(0));
      "EXTEND": begin emit(I_EXTEND); emit(SU('o100)); end
      "INCR":   emit(INCR('o100));
      "INDEX":  begin emit(INDEX('o102)); emit(CA('o6000)); end
      "LXCH":   emit(LXCH('o100));
      "MASK":   emit(MASK('o100));
      "MP":     begin emit(I_EXTEND); emit(MP('o100)); end
      "NOOP":   emit(CA(0));
      "QXCH":   begin emit(I_EXTEND); emit(QXCH('o100)); end
      "RAND":   begin emit(I_EXTEND); emit(IO(2, 9)); end
      "READ":   begin emit(I_EXTEND); emit(IO(0, 9)); end
      "RETURN": emit(I_RETURN);
      "ROR":    begin emit(I_EXTEND); emit(IO(4, 9)); end
      "RXOR":   begin emit(I_EXTEND); emit(IO(6, 9)); end
      "SQUARE": begin emit(I_EXTEND); emit(MP(0)); end
      "SU":     begin emit(I_EXTEND); emit(SU('o100)); end
      "TC":     emit(TC('o4200));
      "TCAA":   emit(TS(5));
      "TCF":    emit(TCF('o4200));
      "TS":     emit(TS('o100));
      "WAND":   begin emit(I_EXTEND); emit(IO(1, 3)); emit(CA('o6003));
                      emit(I_EXTEND); emit(IO(3, 3)); end
      "WOR":    begin emit(I_EXTEND); emit(IO(1, 3)); emit(CA('o6003));
                      emit(I_EXTEND); emit(IO(5, 3)); end
      "WRITE":  begin emit(I_EXTEND); emit(IO(1, 3)); end
      "XCH":    emit(XCH('o100));
      "XLQ":    emit(I_XLQ);
      "ZL":     emit(LXCH(7));
      "ZQ":     begin emit(I_EXTEND); emit(QXCH(7)); end
      default:  $display("FAIL: no body for %s", name);
    endcase
  endtask

  initial begin
    string names [36];
    int passed;
    names = '{"AD", "ADS", "AUG", "BZF", "BZMF", "CA", "COM", "CS", "DIM", "DOUBLE",
              "EXTEND", "INCR", "INDEX", "LXCH", "MASK", "MP", "NOOP", "QXCH", "RAND",
              "READ", "RETURN", "ROR", "RXOR", "SQUARE", "SU", "TC", "TCAA", "TCF", "TS",
              "WAND", "WOR", "WRITE", "XCH", "XLQ", "ZL", "ZQ"};
    for (int i = 0; i < NUM_CH; i++) in_regs[i] = '0;
    passed = 0;
    foreach (names[n]) begin
      bit all_ok; all_ok = 1;
      for (int run = 0; run < RUNS; run++) begin
        word_t a, l, q, m;
        bit ok;
        a = operand(run, 0); l = operand(run, 1); q = operand(run, 2); m = operand(run, 3);
        // jumps through A or Q must land on the taken path
        if (names[n] == "TCAA") a = 15'o04200;
        if (names[n] == "RETURN") q = 15'o04200;
        mdl = new();
        mdl.rom['o2000] = a; mdl.rom['o2001] = l; mdl.rom['o2002] = q; mdl.rom['o2003] = m;
        mdl.rom['o2004] = 15'd1;
        mdl.ich[9] = operand(run, 4);
        org('o4000);
        emit(CA('o6001)); emit(TS(1));
        emit(CA('o6002)); emit(TS(2));
        emit(CA('o6003)); emit(TS('o100));
        emit(CA('o6004)); emit(TS('o102));     // INDEX addend 1
        emit(CA('o6000));
        body(names[n], a);
        emit(TCF(HALT));
        org('o4200); emit(INCR('o101)); emit(TCF(HALT));
        org(HALT);   emit(TCF(HALT));
        run_one($sformatf("%s run %0d", names[n], run), ok);
        check(ok, $sformatf("%s run %0d (A=%o L=%o Q=%o [100]=%o)", names[n], run, a, l, q, m));
        all_ok &= ok;
      end
      passed += int'(all_ok);
    end
    $display("instruction tests passed: %0d of %0d", passed, 36);
    check(passed == 36, "every instruction test passed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
