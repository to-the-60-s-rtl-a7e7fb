// tb_agc_cpu: self-checking test of the pipelined CPU core with its RAM and
// ROM.
//
// Every program runs twice: on the CPU and on the instruction-level
// reference model in tb_agc_model_pkg. Programs end in a jump-to-self; once
// the CPU's writeback reaches that address the test compares the registers,
// all RAM words, the output channels and the number of retired instructions
// with the model. On top of that:
//   - timing: independent instructions retire one per cycle; a
//     read-after-write on A right behind its writer stalls decode 2 cycles;
//     a taken branch costs one bubble;
//   - a directed program covering branches (BZF, BZMF, TC/RETURN, TCF, TS Z),
//     INDEX, EXTEND, bank switching of fixed and erasable memory, MP and the
//     I/O orders, with a few results worked out by hand;
//   - random straight-line programs over registers, RAM and channels, run
//     once with the clock enable always high and once with it toggling.
module tb_agc_cpu;
  import agc_pkg::*;
  import tb_agc_model_pkg::*;

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
  logic retired, illegal, stall, redirect, serialize, indexed, extended;
  word_t dbg_a, dbg_l, dbg_q;
  addr_t dbg_pc_w;

  agc_rom u_rom (.clk, .en(ce), .addr_a(rom_addr_a), .data_a(rom_data_a),
                 .addr_b(rom_addr_b), .data_b(rom_data_b));
  agc_ram u_ram (.clk, .en(ce), .rd_addr(ram_rd_addr), .rd_data(ram_rd_data),
                 .wr_en(ram_wr_en), .wr_addr(ram_wr_addr), .wr_data(ram_wr_data));
  agc_cpu dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_redirect = 0, n_serialize = 0, n_indexed = 0, n_extended = 0;
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall) n_stall <= n_stall + 1;
    if (redirect) n_redirect <= n_redirect + 1;
    if (serialize) n_serialize <= n_serialize + 1;
    if (indexed) n_indexed <= n_indexed + 1;
    if (extended) n_extended <= n_extended + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  agc_model mdl;
  int asm_pc;

  task automatic emit(logic [14:0] w);
    mdl.rom[asm_pc - 'o4000] = w;
    asm_pc++;
  endtask
  task automatic org(int a); asm_pc = a; endtask
  task automatic word_at(int rom_idx, logic [14:0] w); mdl.rom[rom_idx] = w; endtask

  // counts retirements of the DUT (one per clock with retired high)
  int dut_retired = 0;
  int halt_addr = -1;
  bit halted = 0;
  int halt_cycle = 0;
  int ret_cyc [int];   // cycle at which each address first retired
  always @(posedge clk) begin
    if (retired && rst_n && !ret_cyc.exists(int'(dbg_pc_w))) ret_cyc[int'(dbg_pc_w)] = cyc;
    if (!rst_n) begin
      dut_retired <= 0;
      halted <= 0;
    end else if (retired && !halted) begin
      if (int'(dbg_pc_w) == halt_addr) begin
        halted <= 1;
        halt_cycle <= cyc;
      end else begin
        dut_retired <= dut_retired + 1;
      end
    end
  end

  task automatic run_prog(int halt, string name, bit random_ce);
    int guard;
    for (int i = 0; i < 10240; i++) u_rom.mem[i] = mdl.rom[i];
    for (int i = 0; i < 2048; i++) u_ram.mem[i] = '0;
    for (int i = 0; i < NUM_CH; i++) in_regs[i] = mdl.ich[i];
    guard = 0;
    while (int'(mdl.pc) != halt && guard < 100000) begin mdl.step(); guard++; end
    check(guard < 100000, {name, ": model reached halt"});
    halt_addr = halt;
    @(negedge clk);
    ret_cyc.delete();
    rst_n = 1'b0; ce = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    guard = 0;
    while (!halted && guard < 200000) begin
      @(negedge clk);
      ce = random_ce ? ($urandom_range(0, 2) != 0) : 1'b1;
      guard++;
    end
    ce = 1'b1;
    repeat (4) @(negedge clk);
    check(halted, {name, ": CPU reached halt"});
    check(dut_retired == mdl.steps,
          $sformatf("%s: retired %0d, model %0d", name, dut_retired, mdl.steps));
    for (int r = 0; r < 16; r++) begin
      if (r == 5 || r == 7) continue;
      check(dut.u_rf.regs[r] == mdl.regs[r],
            $sformatf("%s: reg %0d = %o, model %o", name, r, dut.u_rf.regs[r], mdl.regs[r]));
    end
    begin
      int bad; bad = 0;
      for (int i = 'o20; i < 2048; i++) if (u_ram.mem[i] != mdl.ram[i]) begin
        if (bad < 4) $display("  ram[%o] = %o, model %o", i, u_ram.mem[i], mdl.ram[i]);
        bad++;
      end
      check(bad == 0, $sformatf("%s: %0d RAM words differ", name, bad));
    end
    for (int c = 0; c < 8; c++)
      check(out_regs[c] == mdl.och[c],
            $sformatf("%s: channel %0d = %o, model %o", name, c, out_regs[c], mdl.och[c]));
  endtask

  // ---------------------------------------------------------------- programs
  task automatic prog_timing();
    int t_first, t_last, s0, r0;
    mdl = new();
    org('o4000);
    for (int i = 0; i < 20; i++) emit(CA('o6000 + i));   // independent loads
    emit(TCF('o4024));
    for (int i = 0; i < 20; i++) word_at('o2000 + i, 15'(i * 3 + 1));
    halt_addr = 'o4024;
    run_prog('o4024, "timing", 0);
    check(mdl.regs[0] == 15'(19 * 3 + 1), "timing: last load value by hand");
    check(n_stall == 0, $sformatf("timing: independent loads stalled %0d times", n_stall));
    check(ret_cyc['o4023] - ret_cyc['o4000] == 19,
          $sformatf("timing: 20 independent instructions took %0d cycles to retire, expected 19",
                    ret_cyc['o4023] - ret_cyc['o4000] + 1));
  endtask

  task automatic prog_stall();
    int s0;
    mdl = new();
    org('o4000);
    emit(CA('o6000));      // A = 5
    emit(AD('o6001));      // needs A from the previous instruction: 2 stall cycles
    emit(TS('o0100));
    emit(CA('o6000));
    emit(I_EXTEND);        // EXTEND between writer and reader hides one cycle
    emit(SU('o0100));
    emit(TCF('o4006));
    word_at('o2000, 15'd5);
    word_at('o2001, 15'd3);
    s0 = n_stall;
    run_prog('o4006, "stall", 0);
    check(mdl.regs[0] == ~15'd3, "stall: 5 - 8 = -3 by hand");
    // AD: 2 cycles; TS after AD: 2; SU after EXTEND after CA: 1
    // (SU also reads [100] written by TS three slots earlier: no stall)
    check(n_stall - s0 == 5, $sformatf("stall: %0d stall cycles, expected 5", n_stall - s0));
  endtask

  task automatic prog_branch_cost();
    int r0, t0;
    mdl = new();
    org('o4000);
    emit(TCF('o4010));
    org('o4010);
    emit(CA('o6000));
    emit(TCF('o4012));     // jump to the next word: no squash
    emit(TCF('o4012));     // halt
    word_at('o2000, 15'd1);
    r0 = n_redirect;
    run_prog('o4012, "branch", 0);
    check(n_redirect - r0 >= 1, "branch: taken branch redirected");
    // taken branch: one bubble between the branch and its target
    check(ret_cyc['o4010] - ret_cyc['o4000] == 2,
          $sformatf("branch: target retired %0d cycles after branch, expected 2",
                    ret_cyc['o4010] - ret_cyc['o4000]));
    // jump to the next word: no bubble
    check(ret_cyc['o4012] - ret_cyc['o4011] == 1,
          $sformatf("branch: jump to next word cost %0d cycles, expected 1",
                    ret_cyc['o4012] - ret_cyc['o4011]));
  endtask

  task automatic prog_directed();
    mdl = new();
    // constants (fixed-fixed, 6000 octal = ROM index 2000 octal)
    word_at('o2000, 15'd5);
    word_at('o2001, 15'd3);
    word_at('o2002, 15'd1);
    word_at('o2003, 15'o02000);   // FBANK = bank 1
    word_at('o2004, 15'o01000);   // EBANK = bank 2
    word_at('o2005, 15'd0);
    word_at('o2006, 15'o4400);    // TS Z target
    word_at('o2007, 15'o10000);   // 0.25 (one's complement fraction)
    word_at('o2010, ~15'o10000);  // -0.25
    word_at('o2011, 15'o00052);
    // bank 1 of switched fixed: physical 12000 -> ROM index 6000 octal
    word_at('o6000, CA('o2001));  // constant in the same bank (2001)
    word_at('o6001, I_RETURN);    // both instruction and its own constant: value 2
    org('o4000);
    emit(CA('o6000));             // A = 5
    emit(TS('o0100));             // [100] = 5
    emit(CA('o6002));             // A = 1
    emit(TS('o0101));             // [101] = 1
    emit(CS('o0100));             // A = -5
    emit(I_EXTEND);
    emit(BZMF('o4100));           // taken
    emit(INCR('o0100));           // skipped
    org('o4100);
    emit(CA('o6005));             // A = +0
    emit(I_EXTEND);
    emit(BZF('o4200));            // taken
    emit(INCR('o0100));           // skipped
    org('o4200);
    emit(CA('o6002));             // A = 1 (non-zero)
    emit(I_EXTEND);
    emit(BZF('o4300));            // not taken
    emit(I_EXTEND);
    emit(BZMF('o4300));           // not taken
    emit(TC('o5000));             // subroutine: INCR 100, RETURN
    emit(INDEX('o0101));          // next word + [101] = +1
    emit(CA('o6000));             // becomes CA 6001 -> A = 3
    emit(TS('o0102));             // [102] = 3
    emit(CA('o6003));
    emit(TS(4));                  // FBANK = bank 1
    emit(TC('o2000));             // into switched fixed bank 1
    emit(TS('o0103));             // A there was set to 2 (RETURN word) -> [103] = 2
    emit(CA('o6004));
    emit(TS(3));                  // EBANK = bank 2
    emit(CA('o6000));
    emit(TS('o1400));             // physical 2400 = 5
    emit(CA('o6006));
    emit(TS(5));                  // TCAA: jump to 4400
    emit(INCR('o0100));           // skipped
    org('o4400);
    emit(CA('o6007));             // A = 0.25
    emit(I_EXTEND);
    emit(MP('o6010));             // A,L = 0.25 * -0.25
    emit(TS('o0104));
    emit(LXCH('o0105));           // [105] = low word, L = 0
    emit(CA('o6011));             // A = 052
    emit(I_EXTEND);
    emit(IO(1, 3));               // WRITE ch3 = 052
    emit(I_EXTEND);
    emit(IO(0, 9));               // READ ch9
    emit(TS('o0106));
    emit(I_EXTEND);
    emit(IO(5, 3));               // WOR ch3 |= A
    emit(I_EXTEND);
    emit(QXCH('o0107));           // [107] = Q (return address), Q = 0
    emit(I_XLQ);                  // L <-> Q
    emit(I_EXTEND);
    emit(AUG('o0101));            // 1 -> 2
    emit(I_EXTEND);
    emit(DIM('o0102));            // 3 -> 2
    emit(TCF('o4500));
    org('o4500);
    emit(TCF('o4500));            // halt
    org('o5000);
    emit(INCR('o0100));
    emit(I_RETURN);
    mdl.ich[9] = 15'o12345;
    run_prog('o4500, "directed", 0);
    // hand-worked results
    check(u_ram.mem['o100] == 15'd6, "directed: subroutine incremented [100] once");
    check(u_ram.mem['o102] == 15'd2, "directed: INDEX made CA 6001 (3), then DIM -> 2");
    check(u_ram.mem['o103] == 15'd2, "directed: code in switched fixed bank 1 ran");
    check(u_ram.mem['o2400] == 15'd5, "directed: switched erasable bank 2 at 2400");
    check(u_ram.mem['o106] == 15'o12345, "directed: READ of input channel 9");
    check(out_regs[3] == (15'o12345 | 15'o00052), "directed: WRITE then WOR on channel 3");
    check(u_ram.mem['o104] == ~15'o02000, "directed: MP high word 0.25*-0.25 = -1/16");
    check(u_ram.mem['o101] == 15'd2, "directed: AUG 1 -> 2");
  endtask

  task automatic prog_random(int seed_run, bit random_ce);
    int n;
    int addrs [8] = '{0, 1, 2, 'o100, 'o101, 'o102, 'o1400, 'o1401};
    mdl = new();
    for (int i = 0; i < 15; i++) word_at('o2000 + i, 15'($urandom));
    for (int c = 8; c < 15; c++) mdl.ich[c] = 15'($urandom);
    word_at('o2017, 15'($urandom_range(0, 7)));
    org('o4000);
    emit(CA('o6017));
    emit(TS('o0110));           // small index value for INDEX 110
    n = 60;
    for (int i = 0; i < n; i++) begin
      int kind, k;
      kind = $urandom_range(0, 19);
      k = addrs[$urandom_range(0, 7)];
      case (kind)
        0: emit(CA('o6000 + $urandom_range(0, 15)));
        1: emit(CA(k));
        2: emit(CS(k));
        3: emit(AD(k));
        4: emit(MASK('o6000 + $urandom_range(0, 15)));
        5: emit(TS(k));
        6: emit(XCH(k));
        7: emit(LXCH(k));
        8: emit(INCR(k));
        9: emit(ADS(k));
        10: begin emit(I_EXTEND); emit(SU(k)); end
        11: begin emit(I_EXTEND); emit(AUG(k)); end
        12: begin emit(I_EXTEND); emit(DIM(k)); end
        13: begin emit(I_EXTEND); emit(QXCH(k)); end
        14: begin emit(I_EXTEND); emit(MP((1'($urandom_range(0, 1)) != 0) ? k : 'o6000 + $urandom_range(0, 15))); end
        15: emit(I_XLQ);
        16: begin emit(I_EXTEND); emit(IO($urandom_range(0, 6), $urandom_range(0, 14))); end
        17: begin emit(INDEX('o110)); emit(CA('o6000)); end
        18: emit(AD('o6000 + $urandom_range(0, 15)));
        default: begin emit(I_EXTEND); emit(IO(1, $urandom_range(0, 7))); end
      endcase
    end
    emit(TCF(asm_pc));
    run_prog(asm_pc - 1, $sformatf("random%0d%s", seed_run, random_ce ? "ce" : ""), random_ce);
  endtask

  initial begin
    mdl = new();
    for (int i = 0; i < NUM_CH; i++) in_regs[i] = '0;
    prog_timing();
    prog_stall();
    prog_branch_cost();
    prog_directed();
    for (int r = 0; r < 12; r++) prog_random(r, r >= 8);
    check(n_stall > 0 && n_redirect > 0 && n_serialize > 0 && n_indexed > 0 && n_extended > 0,
          $sformatf("mechanisms seen: stall %0d redirect %0d serialize %0d index %0d extend %0d",
                    n_stall, n_redirect, n_serialize, n_indexed, n_extended));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
