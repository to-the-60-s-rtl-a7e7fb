// tb_agc_top: end-to-end test of the whole FPGA design at its default
// parameters (50 MHz board clock, CPU enabled one cycle in ten).
//
// The test plays the part of the DSKY controller on the far side of the
// serial link. Bytes go both ways at the pace of a 115200-baud UART
// (one byte per 4340 board-clock cycles); the bit-level transceiver itself
// is not part of the design, so the test drives the byte ports directly.
//
// A small program in ROM polls input channel 8 for a verb/noun command
// (verb in bits 13:7, noun in bits 6:0), dispatches on the verb and answers
// on output channels 1-3:
//   V06      lamp test: channel 1 = 37777, channel 2 = 6
//   V07      clear:     channel 1 = 0,     channel 2 = 7
//   V39 N00  channel 2 = 2 * high word of (ch9 * ch10), channel 3 = low word
//   V39 N01  adds ch9 + ch10 into a variable in switched erasable bank 2,
//            through a subroutine in switched fixed bank 1; channel 2 = sum
// then waits for channel 8 to return to zero. V39 dispatches through an
// INDEXed jump table. Expected answers are computed here with integer
// arithmetic. The test also counts each pipeline mechanism (stall, branch
// squash, bank-switch squash, INDEX, EXTEND, unsupported order), the
// frames in each direction, a dropped stray byte and idle CPU cycles, fails
// if any never happened, and checks the performance counters against its
// own count of cycles and retired instructions.
module tb_agc_top;
  import agc_pkg::*;
  import tb_agc_model_pkg::*;

  localparam int BYTE_CYCLES = 4340;   // 50 MHz / 11520 bytes per second

  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;               // 50 MHz

  logic [7:0] uart_tx_data; logic uart_tx_valid, uart_tx_ready;
  logic uart_rx_valid = 0; logic [7:0] uart_rx_data = 0; logic uart_rx_dropped;
  logic perf_clear = 0; logic [31:0] perf_cycles, perf_instrs;
  logic cpu_ce, cpu_retired, cpu_illegal, cpu_stall, cpu_redirect, cpu_serialize;
  logic cpu_indexed, cpu_extended;
  word_t cpu_a, cpu_l, cpu_q; addr_t cpu_pc_w;

  agc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- mechanism counters
  int n_stall = 0, n_redirect = 0, n_serialize = 0, n_indexed = 0, n_extended = 0;
  int n_illegal = 0, n_idle = 0, n_retired = 0, n_ce = 0, n_drop = 0, n_txf = 0, n_rxf = 0;
  always @(posedge clk) if (rst_n) begin
    n_stall     += int'(cpu_stall);
    n_redirect  += int'(cpu_redirect);
    n_serialize += int'(cpu_serialize);
    n_indexed   += int'(cpu_indexed);
    n_extended  += int'(cpu_extended);
    n_illegal   += int'(cpu_illegal);
    n_retired   += int'(cpu_retired);
    n_ce        += int'(cpu_ce);
    n_idle      += int'(!cpu_ce);
    n_drop      += int'(uart_rx_dropped);
  end

  // ---------------------------------------------------------------- transmit side: a
  // UART that takes a byte and is busy for one byte time
  int    busy = 0;
  logic [7:0] fb [3];
  int    nb = 0;
  word_t ch_val [8];
  int    ch_cnt [8];
  assign uart_tx_ready = (busy == 0);
  always @(posedge clk) begin
    if (!rst_n) busy <= 0;
    else if (uart_tx_valid && uart_tx_ready) begin
      busy <= BYTE_CYCLES;
      fb[nb] = uart_tx_data;
      nb = (nb + 1) % 3;
      if (nb == 0) begin
        int c;
        c = int'(fb[0][3:0]);
        check(fb[0][7] && !fb[1][7] && !fb[2][7] && c < 8, "received frame is well formed");
        if (c < 8) begin
          ch_val[c] = {fb[0][6], fb[1][6:0], fb[2][6:0]};
          ch_cnt[c]++;
        end
        n_txf++;
      end
    end else if (busy > 0) busy <= busy - 1;
  end

  // ---------------------------------------------------------------- receive side
  task automatic send_byte(logic [7:0] b);
    repeat (BYTE_CYCLES - 1) @(negedge clk);
    uart_rx_valid = 1; uart_rx_data = b;
    @(negedge clk);
    uart_rx_valid = 0;
  endtask
  task automatic send_word(int c, word_t w);
    send_byte({1'b1, w[14], 2'b00, 4'(c)});
    send_byte({1'b0, w[13:7]});
    send_byte({1'b0, w[6:0]});
    n_rxf++;
  endtask

  // wait for a new frame on channel 2 (the answer)
  task automatic wait_answer(string what);
    int c0, guard;
    c0 = ch_cnt[2]; guard = 0;
    while (ch_cnt[2] == c0 && guard < 2000000) begin @(negedge clk); guard++; end
    check(ch_cnt[2] != c0, {what, ": answer arrived"});
    // let a trailing frame (channel 3) finish
    repeat (4 * BYTE_CYCLES) @(negedge clk);
  endtask

  task automatic command(int verb, int noun, string what);
    send_word(8, 15'((verb << 7) | noun));
    wait_answer(what);
    send_word(8, 15'd0);
    repeat (200) @(negedge clk);
  endtask

  // ---------------------------------------------------------------- program
  logic [14:0] img [10240];
  int asm_pc;
  task automatic emit(logic [14:0] w); img[asm_pc - 'o4000] = w; asm_pc++; endtask
  task automatic org(int a); asm_pc = a; endtask

  localparam int LOOP = 'o4010, LAMP = 'o4100, CLR = 'o4120, RUN = 'o4140, TABLE = 'o4200;
  localparam int P00 = 'o4300, P01 = 'o4400, WAITC = 'o4500;

  task automatic build();
    foreach (img[i]) img[i] = '0;
    // constants at 6000
    img['o2000] = 15'o02000;        // FBANK bank 1
    img['o2001] = 15'o01000;        // EBANK bank 2
    img['o2002] = 15'd0;
    img['o2003] = 15'o37600;        // verb field mask
    img['o2004] = 15'(6 << 7);
    img['o2005] = 15'(7 << 7);
    img['o2006] = 15'(39 << 7);
    img['o2007] = 15'o37777;        // all lamps
    img['o2010] = 15'o00177;        // noun mask
    img['o2012] = 15'd6;
    img['o2013] = 15'd7;
    org('o4000);
    emit(CA('o6000)); emit(TS(4));  // FBANK = 1
    emit(CA('o6001)); emit(TS(3));  // EBANK = 2
    emit(15'o10100);                // CCS 100: left out of the subset, runs as a no-op
    emit(CA('o6002)); emit(TS('o1400));
    emit(TCF(LOOP));
    org(LOOP);
    emit(I_EXTEND); emit(IO(0, 8)); // READ 8
    emit(I_EXTEND); emit(BZF(LOOP));
    emit(TS('o0100));
    emit(MASK('o6003)); emit(TS('o0101));
    emit(CS('o0101)); emit(AD('o6004)); emit(I_EXTEND); emit(BZF(LAMP));
    emit(CS('o0101)); emit(AD('o6005)); emit(I_EXTEND); emit(BZF(CLR));
    emit(CS('o0101)); emit(AD('o6006)); emit(I_EXTEND); emit(BZF(RUN));
    emit(TCF(WAITC));
    org(LAMP);
    emit(CA('o6007)); emit(I_EXTEND); emit(IO(1, 1));
    emit(CA('o6012)); emit(I_EXTEND); emit(IO(1, 2));
    emit(TCF(WAITC));
    org(CLR);
    emit(CA('o6002)); emit(I_EXTEND); emit(IO(1, 1));
    emit(CA('o6013)); emit(I_EXTEND); emit(IO(1, 2));
    emit(TCF(WAITC));
    org(RUN);
    emit(CA('o0100)); emit(MASK('o6010)); emit(TS('o0102));
    emit(INDEX('o0102)); emit(TCF(TABLE));
    org(TABLE);
    emit(TCF(P00)); emit(TCF(P01));
    org(P00);
    emit(I_EXTEND); emit(IO(0, 9)); emit(TS('o0104));
    emit(I_EXTEND); emit(IO(0, 10));
    emit(I_EXTEND); emit(MP('o0104));
    emit(AD(0));                    // DOUBLE
    emit(TS('o0105));
    emit(CA(1)); emit(I_EXTEND); emit(IO(1, 3));    // low word first (channel 3)
    emit(CA('o0105)); emit(I_EXTEND); emit(IO(1, 2)); // then the answer
    emit(TCF(WAITC));
    org(P01);
    emit(I_EXTEND); emit(IO(0, 9)); emit(TS('o0103));
    emit(I_EXTEND); emit(IO(0, 10)); emit(AD('o0103));
    emit(TC('o2000));               // subroutine in switched fixed bank 1
    emit(CA('o1400)); emit(I_EXTEND); emit(IO(1, 2));
    emit(TCF(WAITC));
    org(WAITC);
    emit(I_EXTEND); emit(IO(0, 8));
    emit(I_EXTEND); emit(BZF(LOOP));
    emit(TCF(WAITC));
    // bank 1 of switched fixed memory: physical 12000 = ROM index 6000
    img['o6000] = ADS('o1400);
    img['o6001] = I_RETURN;
  endtask

  function automatic int val(word_t w);
    word_t nw; nw = ~w;
    return w[14] ? -int'(nw) : int'(w);
  endfunction

  initial begin
    word_t in9, in10, lo_exp, hi2_exp;
    int sum;
    longint p;
    foreach (ch_cnt[i]) begin ch_cnt[i] = 0; ch_val[i] = '0; end
    build();
    for (int i = 0; i < 10240; i++) dut.u_rom.mem[i] = img[i];
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2000) @(negedge clk);
    check(perf_instrs > 0, "CPU runs after reset");

    // a stray data byte, which the receiver must drop
    send_byte(8'h15);

    command(6, 0, "V06 lamp test");
    check(ch_val[1] == 15'o37777 && ch_val[2] == 15'd6, "V06 lights all lamps");

    in9 = 15'o12000; in10 = 15'o30000;     // 0.3125 * 0.75
    send_word(9, in9); send_word(10, in10);
    command(39, 0, "V39 N00");
    p = longint'(val(in9)) * longint'(val(in10));
    hi2_exp = 15'(2 * (p >> 14));
    lo_exp  = 15'(p & 'h3fff);
    check(ch_val[2] == hi2_exp && ch_val[3] == lo_exp,
          $sformatf("V39 N00: got %o/%o expected %o/%o", ch_val[2], ch_val[3], hi2_exp, lo_exp));

    in9 = ~15'd1000; in10 = 15'o33333;     // negative operand
    send_word(9, in9);
    send_word(10, in10);
    command(39, 0, "V39 N00 negative");
    p = longint'(val(in9)) * longint'(val(in10));
    hi2_exp = ~15'(2 * ((-p) >> 14));
    lo_exp  = ~15'((-p) & 'h3fff);
    check(ch_val[2] == hi2_exp && ch_val[3] == lo_exp,
          $sformatf("V39 N00 negative: got %o/%o expected %o/%o", ch_val[2], ch_val[3], hi2_exp, lo_exp));

    sum = 0;
    for (int r = 0; r < 3; r++) begin
      in9 = 15'($urandom_range(0, 1000)); in10 = 15'($urandom_range(0, 1000));
      send_word(9, in9); send_word(10, in10);
      command(39, 1, "V39 N01");
      sum += int'(in9) + int'(in10);
      check(ch_val[2] == 15'(sum), $sformatf("V39 N01: sum %0d expected %0d", ch_val[2], sum));
    end
    check(dut.u_ram.mem['o2400] == 15'(sum), "V39 N01 keeps its total in erasable bank 2 (physical 2400)");

    command(7, 0, "V07 clear");
    check(ch_val[1] == 15'd0 && ch_val[2] == 15'd7, "V07 clears the lamps");

    // performance counters against the test's own counts
    check(perf_cycles == 32'(n_ce) && perf_instrs == 32'(n_retired),
          $sformatf("counters %0d/%0d, seen %0d/%0d", perf_cycles, perf_instrs, n_ce, n_retired));
    check(n_idle > 8 * n_ce, "CPU runs at one tenth of the board clock");
    $display("IPC = %0d.%03d (%0d instructions in %0d CPU cycles)",
             perf_instrs / perf_cycles, (perf_instrs * 1000 / perf_cycles) % 1000, perf_instrs, perf_cycles);
    $display("mechanisms: stall %0d squash %0d bank-squash %0d index %0d extend %0d unsupported %0d tx %0d rx %0d drop %0d",
             n_stall, n_redirect, n_serialize, n_indexed, n_extended, n_illegal, n_txf, n_rxf, n_drop);
    check(n_stall > 0, "stall happened");
    check(n_redirect > 0, "branch squash happened");
    check(n_serialize > 0, "bank-switch squash happened");
    check(n_indexed > 0, "INDEX happened");
    check(n_extended > 0, "EXTEND happened");
    check(n_illegal > 0, "unsupported order happened");
    check(n_txf > 0 && n_rxf > 0, "frames in both directions");
    check(n_drop > 0, "stray byte dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
