// agc_cpu: pipelined CPU core executing a subset of the Apollo Guidance
// Computer instruction set on 15-bit one's complement words.
//
// Four stages, as in the document: Fetch, Decode, Execute, Writeback. There is
// no separate memory stage because memory is read in Decode and written in
// Writeback:
//   F  the PC (through the address translator) addresses ROM port A; the
//      synchronous ROM delivers the instruction at the start of D.
//   D  the decoder turns the word (plus the EXTEND flag and any INDEX addend)
//      into a control word; the operand address K is translated and presented
//      to the RAM read port, ROM port B and the register file; the I/O
//      channel is read. Everything is captured in the D/E register.
//   E  the operand arrives from RAM/ROM (synchronous read) or from the
//      captured register value; the ALU computes all results and the
//      branching logic decides whether to redirect the PC. The E/W register
//      captures the results.
//   W  results are written to the register file, the RAM write port and the
//      I/O register file.
//
// Hazards are resolved by stalling, without forwarding: an instruction waits
// in D while an older instruction in E or W still has to write a location it
// reads (a register, a RAM word or an I/O channel). A taken branch is resolved
// in E and squashes the one instruction in D (one bubble); a jump to the next
// sequential address squashes nothing. A write to EBANK or FBANK changes the
// address translation of younger instructions, so when such a write reaches
// W the instructions in D and E are squashed and fetching restarts after the
// writer, with the new FBANK value forwarded to the fetch translation.
// EXTEND and INDEX each occupy a pipeline slot: EXTEND sets a flag that makes
// the next instruction use the extended order table; INDEX's operand is added
// to the next instruction word before it is decoded.
//
// ce is the CPU clock enable (the document runs the core at 5 MHz from a
// 50 MHz board clock); nothing changes while it is low. Reset (active-low,
// asynchronous) starts fetching at 04000 octal.
//
// From the document: the four stages and what each does, memory read in
// decode and write in writeback, stalling on read-after-write distance,
// branching in execute, the banked memory map. This design's own choices:
// instruction fetch from ROM only, the reset address, the EBANK/FBANK squash,
// the one-bubble branch and the squash-free jump to the next address.
//
// Lint notes: the fetch-side address translator's register/RAM outputs are
// left unused because instructions come only from ROM, and rst_n also serves
// as the disable condition of the two assertions at the end, which lint
// reports as a mixed synchronous/asynchronous use of the reset.
module agc_cpu
  import agc_pkg::*;
#(
  parameter int IN_BASE = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ce,
  // fixed memory (ROM) ports
  output logic [ROM_PW-1:0] rom_addr_a,
  input  word_t             rom_data_a,
  output logic [ROM_PW-1:0] rom_addr_b,
  input  word_t             rom_data_b,
  // erasable memory (RAM) ports
  output logic [RAM_AW-1:0] ram_rd_addr,
  input  word_t             ram_rd_data,
  output logic              ram_wr_en,
  output logic [RAM_AW-1:0] ram_wr_addr,
  output word_t             ram_wr_data,
  // I/O channels
  input  word_t             in_regs  [NUM_CH],
  output word_t             out_regs [NUM_CH],
  output logic              io_wr_strobe,
  output logic [CH_W-1:0]   io_wr_ch,
  // status, one pulse per CPU cycle (qualified with ce)
  output logic              retired,     // an instruction left writeback
  output logic              illegal,     // ... and it was an unsupported order
  output logic              stall,       // decode held by a hazard
  output logic              redirect,    // taken branch squashed decode
  output logic              serialize,   // bank-register write squashed D and E
  output logic              indexed,     // an INDEX addend was applied
  output logic              extended,    // an extended order was decoded
  // architectural state for observation
  output word_t             dbg_a,
  output word_t             dbg_l,
  output word_t             dbg_q,
  output addr_t             dbg_pc_w     // address of the instruction in W
);

  // ---------------------------------------------------------------- state
  addr_t pc_f, pc_d;
  logic  d_valid;
  logic  ext_flag;
  logic  idx_valid;
  word_t idx_val;

  // D/E register
  logic              e_valid;
  ctrl_t             e_ctrl;
  addr_t             e_pc;
  word_t             e_a, e_l, e_q, e_rk, e_io;
  logic              e_is_reg, e_is_ram, e_is_rom;
  logic [3:0]        e_reg_idx;
  logic [RAM_AW-1:0] e_ram_addr;

  // E/W register
  logic              w_valid;
  ctrl_t             w_ctrl;
  addr_t             w_pc;
  word_t             w_a, w_l, w_q, w_k, w_io;
  logic              w_is_reg, w_is_ram;
  logic [3:0]        w_reg_idx;
  logic [RAM_AW-1:0] w_ram_addr;

  // ---------------------------------------------------------------- register files
  word_t      reg_a, reg_l, reg_q, reg_eb, reg_fb, rf_rd_data, io_rd_data;
  logic [3:0] d_reg_idx;
  ctrl_t      d_ctrl;

  agc_regfile u_rf (
    .clk, .rst_n, .en(ce),
    .rd_idx (d_reg_idx), .rd_data(rf_rd_data), .z_value(word_t'({3'b000, pc_d} + 15'd1)),
    .wk_en  (w_valid && w_ctrl.wr_k && w_is_reg), .wk_idx(w_reg_idx), .wk_data(w_k),
    .wa_en  (w_valid && w_ctrl.wr_a), .wa_data(w_a),
    .wl_en  (w_valid && w_ctrl.wr_l), .wl_data(w_l),
    .wq_en  (w_valid && w_ctrl.wr_q), .wq_data(w_q),
    .reg_a, .reg_l, .reg_q, .reg_eb, .reg_fb
  );

  io_regfile #(.IN_BASE(IN_BASE)) u_io (
    .clk, .rst_n, .en(ce),
    .rd_ch  (d_ctrl.k[8:0]), .rd_data(io_rd_data),
    .wr_en  (w_valid && w_ctrl.wr_io), .wr_ch(w_ctrl.k[8:0]), .wr_data(w_io),
    .in_regs, .out_regs,
    .wr_strobe(io_wr_strobe), .wr_ch_o(io_wr_ch)
  );

  // ---------------------------------------------------------------- W: serialize
  logic  w_bank_wr;
  word_t fb_fetch;
  assign w_bank_wr = w_valid && w_ctrl.wr_k && w_is_reg &&
                     (w_reg_idx == REG_EB || w_reg_idx == REG_FB);
  assign fb_fetch  = (w_valid && w_ctrl.wr_k && w_is_reg && w_reg_idx == REG_FB) ? w_k : reg_fb;

  // ---------------------------------------------------------------- E stage
  word_t e_m, a_out, l_out, q_out, k_out, io_out;
  addr_t e_target;
  logic  sign_bit, eq_0, e_taken, e_redirect;

  always_comb begin
    if (e_is_reg)      e_m = e_rk;
    else if (e_is_rom) e_m = rom_data_b;
    else               e_m = ram_rd_data;
  end

  agc_alu u_alu (
    .op(e_ctrl.op), .k(e_ctrl.k), .a(e_a), .l(e_l), .q(e_q), .m(e_m), .io(e_io),
    .pc1(e_pc + 1'b1),
    .a_out, .l_out, .q_out, .k_out, .io_out, .target(e_target), .sign_bit, .eq_0
  );

  agc_branch u_br (
    .valid(e_valid), .op(e_ctrl.op),
    .wr_z(e_ctrl.wr_k && e_is_reg && e_reg_idx == REG_Z),
    .sign_bit, .eq_0, .taken(e_taken)
  );

  assign e_redirect = !w_bank_wr && e_taken && (e_target != e_pc + 1'b1);

  // ---------------------------------------------------------------- D stage
  word_t d_instr, addend;
  logic  addend_v;
  logic  d_is_reg, d_is_ram, d_is_rom;
  logic [RAM_AW-1:0] d_ram_addr;
  logic [ROM_PW-1:0] d_rom_idx;

  always_comb begin
    addend_v = 1'b0;
    addend   = '0;
    if (e_valid && e_ctrl.op == OP_INDEX) begin
      addend_v = 1'b1;
      addend   = e_m;
    end else if (idx_valid) begin
      addend_v = 1'b1;
      addend   = idx_val;
    end
    d_instr = addend_v ? oc_add(rom_data_a, addend) : rom_data_a;
  end

  agc_decoder u_dec (.instr(d_instr), .ext(ext_flag), .ctrl(d_ctrl));

  addr_translator u_xlat_d (
    .addr(d_ctrl.k), .ebank(reg_eb), .fbank(reg_fb),
    .is_reg(d_is_reg), .is_ram(d_is_ram), .is_rom(d_is_rom),
    .reg_idx(d_reg_idx), .ram_addr(d_ram_addr), .rom_idx(d_rom_idx)
  );

  assign ram_rd_addr = d_ram_addr;
  assign rom_addr_b  = d_rom_idx;

  // Hazard detection: does an older instruction still have to write a
  // location the decode-stage instruction reads? Locations are register
  // numbers 0-17 or RAM physical addresses (which never fall below 0020).
  function automatic logic writes_loc(logic v, ctrl_t c, logic is_reg, logic is_ram,
                                      logic [3:0] ridx, logic [RAM_AW-1:0] raddr,
                                      logic lreg, logic [RAM_AW-1:0] loc);
    logic hit;
    hit = 1'b0;
    if (c.wr_k && is_reg && lreg && ridx == loc[3:0]) hit = 1'b1;
    if (c.wr_k && is_ram && !lreg && raddr == loc) hit = 1'b1;
    if (lreg && loc == RAM_AW'(REG_A) && c.wr_a) hit = 1'b1;
    if (lreg && loc == RAM_AW'(REG_L) && c.wr_l) hit = 1'b1;
    if (lreg && loc == RAM_AW'(REG_Q) && c.wr_q) hit = 1'b1;
    return v && hit;
  endfunction

  function automatic logic conflict(logic v, ctrl_t c, logic is_reg, logic is_ram,
                                    logic [3:0] ridx, logic [RAM_AW-1:0] raddr);
    logic hit;
    hit = 1'b0;
    if (d_ctrl.rd_k && d_is_reg)
      hit |= writes_loc(v, c, is_reg, is_ram, ridx, raddr, 1'b1, RAM_AW'(d_reg_idx));
    if (d_ctrl.rd_k && d_is_ram)
      hit |= writes_loc(v, c, is_reg, is_ram, ridx, raddr, 1'b0, d_ram_addr);
    if (d_ctrl.rd_a) hit |= writes_loc(v, c, is_reg, is_ram, ridx, raddr, 1'b1, RAM_AW'(REG_A));
    if (d_ctrl.rd_l) hit |= writes_loc(v, c, is_reg, is_ram, ridx, raddr, 1'b1, RAM_AW'(REG_L));
    if (d_ctrl.rd_q) hit |= writes_loc(v, c, is_reg, is_ram, ridx, raddr, 1'b1, RAM_AW'(REG_Q));
    if (d_ctrl.rd_io && v && c.wr_io && c.k[8:0] == d_ctrl.k[8:0]) hit = 1'b1;
    return hit;
  endfunction

  logic d_hazard, d_stall, flush;
  always_comb begin
    d_hazard = d_valid &&
               (conflict(e_valid, e_ctrl, e_is_reg, e_is_ram, e_reg_idx, e_ram_addr) ||
                conflict(w_valid, w_ctrl, w_is_reg, w_is_ram, w_reg_idx, w_ram_addr));
    flush    = w_bank_wr || e_redirect;
    d_stall  = d_hazard && !flush;
  end

  // ---------------------------------------------------------------- F stage
  addr_t fetch_pc;
  // Instructions come from ROM only; the other translator outputs of the
  // fetch address are not used.
  logic              f_is_reg, f_is_ram, f_is_rom;
  logic [3:0]        f_reg_idx;
  logic [RAM_AW-1:0] f_ram_addr;
  always_comb begin
    if (w_bank_wr)       fetch_pc = w_pc + 1'b1;
    else if (e_redirect) fetch_pc = e_target;
    else if (d_stall)    fetch_pc = pc_d;
    else                 fetch_pc = pc_f;
  end

  addr_translator u_xlat_f (
    .addr(fetch_pc), .ebank(reg_eb), .fbank(fb_fetch),
    .is_reg(f_is_reg), .is_ram(f_is_ram), .is_rom(f_is_rom),
    .reg_idx(f_reg_idx), .ram_addr(f_ram_addr), .rom_idx(rom_addr_a)
  );

  // ---------------------------------------------------------------- pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f      <= RESET_PC;
      pc_d      <= RESET_PC;
      d_valid   <= 1'b0;
      ext_flag  <= 1'b0;
      idx_valid <= 1'b0;
      idx_val   <= '0;
      e_valid   <= 1'b0;
      e_ctrl    <= '0;
      e_pc      <= '0;
      e_a       <= '0;
      e_l       <= '0;
      e_q       <= '0;
      e_rk      <= '0;
      e_io      <= '0;
      e_is_reg  <= 1'b0;
      e_is_ram  <= 1'b0;
      e_is_rom  <= 1'b0;
      e_reg_idx <= '0;
      e_ram_addr <= '0;
      w_valid   <= 1'b0;
      w_ctrl    <= '0;
      w_pc      <= '0;
      w_a       <= '0;
      w_l       <= '0;
      w_q       <= '0;
      w_k       <= '0;
      w_io      <= '0;
      w_is_reg  <= 1'b0;
      w_is_ram  <= 1'b0;
      w_reg_idx <= '0;
      w_ram_addr <= '0;
    end else if (ce) begin
      // E -> W (E is squashed by a bank-register write in W)
      w_valid    <= e_valid && !w_bank_wr;
      w_ctrl     <= e_ctrl;
      w_pc       <= e_pc;
      w_a        <= a_out;
      w_l        <= l_out;
      w_q        <= q_out;
      w_k        <= k_out;
      w_io       <= io_out;
      w_is_reg   <= e_is_reg;
      w_is_ram   <= e_is_ram;
      w_reg_idx  <= e_reg_idx;
      w_ram_addr <= e_ram_addr;

      // D -> E
      e_ctrl     <= d_ctrl;
      e_pc       <= pc_d;
      e_a        <= reg_a;
      e_l        <= reg_l;
      e_q        <= reg_q;
      e_rk       <= rf_rd_data;
      e_io       <= io_rd_data;
      e_is_reg   <= d_is_reg;
      e_is_ram   <= d_is_ram;
      e_is_rom   <= d_is_rom;
      e_reg_idx  <= d_reg_idx;
      e_ram_addr <= d_ram_addr;

      if (flush) begin
        e_valid   <= 1'b0;
        d_valid   <= 1'b1;
        pc_d      <= fetch_pc;
        pc_f      <= fetch_pc + 1'b1;
        ext_flag  <= 1'b0;
        idx_valid <= 1'b0;
      end else if (d_stall) begin
        e_valid <= 1'b0;
        if (e_valid && e_ctrl.op == OP_INDEX) begin
          idx_valid <= 1'b1;
          idx_val   <= e_m;
        end
      end else begin
        e_valid <= d_valid;
        d_valid <= 1'b1;
        pc_d    <= pc_f;
        pc_f    <= pc_f + 1'b1;
        if (d_valid) begin
          idx_valid <= 1'b0;
          if (d_ctrl.op == OP_EXTEND)     ext_flag <= 1'b1;
          else if (d_ctrl.op != OP_INDEX) ext_flag <= 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- W stage outputs
  assign ram_wr_en   = ce && w_valid && w_ctrl.wr_k && w_is_ram;
  assign ram_wr_addr = w_ram_addr;
  assign ram_wr_data = w_k;

  assign retired   = ce && w_valid;
  assign illegal   = ce && w_valid && w_ctrl.illegal;
  assign stall     = ce && d_stall;
  assign redirect  = ce && e_redirect;
  assign serialize = ce && w_bank_wr;
  assign indexed   = ce && d_valid && !flush && !d_stall && addend_v;
  assign extended  = ce && d_valid && !flush && !d_stall && ext_flag;

  assign dbg_a    = reg_a;
  assign dbg_l    = reg_l;
  assign dbg_q    = reg_q;
  assign dbg_pc_w = w_pc;

  // A stalled decode never coincides with a squash, and a bubble never writes.
  a_no_stall_on_flush: assert property (@(posedge clk) disable iff (!rst_n)
                                        ce |-> !(d_stall && flush))
    else $error("stall and flush together");
  a_no_bubble_write: assert property (@(posedge clk) disable iff (!rst_n)
                                      ce |-> !(ram_wr_en && !w_valid))
    else $error("RAM write from a bubble");

endmodule
