// tb_agc_model_pkg: instruction-level reference model and assembler helpers
// for checking the pipelined CPU.
//
// agc_model executes one instruction per step() call, with no notion of a
// pipeline, straight from the instruction-set description: 15-bit one's
// complement words, the banked memory map (registers 00-17, erasable
// 0020-1377, switched erasable 1400-1777 by EBANK bits 10:8, switched fixed
// 2000-3777 by FBANK bits 12:10, fixed-fixed 4000-7777), EXTEND and INDEX
// prefixes, and the I/O channels (0-7 output, 8-14 input). The enc_* helpers
// build instruction words with the original machine's encodings.
package tb_agc_model_pkg;

  function automatic logic [14:0] ocadd(logic [14:0] x, logic [14:0] y);
    logic [15:0] s;
    s = {1'b0, x} + {1'b0, y};
    if (s[15]) s = s + 16'd1;
    return s[14:0];
  endfunction

  function automatic bit oczero(logic [14:0] x);
    return x == 15'h0000 || x == 15'h7fff;
  endfunction

  // ---- assembler ---------------------------------------------------------
  function automatic logic [14:0] enc(int opc, int k);
    return 15'((opc << 12) | (k & 'hfff));
  endfunction
  function automatic logic [14:0] enc_qc(int opc, int qc, int k10);
    return 15'((opc << 12) | (qc << 10) | (k10 & 'h3ff));
  endfunction
  localparam logic [14:0] I_EXTEND = 15'o00006;
  localparam logic [14:0] I_RETURN = 15'o00002;
  localparam logic [14:0] I_XLQ    = 15'o00001;
  function automatic logic [14:0] TC   (int k); return enc(0, k);         endfunction
  function automatic logic [14:0] TCF  (int k); return enc(1, k);         endfunction
  function automatic logic [14:0] LXCH (int k); return enc_qc(2, 1, k);   endfunction
  function automatic logic [14:0] INCR (int k); return enc_qc(2, 2, k);   endfunction
  function automatic logic [14:0] ADS  (int k); return enc_qc(2, 3, k);   endfunction
  function automatic logic [14:0] CA   (int k); return enc(3, k);         endfunction
  function automatic logic [14:0] CS   (int k); return enc(4, k);         endfunction
  function automatic logic [14:0] INDEX(int k); return enc_qc(5, 0, k);   endfunction
  function automatic logic [14:0] TS   (int k); return enc_qc(5, 2, k);   endfunction
  function automatic logic [14:0] XCH  (int k); return enc_qc(5, 3, k);   endfunction
  function automatic logic [14:0] AD   (int k); return enc(6, k);         endfunction
  function automatic logic [14:0] MASK (int k); return enc(7, k);         endfunction
  // extended orders (must follow I_EXTEND)
  function automatic logic [14:0] IO   (int sub, int ch); return 15'((sub << 9) | (ch & 'h1ff)); endfunction
  function automatic logic [14:0] BZF  (int k); return enc(1, k);         endfunction
  function automatic logic [14:0] QXCH (int k); return enc_qc(2, 1, k);   endfunction
  function automatic logic [14:0] AUG  (int k); return enc_qc(2, 2, k);   endfunction
  function automatic logic [14:0] DIM  (int k); return enc_qc(2, 3, k);   endfunction
  function automatic logic [14:0] SU   (int k); return enc_qc(6, 0, k);   endfunction
  function automatic logic [14:0] BZMF (int k); return enc(6, k);         endfunction
  function automatic logic [14:0] MP   (int k); return enc(7, k);         endfunction

  // ---- reference model ---------------------------------------------------
  class agc_model;
    logic [14:0] regs [16];
    logic [14:0] ram  [2048];
    logic [14:0] rom  [10240];
    logic [14:0] och  [15];
    logic [14:0] ich  [15];
    logic [11:0] pc;
    bit          ext;
    bit          idx_p;
    logic [14:0] idx_v;
    int          steps;

    function new();
      foreach (regs[i]) regs[i] = '0;
      foreach (ram[i])  ram[i]  = '0;
      foreach (rom[i])  rom[i]  = '0;
      foreach (och[i])  och[i]  = '0;
      foreach (ich[i])  ich[i]  = '0;
      pc = 12'o4000; ext = 0; idx_p = 0; idx_v = '0; steps = 0;
    endfunction

    function int rom_index(int a);
      if (a >= 'o4000) return a - 'o4000;
      return 'o10000 + int'(regs[4][12:10]) * 'o2000 + (a & 'o1777) - 'o4000;
    endfunction

    function int ram_index(int a);
      if (a < 'o1400) return a;
      return ('o1400 + int'(regs[3][10:8]) * 'o400 + (a & 'o377)) & 'o3777;
    endfunction

    function logic [14:0] rd(int a);
      if (a < 'o20) begin
        if (a == 7) return '0;
        if (a == 5) return 15'(pc + 1);
        return regs[a];
      end
      if (a < 'o2000) return ram[ram_index(a)];
      return rom[rom_index(a)];
    endfunction

    // returns 1 when the write was to Z (a jump)
    function bit wr(int a, logic [14:0] v);
      if (a < 'o20) begin
        if (a == 5) return 1;
        if (a != 7) regs[a] = v;
        return 0;
      end
      if (a < 'o2000) ram[ram_index(a)] = v;
      return 0;
    endfunction

    function logic [14:0] rdch(int c);
      if (c < 8) return och[c];
      if (c < 15) return ich[c];
      return '0;
    endfunction

    function void wrch(int c, logic [14:0] v);
      if (c < 8) och[c] = v;
    endfunction

    function void step();
      logic [14:0] w, m, a, r;
      int opc, qc, k12, k10, nxt;
      bit e, jz;
      w = rom[rom_index(int'(pc))];
      if (idx_p) begin w = ocadd(w, idx_v); idx_p = 0; end
      e = ext; ext = 0;
      opc = int'(w[14:12]); qc = int'(w[11:10]); k12 = int'(w[11:0]); k10 = int'(w[9:0]);
      nxt = int'(pc) + 1;
      a = regs[0];
      jz = 0;
      if (!e) begin
        case (opc)
          0: begin
            if (k12 == 1) begin r = regs[1]; regs[1] = regs[2]; regs[2] = r; end
            else if (k12 == 2) nxt = int'(regs[2][11:0]);
            else if (k12 == 6) ext = 1;
            else if (k12 == 0 || (k12 >= 3 && k12 <= 7)) ;
            else begin regs[2] = 15'(pc + 1); nxt = k12; end
          end
          1: if (qc != 0) nxt = k12;
          2: case (qc)
               1: begin m = rd(k10); r = regs[1]; jz = wr(k10, r); regs[1] = m; if (jz) nxt = int'(r[11:0]); end
               2: begin m = ocadd(rd(k10), 15'd1); jz = wr(k10, m); if (jz) nxt = int'(m[11:0]); end
               3: begin m = ocadd(a, rd(k10)); jz = wr(k10, m); regs[0] = m; if (jz) nxt = int'(m[11:0]); end
               default: ;
             endcase
          3: regs[0] = rd(k12);
          4: regs[0] = ~rd(k12);
          5: case (qc)
               0: if (k10 != 'o17) begin idx_p = 1; idx_v = rd(k10); ext = e; end
               2: begin jz = wr(k10, a); if (jz) nxt = int'(a[11:0]); end
               3: begin m = rd(k10); jz = wr(k10, a); regs[0] = m; if (jz) nxt = int'(a[11:0]); end
               default: ;
             endcase
          6: regs[0] = ocadd(a, rd(k12));
          7: regs[0] = a & rd(k12);
        endcase
      end else begin
        case (opc)
          0: begin
            int c; c = int'(w[8:0]);
            case (int'(w[11:9]))
              0: regs[0] = rdch(c);
              1: wrch(c, a);
              2: regs[0] = a & rdch(c);
              3: begin regs[0] = a & rdch(c); wrch(c, regs[0]); end
              4: regs[0] = a | rdch(c);
              5: begin regs[0] = a | rdch(c); wrch(c, regs[0]); end
              6: regs[0] = a ^ rdch(c);
              default: ;
            endcase
          end
          1: if (qc != 0 && oczero(a)) nxt = k12;
          2: case (qc)
               1: begin m = rd(k10); r = regs[2]; jz = wr(k10, r); regs[2] = m; if (jz) nxt = int'(r[11:0]); end
               2: begin m = rd(k10); m = m[14] ? ocadd(m, ~15'd1) : ocadd(m, 15'd1); jz = wr(k10, m); if (jz) nxt = int'(m[11:0]); end
               3: begin m = rd(k10);
                        if (!oczero(m)) m = m[14] ? ocadd(m, 15'd1) : ocadd(m, ~15'd1);
                        jz = wr(k10, m); if (jz) nxt = int'(m[11:0]); end
               default: ;
             endcase
          5: begin idx_p = 1; idx_v = rd(k12); ext = e; end
          6: if (qc == 0) regs[0] = ocadd(a, ~rd(k10));
             else if (oczero(a) || a[14]) nxt = k12;
          7: begin
            logic [13:0] x, y; logic [27:0] p; logic s; logic [14:0] hi, lo;
            m = rd(k12);
            x = a[14] ? ~a[13:0] : a[13:0];
            y = m[14] ? ~m[13:0] : m[13:0];
            p = 28'(x) * 28'(y);
            s = (a[14] != m[14]) && (p != 0);
            hi = {1'b0, p[27:14]}; lo = {1'b0, p[13:0]};
            regs[0] = s ? ~hi : hi; regs[1] = s ? ~lo : lo;
          end
          default: ;
        endcase
      end
      pc = 12'(nxt);
      steps++;
    endfunction
  endclass

endpackage
