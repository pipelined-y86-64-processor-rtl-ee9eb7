`ifndef Y86_TB_LIB_SVH
`define Y86_TB_LIB_SVH
// y86_tb_lib.svh: test support for the Y86-64 pipeline, included into the
// testbench modules that need it.
//
// y86_asm   - a small assembler: each method appends one instruction's bytes
//             in the standard Y86-64 encoding; jump/call targets can be
//             patched once a label's address is known.
// y86_ref   - an instruction-set reference model with separate instruction
//             and data memories of the same sizes as the processor's. It
//             executes one instruction at a time with the architectural
//             rules (status ADR/INS/HLT stops it, nothing of the faulting
//             instruction is written), and alongside it computes when each
//             instruction would leave decode in a pipeline that waits for
//             register values written by the three instructions ahead of
//             it, for a conditional jump to reach memory and for a ret to
//             reach writeback. From that it predicts the cycle count and the
//             number of data-stall, jump-wait and ret-wait cycles.
// y86_gen   - a random program generator: straight-line code with OPq,
//             irmovq, rrmovq/cmovXX, loads and stores through a base
//             register, pushq/popq, forward conditional jumps, counted
//             loops and calls to leaf functions, ending in halt.

  localparam int NREG = 15;

  class y86_asm;
    byte unsigned b [$];

    function int here();
      return b.size();
    endfunction
    function void op1(int ic, int fn);
      b.push_back(byte'((ic << 4) | fn));
    endfunction
    function void regs(int ra, int rb);
      b.push_back(byte'((ra << 4) | rb));
    endfunction
    function void quad(longint unsigned v);
      for (int k = 0; k < 8; k++) b.push_back(byte'(v >> (8 * k)));
    endfunction
    function void halt();                 op1(0, 0); endfunction
    function void nop();                  op1(1, 0); endfunction
    function void cmov(int fn, int ra, int rb); op1(2, fn); regs(ra, rb); endfunction
    function void irmovq(longint unsigned v, int rb); op1(3, 0); regs(15, rb); quad(v); endfunction
    function void rmmovq(int ra, longint unsigned d, int rb); op1(4, 0); regs(ra, rb); quad(d); endfunction
    function void mrmovq(longint unsigned d, int rb, int ra); op1(5, 0); regs(ra, rb); quad(d); endfunction
    function void opq(int fn, int ra, int rb); op1(6, fn); regs(ra, rb); endfunction
    function int  jxx(int fn, longint unsigned dest); int p; op1(7, fn); p = here(); quad(dest); return p; endfunction
    function int  call(longint unsigned dest); int p; op1(8, 0); p = here(); quad(dest); return p; endfunction
    function void ret();                  op1(9, 0); endfunction
    function void pushq(int ra);          op1(10, 0); regs(ra, 15); endfunction
    function void popq(int ra);           op1(11, 0); regs(ra, 15); endfunction
    function void patch(int pos, longint unsigned v);
      for (int k = 0; k < 8; k++) b[pos + k] = byte'(v >> (8 * k));
    endfunction
  endclass

  class y86_ref;
    int imem_bytes, dmem_bytes;
    byte unsigned imem [];
    byte unsigned dmem [];
    longint unsigned r [NREG];
    bit zf = 1, sf = 0, of = 0;
    int stat;            // 1 AOK, 2 HLT, 3 ADR, 4 INS
    int steps;           // instructions completed with status AOK
    // timing model
    int t_prev;          // cycle the previous instruction left decode
    int ctrl_ready;      // earliest decode cycle allowed by a jump / ret
    int reg_ready [16];  // earliest decode cycle at which a register may be read
    int t_last;          // leave-decode cycle of the last instruction (the faulting one)
    int data_stalls, jcc_waits, ret_waits;

    function new(int ib, int db);
      imem_bytes = ib; dmem_bytes = db;
      imem = new[ib]; dmem = new[db];
      stat = 1; steps = 0; t_prev = 0; ctrl_ready = 0;
      foreach (reg_ready[i]) reg_ready[i] = 0;
      data_stalls = 0; jcc_waits = 0; ret_waits = 0;
    endfunction

    function longint unsigned rd8(longint unsigned a);
      longint unsigned v = 0;
      for (int k = 7; k >= 0; k--) v = (v << 8) | dmem[a + k];
      return v;
    endfunction
    function void wr8(longint unsigned a, longint unsigned v);
      for (int k = 0; k < 8; k++) dmem[a + k] = byte'(v >> (8 * k));
    endfunction
    function bit dok(longint unsigned a);
      return a <= longint'(dmem_bytes - 8);
    endfunction
    function bit cond(int fn);
      case (fn)
        0: return 1;
        1: return (sf ^ of) | zf;
        2: return sf ^ of;
        3: return zf;
        4: return !zf;
        5: return !(sf ^ of);
        6: return !(sf ^ of) && !zf;
        default: return 0;
      endcase
    endfunction
    function longint unsigned rget(int i);
      return (i < NREG) ? r[i] : 0;
    endfunction
    function void rset(int i, longint unsigned v);
      if (i < NREG) r[i] = v;
    endfunction

    // registers read in decode by an icode (ISA operand table)
    function void srcs(int ic, int ra, int rb, output int sa, output int sb);
      sa = 15; sb = 15;
      case (ic)
        2: sa = ra;
        4: begin sa = ra; sb = rb; end
        5: sb = rb;
        6: begin sa = ra; sb = rb; end
        8: sb = 4;
        9: begin sa = 4; sb = 4; end
        10: begin sa = ra; sb = 4; end
        11: begin sa = 4; sb = 4; end
        default: ;
      endcase
    endfunction

    // run from pc 0 until the status leaves AOK or max_steps instructions
    function void run(int max_steps);
      longint unsigned pc = 0;
      while (stat == 1 && steps < max_steps) begin
        int ic, fn, ra, rb, len, sa, sb, t, base;
        bit nreg, nc, valid;
        longint unsigned valC, valP, va, vb, res;
        bit taken;
        int wE, wM, wE_ready;
        ic = 0; fn = 0; ra = 15; rb = 15; valC = 0;
        if (pc >= imem_bytes) begin ic = 1; len = 1; stat = 3; end
        else begin
          ic = imem[pc] >> 4; fn = imem[pc] & 15;
          nreg = ic inside {2, 3, 4, 5, 6, 10, 11};
          nc   = ic inside {3, 4, 5, 7, 8};
          len  = 1 + nreg + 8 * nc;
          if (pc + len > imem_bytes) begin ic = 1; fn = 0; stat = 3; end
        end
        if (stat == 1) begin
          if (nreg) begin ra = imem[pc + 1] >> 4; rb = imem[pc + 1] & 15; end
          if (nc) for (int k = 7; k >= 0; k--) valC = (valC << 8) | imem[pc + 1 + nreg + k];
          case (ic)
            0, 1, 3, 4, 5, 8, 9, 10, 11: valid = (fn == 0);
            2, 7: valid = (fn <= 6);
            6: valid = (fn <= 3);
            default: valid = 0;
          endcase
          if (!valid) stat = 4;
          else if (ic == 0) stat = 2;
        end
        valP = pc + len;
        // timing: when does this instruction leave decode?
        srcs((stat == 3) ? 1 : ic, ra, rb, sa, sb);
        base = (t_prev + 1 > ctrl_ready) ? t_prev + 1 : ctrl_ready;
        t = base;
        if (sa != 15 && reg_ready[sa] > t) t = reg_ready[sa];
        if (sb != 15 && reg_ready[sb] > t) t = reg_ready[sb];
        data_stalls += t - base;
        t_prev = t; t_last = t;
        if (stat != 1) break;
        // execute
        va = rget(ra); vb = rget(rb);
        wE = 15; wM = 15; wE_ready = t + 4;
        case (ic)
          1: pc = valP;
          2: begin
               taken = cond(fn);
               if (taken) rset(rb, va);
               wE = rb;
               if (!taken) wE_ready = t + 2;
               pc = valP;
             end
          3: begin rset(rb, valC); wE = rb; pc = valP; end
          4: begin
               if (!dok(vb + valC)) begin stat = 3; break; end
               wr8(vb + valC, va); pc = valP;
             end
          5: begin
               if (!dok(vb + valC)) begin stat = 3; break; end
               rset(ra, rd8(vb + valC)); wM = ra; pc = valP;
             end
          6: begin
               logic signed [64:0] w;
               case (fn)
                 0: begin res = vb + va; w = $signed({vb[63], vb}) + $signed({va[63], va}); of = w[64] != w[63]; end
                 1: begin res = vb - va; w = $signed({vb[63], vb}) - $signed({va[63], va}); of = w[64] != w[63]; end
                 2: begin res = vb & va; of = 0; end
                 default: begin res = vb ^ va; of = 0; end
               endcase
               zf = (res == 0); sf = res[63];
               rset(rb, res); wE = rb; pc = valP;
             end
          7: begin
               pc = cond(fn) ? valC : valP;
               if (fn != 0) begin ctrl_ready = t + 3; jcc_waits += 2; end
             end
          8: begin
               longint unsigned sp = r[4] - 8;
               if (!dok(sp)) begin stat = 3; ret_waits += 0; break; end
               wr8(sp, valP); r[4] = sp; wE = 4; pc = valC;
             end
          9: begin
               longint unsigned sp = r[4];
               ret_waits += 3;
               if (!dok(sp)) begin stat = 3; break; end
               pc = rd8(sp); r[4] = sp + 8; wE = 4;
               ctrl_ready = t + 4;
             end
          10: begin
               longint unsigned sp = r[4] - 8;
               if (!dok(sp)) begin stat = 3; break; end
               wr8(sp, va); r[4] = sp; wE = 4; pc = valP;
             end
          11: begin
               longint unsigned sp = r[4];
               if (!dok(sp)) begin stat = 3; break; end
               r[4] = sp + 8; rset(ra, rd8(sp)); wE = 4; wM = ra; pc = valP;
             end
          default: ;
        endcase
        if (wE != 15) reg_ready[wE] = wE_ready;
        if (wM != 15) reg_ready[wM] = t + 4;
        steps++;
      end
    endfunction

    // cycle (counted from the first fetch as cycle 0) at which the processor
    // reports a status other than AOK: the last instruction leaves decode at
    // t_last, reaches writeback 3 cycles later, and Stat is visible 1 later
    function int halt_cycle();
      return t_last + 4;
    endfunction
  endclass

  // random program generator. Register use: %r14 = data base (0x100),
  // %r12/%r13 = loop counter and constant, %rsp = stack; the others are free.
  class y86_gen;
    y86_asm a;
    int free_regs [$] = '{0, 1, 2, 3, 5, 6, 7, 8, 9, 10, 11};
    int fpos [$];        // call sites to patch with function addresses
    int ffun [$];
    int nfun;

    function int rr();
      return free_regs[$urandom_range(0, free_regs.size() - 1)];
    endfunction

    function void simple();
      case ($urandom_range(0, 9))
        0, 1, 2: a.opq($urandom_range(0, 3), rr(), rr());
        3: a.irmovq({$urandom, $urandom} >> $urandom_range(0, 60), rr());
        4: a.cmov($urandom_range(0, 6), rr(), rr());
        5: a.mrmovq(8 * $urandom_range(0, 40), 14, rr());
        6: a.rmmovq(rr(), 8 * $urandom_range(0, 40), 14);
        7: a.nop();
        8: a.opq($urandom_range(0, 1), rr(), rr());
        default: a.cmov(0, rr(), rr());
      endcase
    endfunction

    function void build(int items);
      a = new();
      nfun = 3;
      a.irmovq(64'h100, 14);
      a.irmovq(64'hC00, 4);
      for (int i = 0; i < items; i++) begin
        case ($urandom_range(0, 11))
          0: begin            // forward conditional jump over 1..3 instructions
               int p, n;
               p = a.jxx($urandom_range(1, 6), 0);
               n = $urandom_range(1, 3);
               for (int k = 0; k < n; k++) simple();
               a.patch(p, a.here());
             end
          1: begin            // counted loop
               int top, p;
               a.irmovq($urandom_range(1, 4), 13);
               a.irmovq(1, 12);
               top = a.here();
               for (int k = 0; k < $urandom_range(1, 3); k++) simple();
               a.opq(1, 12, 13);
               p = a.jxx(4, top);
             end
          2: begin            // call a leaf function
               fpos.push_back(a.call(0));
               ffun.push_back($urandom_range(0, nfun - 1));
             end
          3: begin a.pushq(rr()); end
          4: begin a.popq(rr()); end
          5: begin int p; p = a.jxx(0, 0); a.patch(p, a.here()); end
          default: simple();
        endcase
      end
      a.halt();
      for (int f = 0; f < nfun; f++) begin
        int addr;
        addr = a.here();
        foreach (fpos[i]) if (ffun[i] == f) a.patch(fpos[i], addr);
        for (int k = 0; k < $urandom_range(0, 3); k++) simple();
        a.ret();
      end
    endfunction
  endclass

`endif
