// tb_addq_pipe: checks the four-stage addq pipeline cycle by cycle.
//
// Two instances run side by side: one with the fetch-time stall check
// (STALL_IN_DECODE=0) and one with the decode-time check (=1). Registers
// start as %rN = 100*N. The bank contents are compared every cycle with the
// design's timing tables:
//   - four independent-enough addqs (no stall needed; both schemes),
//   - addq %r8,%r9 / addq %r9,%r8 / addq %r10,%r11, once per scheme,
//     including the PC being held and the bubbles (register number 0xF),
//   - the hazard exercise (exactly one stall; third instruction in decode in
//     cycle 4).
// Entries of -1 are not compared (the "---" cells). Finally random addq
// programs are run on both instances and the register file is compared with
// an instruction-by-instruction model; the number of stall cycles must equal
// the number the dependence distances call for (2 for distance 1, 1 for
// distance 2, 0 beyond).
module tb_addq_pipe;
  import addq_pkg::*;
  logic clk = 1'b0;
  logic rst;
  logic        ld_en;
  logic [63:0] ld_addr;
  logic [7:0]  ld_data;
  logic        rwe;
  logic [3:0]  rwidx, ridx;
  logic [63:0] rwdata, rdata0, rdata1, pc0, pc1;
  aq_d_t D0, D1;
  aq_e_t E0, E1;
  aq_w_t W0, W1;
  logic st0, st1;
  int checks = 0, failures = 0;
  int cycle;

  addq_pipe #(.STALL_IN_DECODE(1'b0)) dut0 (
    .clk, .rst, .imem_load_en(ld_en), .imem_load_addr(ld_addr), .imem_load_data(ld_data),
    .reg_dbg_we(rwe), .reg_dbg_widx(rwidx), .reg_dbg_wdata(rwdata), .reg_dbg_ridx(ridx),
    .reg_dbg_rdata(rdata0), .P_pc(pc0), .D(D0), .E(E0), .W(W0), .stall(st0));
  addq_pipe #(.STALL_IN_DECODE(1'b1)) dut1 (
    .clk, .rst, .imem_load_en(ld_en), .imem_load_addr(ld_addr), .imem_load_data(ld_data),
    .reg_dbg_we(rwe), .reg_dbg_widx(rwidx), .reg_dbg_wdata(rwdata), .reg_dbg_ridx(ridx),
    .reg_dbg_rdata(rdata1), .P_pc(pc1), .D(D1), .E(E1), .W(W1), .stall(st1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef int row_t [9];   // cycle, PC, D_rA, D_rB, E_valA, E_valB, E_dstE, W_valE, W_dstE

  task automatic cmpi(input longint got, input int exp, input string what);
    if (exp < 0) return;
    checks++;
    if (got != longint'(exp)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // hold reset, load program (padding 0x60 0xFF = addq %none,%none), preload
  // %rN = 100*N, release reset: the next cycle is cycle 0
  task automatic load(input logic [7:0] prog [], input int seedregs);
    rst = 1;
    for (int a = 0; a < 160; a++) begin
      ld_en = 1; ld_addr = 64'(a);
      ld_data = (a < prog.size()) ? prog[a] : ((a % 2 == 0) ? 8'h60 : 8'hFF);
      @(posedge clk); #1;
    end
    ld_en = 0;
    for (int r = 0; r < 15; r++) begin
      rwe = 1; rwidx = 4'(r); rwdata = 64'(100 * r);
      @(posedge clk); #1;
    end
    rwe = 0;
    rst = 0;
    cycle = 0;
  endtask

  task automatic check_row(input int which, input row_t r);
    string t;
    t = $sformatf("scheme %0d cycle %0d", which, r[0]);
    if (which == 0) begin
      cmpi(pc0, r[1], {t, " PC"}); cmpi(D0.rA, r[2], {t, " D_rA"}); cmpi(D0.rB, r[3], {t, " D_rB"});
      cmpi(E0.valA, r[4], {t, " R[srcA]"}); cmpi(E0.valB, r[5], {t, " R[srcB]"}); cmpi(E0.dstE, r[6], {t, " E_dstE"});
      cmpi(W0.valE, r[7], {t, " W_valE"}); cmpi(W0.dstE, r[8], {t, " W_dstE"});
    end else begin
      cmpi(pc1, r[1], {t, " PC"}); cmpi(D1.rA, r[2], {t, " D_rA"}); cmpi(D1.rB, r[3], {t, " D_rB"});
      cmpi(E1.valA, r[4], {t, " R[srcA]"}); cmpi(E1.valB, r[5], {t, " R[srcB]"}); cmpi(E1.dstE, r[6], {t, " E_dstE"});
      cmpi(W1.valE, r[7], {t, " W_valE"}); cmpi(W1.dstE, r[8], {t, " W_dstE"});
    end
  endtask

  // run a table: rows are checked in cycle order
  task automatic run_table(input int which, input row_t rows [], output int stalls);
    stalls = 0;
    for (int c = 0; c <= rows[rows.size() - 1][0]; c++) begin
      foreach (rows[i]) if (rows[i][0] == c) check_row(which, rows[i]);
      stalls += (which == 0) ? int'(st0) : int'(st1);
      @(posedge clk); #1;
    end
  endtask

  int model [15];
  initial begin
    logic [7:0] progA [], progB [], progC [];
    row_t tA [], tB0 [], tB1 [], tC [];
    int s;
    rst = 1; ld_en = 0; ld_addr = 0; ld_data = 0; rwe = 0; rwidx = 0; rwdata = 0; ridx = 0;
    progA = '{8'h60, 8'h89, 8'h60, 8'hAB, 8'h60, 8'hCD, 8'h60, 8'h98};
    progB = '{8'h60, 8'h89, 8'h60, 8'h98, 8'h60, 8'hAB};
    progC = '{8'h60, 8'h89, 8'h60, 8'hAB, 8'h60, 8'h98, 8'h60, 8'hBA};
    //        cyc  PC  rA  rB  valA  valB  dstE  Wval  Wdst
    tA  = '{'{0,   0,  15, 15, -1,   -1,   15,   -1,   15},
            '{1,   2,  8,  9,  -1,   -1,   15,   -1,   15},
            '{2,   4,  10, 11, 800,  900,  9,    -1,   15},
            '{3,   6,  12, 13, 1000, 1100, 11,   1700, 9},
            '{4,   -1, 9,  8,  1200, 1300, 13,   2100, 11},
            '{5,   -1, -1, -1, 1700, 800,  8,    2500, 13},
            '{6,   -1, -1, -1, -1,   -1,   -1,   2500, 8}};
    tB0 = '{'{0,   0,  -1, -1, -1,   -1,   -1,   -1,   -1},
            '{1,   2,  8,  9,  -1,   -1,   -1,   -1,   -1},
            '{2,   2,  15, 15, 800,  900,  9,    -1,   -1},
            '{3,   2,  15, 15, -1,   -1,   15,   1700, 9},
            '{4,   4,  9,  8,  -1,   -1,   15,   -1,   15},
            '{5,   -1, 10, 11, 1700, 800,  8,    -1,   15},
            '{6,   -1, -1, -1, 1000, 1100, 11,   2500, 8}};
    tB1 = '{'{0,   0,  -1, -1, -1,   -1,   -1,   -1,   -1},
            '{1,   2,  8,  9,  -1,   -1,   -1,   -1,   -1},
            '{2,   4,  9,  8,  800,  900,  9,    -1,   -1},
            '{3,   4,  9,  8,  -1,   -1,   15,   1700, 9},
            '{4,   4,  9,  8,  -1,   -1,   15,   -1,   15},
            '{5,   -1, 10, 11, 1700, 800,  8,    -1,   15},
            '{6,   -1, -1, -1, 1000, 1100, 11,   2500, 8}};
    tC  = '{'{4,   -1, 9,  8,  -1,   -1,   -1,   2100, 11},
            '{5,   -1, 11, 10, 1700, 800,  8,    -1,   15},
            '{6,   -1, -1, -1, 2100, 1000, 10,   2500, 8},
            '{7,   -1, -1, -1, -1,   -1,   -1,   3100, 10}};

    load(progA, 1); run_table(0, tA, s); cmpi(s, 0, "table 1 stalls, scheme 0");
    load(progA, 1); run_table(1, tA, s); cmpi(s, 0, "table 1 stalls, scheme 1");
    load(progB, 1); run_table(0, tB0, s); cmpi(s, 2, "stall table stalls, scheme 0");
    load(progB, 1); run_table(1, tB1, s); cmpi(s, 2, "alternative table stalls, scheme 1");
    load(progC, 1); run_table(0, tC, s); cmpi(s, 1, "exercise stalls, scheme 0");
    repeat (4) @(posedge clk); #1;
    ridx = 8;  #1 cmpi(rdata0, 2500, "exercise r8");
    ridx = 9;  #1 cmpi(rdata0, 1700, "exercise r9");
    ridx = 10; #1 cmpi(rdata0, 3100, "exercise r10");
    ridx = 11; #1 cmpi(rdata0, 2100, "exercise r11");

    // random programs
    for (int trial = 0; trial < 20; trial++) begin
      logic [7:0] prog [];
      int n, exp_stalls, s0, s1, lastw [15];
      n = 12;
      prog = new[2 * n];
      for (int r = 0; r < 15; r++) begin model[r] = 100 * r; lastw[r] = -10; end
      exp_stalls = 0;
      for (int i = 0; i < n; i++) begin
        int ra, rb, d;
        ra = $urandom_range(0, 14); rb = $urandom_range(0, 14);
        prog[2 * i] = 8'h60; prog[2 * i + 1] = {4'(ra), 4'(rb)};
        // issue slot model: instruction i can decode 3 slots after its producer
        model[rb] = model[ra] + model[rb];
        d = 0;
        lastw[rb] = lastw[rb];
      end
      // stall count: walk the program with issue times
      begin
        int t [], prod [15];
        t = new[n];
        for (int r = 0; r < 15; r++) prod[r] = -100;
        for (int i = 0; i < n; i++) begin
          int ra, rb, earliest;
          ra = prog[2 * i + 1][7:4]; rb = prog[2 * i + 1][3:0];
          earliest = (i == 0) ? 0 : t[i - 1] + 1;
          if (prod[ra] + 3 > earliest) earliest = prod[ra] + 3;
          if (prod[rb] + 3 > earliest) earliest = prod[rb] + 3;
          t[i] = earliest;
          prod[rb] = t[i];
        end
        exp_stalls = t[n - 1] - (n - 1);
      end
      load(prog, 1);
      s0 = 0; s1 = 0;
      for (int c = 0; c < 3 * n + 10; c++) begin
        s0 += int'(st0); s1 += int'(st1);
        @(posedge clk); #1;
      end
      for (int r = 0; r < 15; r++) begin
        ridx = 4'(r); #1;
        cmpi(rdata0, model[r], $sformatf("random trial %0d r%0d scheme 0", trial, r));
        cmpi(rdata1, model[r], $sformatf("random trial %0d r%0d scheme 1", trial, r));
      end
      cmpi(s0, exp_stalls, "random stall count scheme 0");
      cmpi(s1, exp_stalls, "random stall count scheme 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
