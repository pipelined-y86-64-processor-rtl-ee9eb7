// tb_lecture_top: end-to-end test of the top level, at its default sizes.
//
// Both processors run at once on the shared clock.
//   Y86-64 pipeline: a program that computes through a counted loop with a
//   conditional branch, calls a function that pushes and pops, stores and
//   loads through memory, and halts. The result is compared with the
//   instruction-set reference model: status, registers, condition codes,
//   data memory, exact cycle count and the stall/wait counts.
//   addq pipeline: the design's stall example (addq %r8,%r9 / addq %r9,%r8 /
//   addq %r10,%r11) followed by random addqs, compared with a register model.
//   Y86-64 again: the design's control-hazard example, addq %r8,%r9 followed
//   by je 0xFFFF and addq %r10,%r11, once with the jump taken (it lands on a
//   halt at the last byte of instruction memory) and once not taken.
// Each mechanism (Y86 data stall, jCC wait, ret wait, halt; addq stall) is
// counted and must occur at least once.
module tb_lecture_top;
  import y86_pkg::*;
  import addq_pkg::*;
  `include "tb/y86_tb_lib.svh"

  logic clk = 1'b0;
  logic rst;
  logic        y_ld_en, y_rwe;
  logic [63:0] y_ld_addr, y_dbg_addr, y_dbg_data, y_rwdata, y_rdata;
  logic [7:0]  y_ld_data;
  logic [3:0]  y_rwidx, y_ridx;
  stat_e       y_stat;
  logic        y_halted, y_ds, y_jw, y_rw, y_ret;
  cc_t         y_cc;
  logic        a_ld_en, a_rwe, a_stall;
  logic [63:0] a_ld_addr, a_rwdata, a_rdata, a_pc;
  logic [7:0]  a_ld_data;
  logic [3:0]  a_rwidx, a_ridx;
  aq_d_t a_D; aq_e_t a_E; aq_w_t a_W;
  int checks = 0, failures = 0;
  localparam int IB = 65536, DB = 65536;   // the top's default memory sizes

  lecture_top dut (
    .clk, .rst,
    .y86_imem_load_en(y_ld_en), .y86_imem_load_addr(y_ld_addr), .y86_imem_load_data(y_ld_data),
    .y86_dmem_dbg_addr(y_dbg_addr), .y86_dmem_dbg_data(y_dbg_data),
    .y86_reg_dbg_we(y_rwe), .y86_reg_dbg_widx(y_rwidx), .y86_reg_dbg_wdata(y_rwdata),
    .y86_reg_dbg_idx(y_ridx), .y86_reg_dbg_data(y_rdata),
    .y86_stat(y_stat), .y86_halted(y_halted), .y86_cc(y_cc),
    .y86_ev_data_stall(y_ds), .y86_ev_jcc_wait(y_jw), .y86_ev_ret_wait(y_rw), .y86_ev_retire(y_ret),
    .aq_imem_load_en(a_ld_en), .aq_imem_load_addr(a_ld_addr), .aq_imem_load_data(a_ld_data),
    .aq_reg_dbg_we(a_rwe), .aq_reg_dbg_widx(a_rwidx), .aq_reg_dbg_wdata(a_rwdata),
    .aq_reg_dbg_ridx(a_ridx), .aq_reg_dbg_rdata(a_rdata),
    .aq_pc(a_pc), .aq_D(a_D), .aq_E(a_E), .aq_W(a_W), .aq_stall(a_stall));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  initial begin
    y86_asm a;
    y86_ref m;
    int p, pf, top, cyc, ycyc, nds, njw, nrw, nret, nastall;
    byte unsigned aprog [$];
    longint unsigned amodel [15];
    rst = 1;
    y_ld_en = 0; y_ld_addr = 0; y_ld_data = 0; y_dbg_addr = 0; y_rwe = 0; y_rwidx = 0; y_rwdata = 0; y_ridx = 0;
    a_ld_en = 0; a_ld_addr = 0; a_ld_data = 0; a_rwe = 0; a_rwidx = 0; a_rwdata = 0; a_ridx = 0;

    // Y86-64 program: sum 1..5 into %rax with a loop, call a function that
    // stores and reloads it through the stack and memory, then halt
    a = new();
    a.irmovq(64'h800, 4);          // stack
    a.irmovq(64'h100, 14);         // data base
    a.irmovq(0, 0);                // sum
    a.irmovq(5, 13);               // counter
    a.irmovq(1, 12);
    top = a.here();
    a.opq(0, 13, 0);               // sum += counter (depends on previous line)
    a.opq(1, 12, 13);              // counter -= 1
    p = a.jxx(4, top);             // jne loop
    pf = a.call(0);
    a.mrmovq(0, 14, 3);            // reload the stored value
    a.opq(0, 0, 3);                // %rbx = 2 * sum
    a.halt();
    a.patch(pf, a.here());
    a.pushq(0);
    a.popq(1);
    a.rmmovq(1, 0, 14);
    a.ret();

    // addq program: the stall example, then random addqs
    aprog = '{8'h60, 8'h89, 8'h60, 8'h98, 8'h60, 8'hAB};
    for (int i = 0; i < 10; i++) begin aprog.push_back(8'h60); aprog.push_back(8'($urandom)); end
    for (int r = 0; r < 15; r++) amodel[r] = 100 * r;
    for (int i = 0; i < aprog.size(); i += 2) begin
      int ra, rb;
      ra = aprog[i + 1] >> 4; rb = aprog[i + 1] & 15;
      if (rb != 15) amodel[rb] = ((ra != 15) ? amodel[ra] : 0) + amodel[rb];
    end

    // load both while in reset
    m = new(IB, DB);
    for (int i = 0; i < IB; i++) begin
      m.imem[i] = (i < a.b.size()) ? a.b[i] : 8'h00;
      y_ld_en = 1; y_ld_addr = 64'(i); y_ld_data = m.imem[i];
      a_ld_en = 1; a_ld_addr = 64'(i);
      a_ld_data = (i < aprog.size()) ? aprog[i] : ((i % 2 == 0) ? 8'h60 : 8'hFF);
      @(posedge clk); #1;
    end
    y_ld_en = 0; a_ld_en = 0;
    for (int r = 0; r < 15; r++) begin
      m.r[r] = 64'(100 * r);
      y_rwe = 1; y_rwidx = 4'(r); y_rwdata = m.r[r];
      a_rwe = 1; a_rwidx = 4'(r); a_rwdata = 64'(100 * r);
      @(posedge clk); #1;
    end
    y_rwe = 0; a_rwe = 0;
    for (int ad = 0; ad < DB; ad += 8) begin
      y_dbg_addr = 64'(ad); #1;
      for (int k = 0; k < 8; k++) m.dmem[ad + k] = y_dbg_data[8*k +: 8];
    end
    m.run(10000);

    rst = 0;
    cyc = 0; nds = 0; njw = 0; nrw = 0; nret = 0; nastall = 0;
    while (!y_halted && cyc < 10000) begin
      nds += int'(y_ds); njw += int'(y_jw); nrw += int'(y_rw); nret += int'(y_ret);
      if (cyc < 40) nastall += int'(a_stall);
      @(posedge clk); #1;
      cyc++;
    end
    ycyc = cyc;
    while (cyc < 40) begin
      nastall += int'(a_stall);
      @(posedge clk); #1;
      cyc++;
    end

    // Y86 results
    cmp(y_stat, S_HLT, "y86 status");
    cmp(y_stat, m.stat, "y86 status vs model");
    cmp(m.r[0], 15, "model: sum 1..5");
    for (int r = 0; r < 15; r++) begin
      y_ridx = 4'(r); #1 cmp(y_rdata, m.r[r], $sformatf("y86 %%r%0d", r));
    end
    y_ridx = 3; #1 cmp(y_rdata, 30, "y86 %rbx = 2 * sum");
    cmp({y_cc.zf, y_cc.sf, y_cc.of}, {m.zf, m.sf, m.of}, "y86 condition codes");
    for (int ad = 0; ad < DB; ad += 8) begin
      y_dbg_addr = 64'(ad); #1 cmp(y_dbg_data, m.rd8(ad), $sformatf("y86 mem[0x%0h]", ad));
    end
    $display("y86: %0d cycles, %0d instructions, data-stall %0d, jCC wait %0d, ret wait %0d",
             m.halt_cycle(), nret, nds, njw, nrw);
    cmp(ycyc, m.halt_cycle(), "y86 cycles to halt");
    cmp(nds, m.data_stalls, "y86 data-stall cycles");
    cmp(njw, m.jcc_waits, "y86 jCC wait cycles");
    cmp(nrw, m.ret_waits, "y86 ret wait cycles");
    cmp(nret, m.steps, "y86 retired instructions");
    cmp(nds > 0, 1, "y86 data stall happened");
    cmp(njw > 0, 1, "y86 jCC wait happened");
    cmp(nrw > 0, 1, "y86 ret wait happened");

    // addq results
    for (int r = 0; r < 15; r++) begin
      a_ridx = 4'(r); #1 cmp(a_rdata, amodel[r], $sformatf("addq %%r%0d", r));
    end
    $display("addq: %0d stall cycles", nastall);
    cmp(nastall > 0, 1, "addq stall happened");

    // control-hazard example, taken and not taken
    for (int tk = 0; tk < 2; tk++) begin
      int wcyc, w_jw;
      a = new();
      a.opq(0, 8, 9);
      p = a.jxx(3, 64'hFFFF);
      a.opq(0, 10, 11);
      a.halt();
      m = new(IB, DB);
      rst = 1;
      for (int i = 0; i < IB; i++) begin
        m.imem[i] = (i < a.b.size()) ? a.b[i] : 8'h00;
        y_ld_en = 1; y_ld_addr = 64'(i); y_ld_data = m.imem[i];
        @(posedge clk); #1;
      end
      y_ld_en = 0;
      for (int r = 0; r < 15; r++) begin
        m.r[r] = 64'(100 * r);
        if (tk == 0 && r == 9) m.r[r] = -64'sd800;   // r8 + r9 = 0: ZF set, je taken
        y_rwe = 1; y_rwidx = 4'(r); y_rwdata = m.r[r];
        @(posedge clk); #1;
      end
      y_rwe = 0;
      for (int ad = 0; ad < DB; ad += 8) begin
        y_dbg_addr = 64'(ad); #1;
        for (int k = 0; k < 8; k++) m.dmem[ad + k] = y_dbg_data[8*k +: 8];
      end
      m.run(100);
      rst = 0;
      wcyc = 0; w_jw = 0;
      while (!y_halted && wcyc < 1000) begin
        w_jw += int'(y_jw);
        @(posedge clk); #1;
        wcyc++;
      end
      cmp(y_stat, S_HLT, $sformatf("je example %0d status", tk));
      cmp(wcyc, m.halt_cycle(), $sformatf("je example %0d cycles", tk));
      cmp(w_jw, 2, $sformatf("je example %0d waits two cycles", tk));
      y_ridx = 11; #1 cmp(y_rdata, (tk == 0) ? 1100 : 2100, $sformatf("je example %0d: addq after je %s", tk, (tk == 0) ? "skipped" : "executed"));
      for (int r = 0; r < 15; r++) begin
        y_ridx = 4'(r); #1 cmp(y_rdata, m.r[r], $sformatf("je example %0d %%r%0d", tk, r));
      end
      njw += w_jw;
    end
    cmp(njw >= 14, 1, "jCC waits over all runs");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
