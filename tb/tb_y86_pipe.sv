// tb_y86_pipe: end-to-end test of the five-stage Y86-64 pipeline.
//
// Each program is assembled, loaded into the whole instruction memory (the
// rest filled with 0 = halt), the registers get random values through the
// debug port and the reference model is given the same registers and the
// data memory's current contents. Then the processor runs until it reports
// a status other than AOK. Compared with the reference model:
//   - the final status, all registers, the condition codes and every byte of
//     data memory;
//   - the exact cycle count, and the number of data-stall, conditional-jump
//     wait and ret wait cycles and of retired instructions.
// Directed programs: the design's own examples (addq %r8,%r9 followed by a
// dependent addq; subq + je; call + ret; pushq), each error kind (halt,
// invalid instruction, data address out of range, jump outside instruction
// memory), then random programs. Every mechanism (data stall, jCC wait, ret
// wait, each stop status) must have happened at least once.
module tb_y86_pipe;
  import y86_pkg::*;
  `include "tb/y86_tb_lib.svh"
  localparam int IB = 4096, DB = 4096;

  logic clk = 1'b0;
  logic rst;
  logic        imem_load_en;
  logic [63:0] imem_load_addr;
  logic [7:0]  imem_load_data;
  logic [63:0] dmem_dbg_addr, dmem_dbg_data, reg_dbg_wdata, reg_dbg_data;
  logic        reg_dbg_we;
  logic [3:0]  reg_dbg_widx, reg_dbg_idx;
  stat_e       stat;
  logic        halted;
  cc_t         cc;
  logic        ev_data_stall, ev_jcc_wait, ev_ret_wait, ev_retire;
  int checks = 0, failures = 0;
  int n_data = 0, n_jcc = 0, n_ret = 0, n_hlt = 0, n_adr = 0, n_ins = 0;

  y86_pipe #(.IMEM_BYTES(IB), .DMEM_BYTES(DB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
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

  // run one program; init_regs: -1 = random, otherwise %rN = init_regs*N
  task automatic run_prog(input string name, input y86_asm a, input int init_regs,
                          output y86_ref m);
    int cyc, dsc, jw, rw, ret_n;
    m = new(IB, DB);
    rst = 1;
    for (int i = 0; i < IB; i++) begin
      m.imem[i] = (i < a.b.size()) ? a.b[i] : 8'h00;
      imem_load_en = 1; imem_load_addr = 64'(i); imem_load_data = m.imem[i];
      @(posedge clk); #1;
    end
    imem_load_en = 0;
    for (int r = 0; r < NREG; r++) begin
      m.r[r] = (init_regs < 0) ? {$urandom, $urandom} : 64'(init_regs * r);
      reg_dbg_we = 1; reg_dbg_widx = 4'(r); reg_dbg_wdata = m.r[r];
      @(posedge clk); #1;
    end
    reg_dbg_we = 0;
    for (int ad = 0; ad < DB; ad += 8) begin
      dmem_dbg_addr = 64'(ad); #1;
      for (int k = 0; k < 8; k++) m.dmem[ad + k] = dmem_dbg_data[8*k +: 8];
    end
    m.run(100000);
    rst = 0;
    cyc = 0; dsc = 0; jw = 0; rw = 0; ret_n = 0;
    while (!halted && cyc < 200000) begin
      dsc += int'(ev_data_stall); jw += int'(ev_jcc_wait); rw += int'(ev_ret_wait);
      ret_n += int'(ev_retire);
      @(posedge clk); #1;
      cyc++;
    end
    cmp(stat, m.stat, {name, " status"});
    cmp(cyc, m.halt_cycle(), {name, " cycles"});
    cmp(dsc, m.data_stalls, {name, " data-stall cycles"});
    cmp(jw, m.jcc_waits, {name, " jCC wait cycles"});
    cmp(rw, m.ret_waits, {name, " ret wait cycles"});
    cmp(ret_n, m.steps, {name, " retired instructions"});
    for (int r = 0; r < NREG; r++) begin
      reg_dbg_idx = 4'(r); #1;
      cmp(reg_dbg_data, m.r[r], $sformatf("%s %%r%0d", name, r));
    end
    cmp({cc.zf, cc.sf, cc.of}, {m.zf, m.sf, m.of}, {name, " condition codes"});
    for (int ad = 0; ad < DB; ad += 8) begin
      dmem_dbg_addr = 64'(ad); #1;
      cmp(dmem_dbg_data, m.rd8(ad), $sformatf("%s mem[0x%0h]", name, ad));
    end
    n_data += dsc; n_jcc += jw; n_ret += rw;
    n_hlt += (stat == S_HLT); n_adr += (stat == S_ADR); n_ins += (stat == S_INS);
    // the machine stays stopped
    repeat (5) @(posedge clk);
    #1 cmp(halted, 1, {name, " stays halted"});
  endtask

  initial begin
    y86_asm a;
    y86_ref m;
    y86_gen g;
    int p;
    rst = 1; imem_load_en = 0; imem_load_addr = 0; imem_load_data = 0;
    dmem_dbg_addr = 0; reg_dbg_we = 0; reg_dbg_widx = 0; reg_dbg_wdata = 0; reg_dbg_idx = 0;

    // data hazard: addq %r8,%r9 then addq %r9,%r8 (r8=800, r9=900 ...)
    a = new(); a.opq(0, 8, 9); a.opq(0, 9, 8); a.opq(0, 10, 11); a.halt();
    run_prog("data hazard", a, 100, m);
    cmp(m.r[9], 1700, "example r9"); cmp(m.r[8], 2500, "example r8");
    cmp(m.data_stalls, 3, "example: 3 stall cycles in five stages");

    // conditional jump: subq %r8,%r8 ; je label ; ... label: irmovq
    a = new(); a.opq(1, 8, 8); p = a.jxx(3, 0); a.irmovq(1, 0); a.halt();
    a.patch(p, a.here()); a.irmovq(64'h77, 1); a.halt();
    run_prog("je taken", a, 100, m);
    cmp(m.r[1], 64'h77, "je target reached"); cmp(m.jcc_waits, 2, "je waits 2 cycles");
    a = new(); a.opq(1, 8, 9); p = a.jxx(3, 0); a.irmovq(5, 0); a.halt();
    a.patch(p, a.here()); a.irmovq(64'h77, 1); a.halt();
    run_prog("je not taken", a, 100, m);
    cmp(m.r[0], 5, "fall-through reached");

    // call empty ; addq ; empty: ret
    a = new(); a.irmovq(64'h800, 4); p = a.call(0); a.opq(0, 8, 9); a.halt();
    a.patch(p, a.here()); a.ret();
    run_prog("call/ret", a, 100, m);
    cmp(m.ret_waits, 3, "ret waits 3 cycles"); cmp(m.r[9], 1700, "addq after return");

    // pushq / popq
    a = new(); a.irmovq(64'h800, 4); a.pushq(8); a.pushq(4); a.popq(1); a.popq(2); a.halt();
    run_prog("push/pop", a, 100, m);

    // errors
    a = new(); a.irmovq(3, 1); a.op1(12, 0); a.irmovq(4, 2); a.halt();
    run_prog("invalid instruction", a, -1, m);
    a = new(); a.irmovq(64'hFFF9, 1); a.mrmovq(0, 1, 2); a.irmovq(4, 3); a.halt();
    run_prog("data address error", a, -1, m);
    a = new(); a.irmovq(64'hFFF9, 1); a.rmmovq(2, 0, 1); a.halt();
    run_prog("store address error", a, -1, m);
    a = new(); a.irmovq(1, 1); p = a.jxx(0, 64'h2000); a.halt();
    run_prog("fetch address error", a, -1, m);
    a = new(); a.irmovq(16, 4); a.ret(); a.halt();
    run_prog("ret stack error", a, -1, m);

    // random programs
    for (int t = 0; t < 40; t++) begin
      g = new();
      g.build(30);
      run_prog($sformatf("random %0d", t), g.a, -1, m);
    end

    $display("mechanisms: data-stall cycles %0d, jCC wait cycles %0d, ret wait cycles %0d, HLT %0d, ADR %0d, INS %0d",
             n_data, n_jcc, n_ret, n_hlt, n_adr, n_ins);
    cmp(n_data > 0, 1, "data stall happened");
    cmp(n_jcc > 0, 1, "jCC wait happened");
    cmp(n_ret > 0, 1, "ret wait happened");
    cmp(n_hlt > 0, 1, "halt happened");
    cmp(n_adr > 0, 1, "address error happened");
    cmp(n_ins > 0, 1, "invalid instruction happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
