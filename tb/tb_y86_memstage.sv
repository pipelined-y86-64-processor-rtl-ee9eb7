// tb_y86_memstage: checks memory-stage control together with a data memory.
//
// A y86_dmem (256 bytes) is connected as in the processor. Random
// execute->memory records of every icode are applied; the testbench keeps
// its own byte model and checks which instructions read or write, at which
// address (valE, or valA for popq/ret), the value passed on as valM, that a
// write is blocked when hold is high or the status is not AOK, and that an
// out-of-range access turns the status into ADR.
module tb_y86_memstage;
  import y86_pkg::*;
  localparam int BYTES = 256;
  logic clk = 1'b0;
  m_reg_t M;
  logic hold, mem_read, mem_write, mem_error;
  logic [63:0] mem_addr, mem_wdata, mem_rdata, dbg_addr, dbg_rdata;
  w_reg_t m_out;
  int checks = 0, failures = 0;
  logic [7:0] model [BYTES];

  y86_memstage dut (.*);
  y86_dmem #(.BYTES(BYTES)) u_mem (.clk, .addr(mem_addr), .re(mem_read), .we(mem_write),
    .wdata(mem_wdata), .rdata(mem_rdata), .error(mem_error), .dbg_addr, .dbg_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] mread(input logic [63:0] a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = model[a + k];
    return v;
  endfunction

  initial begin
    M = M_BUBBLE; hold = 0; dbg_addr = 0;
    // fill memory with rmmovq records
    for (int a = 0; a < BYTES; a += 8) begin
      M.icode = I_RMMOVQ; M.stat = S_AOK; M.valE = 64'(a); M.valA = {$urandom, $urandom};
      for (int k = 0; k < 8; k++) model[a + k] = M.valA[8*k +: 8];
      @(posedge clk); #1;
    end
    for (int it = 0; it < 2500; it++) begin
      logic [3:0] ic;
      logic rd, wr, ok, eff;
      logic [63:0] ad;
      ic = 4'($urandom_range(0, 11));
      M.icode = icode_e'(ic); M.ifun = 0; M.cnd = 0;
      M.stat = ($urandom_range(0, 15) == 0) ? S_INS : S_AOK;
      M.valE = 64'($urandom_range(0, BYTES + 8)); M.valA = 64'($urandom_range(0, BYTES + 8));
      if ($urandom_range(0, 1)) M.valA = {$urandom, $urandom} ;
      M.dstE = 4'($urandom); M.dstM = 4'($urandom);
      hold = ($urandom_range(0, 9) == 0);
      rd = ic inside {4'h5, 4'hB, 4'h9};
      wr = ic inside {4'h4, 4'hA, 4'h8};
      ad = (ic inside {4'hB, 4'h9}) ? M.valA : M.valE;
      ok = ad <= BYTES - 8;
      #1;
      if (rd || wr) cmp(mem_addr, ad, $sformatf("address ic=%h", ic));
      cmp(64'(mem_read), 64'(rd), "is read");
      eff = wr && M.stat == S_AOK && !hold;
      cmp(64'(mem_write), 64'(eff), "is write");
      if (rd) cmp(m_out.valM, ok ? mread(ad) : 64'd0, "valM");
      cmp(64'(m_out.stat), (M.stat == S_AOK && (rd || eff) && !ok) ? 64'(S_ADR) : 64'(M.stat), "stat");
      cmp(m_out.valE, M.valE, "valE");
      cmp(64'({m_out.dstE, m_out.dstM}), 64'({M.dstE, M.dstM}), "dst");
      @(posedge clk); #1;
      if (eff && ok) for (int k = 0; k < 8; k++) model[ad + k] = M.valA[8*k +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
