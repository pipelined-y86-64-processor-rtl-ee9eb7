// tb_y86_fetch: checks the fetch stage.
//
// For every instruction kind (and invalid codes) it encodes random
// instructions the way an assembler would, presents them as the fetched
// bytes and checks icode/ifun/rA/rB/valC/valP/stat and the predicted PC
// against a table of instruction lengths written independently here. It
// also checks the PC selection (taken conditional jump in memory, ret in
// writeback, predicted PC otherwise) and the end-of-memory check
// (IMEM_BYTES = 4096).
module tb_y86_fetch;
  import y86_pkg::*;
  logic [63:0] P_predPC, M_valE, W_valM, pc, f_predPC;
  icode_e M_icode, W_icode;
  logic [3:0] M_ifun;
  logic M_cnd, imem_error;
  logic [79:0] i10bytes;
  d_reg_t f_out;
  int checks = 0, failures = 0;

  y86_fetch #(.IMEM_BYTES(4096)) dut (.*);

  initial begin
    #1000000;
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

  // length in bytes of each icode (0 = invalid)
  function automatic int ilen(input logic [3:0] ic);
    case (ic)
      4'h0, 4'h1, 4'h9: return 1;
      4'h2, 4'h6, 4'hA, 4'hB: return 2;
      4'h7, 4'h8: return 9;
      4'h3, 4'h4, 4'h5: return 10;
      default: return 0;
    endcase
  endfunction

  function automatic int max_ifun(input logic [3:0] ic);
    case (ic)
      4'h2, 4'h7: return 6;
      4'h6: return 3;
      default: return 0;
    endcase
  endfunction

  initial begin
    M_icode = I_NOP; W_icode = I_NOP; M_ifun = 0; M_cnd = 0; M_valE = 64'h1234; W_valM = 64'h5678;
    imem_error = 0;
    for (int it = 0; it < 3000; it++) begin
      logic [3:0] ic, fn, ra, rb;
      logic [63:0] c, epc, evalP, epred;
      int len;
      stat_e est;
      ic = 4'($urandom_range(0, 13));
      fn = ($urandom_range(0, 4) == 0) ? 4'($urandom) : 4'($urandom_range(0, max_ifun(ic)));
      ra = 4'($urandom); rb = 4'($urandom); c = {$urandom, $urandom};
      P_predPC = 64'($urandom_range(0, 4100));
      len = ilen(ic);
      if (len == 10)      i10bytes = {c, ra, rb, ic, fn};
      else if (len == 9)  i10bytes = {8'h00, c, ic, fn};
      else                i10bytes = {64'(c), ra, rb, ic, fn};
      imem_error = (P_predPC >= 4096);
      #1;
      epc = P_predPC;
      evalP = epc + 64'((len == 0) ? 1 : len);
      if (len == 0 && ic inside {4'hC, 4'hD}) evalP = epc + 1;
      if (imem_error || evalP > 4096)       est = S_ADR;
      else if (len == 0 || fn > max_ifun(ic)) est = S_INS;
      else if (ic == 4'h0)                 est = S_HLT;
      else                                 est = S_AOK;
      cmp(pc, epc, "pc");
      cmp(64'(f_out.stat), 64'(est), $sformatf("stat ic=%h fn=%h pc=%0d", ic, fn, epc));
      if (est != S_ADR) begin
        cmp(64'(f_out.icode), 64'(ic), "icode");
        cmp(64'(f_out.ifun), 64'(fn), "ifun");
        cmp(f_out.valP, evalP, $sformatf("valP ic=%h", ic));
        if (len == 2 || len == 10) begin
          cmp(64'(f_out.rA), 64'(ra), "rA");
          cmp(64'(f_out.rB), 64'(rb), "rB");
        end else begin
          cmp(64'(f_out.rA), 64'hF, "rA none");
          cmp(64'(f_out.rB), 64'hF, "rB none");
        end
        if (len >= 9) cmp(f_out.valC, c, "valC");
      end else begin
        cmp(64'(f_out.icode), 64'(I_NOP), "icode on ADR");
      end
      if (est != S_AOK)                         epred = epc;
      else if (ic == 4'h8 || (ic == 4'h7 && fn == 0)) epred = c;
      else                                      epred = evalP;
      cmp(f_predPC, epred, $sformatf("predPC ic=%h fn=%h", ic, fn));
    end
    // PC selection
    P_predPC = 64'h100; i10bytes = {72'h0, 8'h10};
    M_icode = I_JXX; M_ifun = C_E; M_cnd = 1; #1 cmp(pc, 64'h1234, "taken jCC in M");
    M_cnd = 0; #1 cmp(pc, 64'h100, "not-taken jCC in M");
    M_ifun = C_YES; M_cnd = 1; #1 cmp(pc, 64'h100, "jmp in M does not redirect");
    M_icode = I_NOP; W_icode = I_RET; #1 cmp(pc, 64'h5678, "ret in W");
    cmp(f_out.valP, 64'h5679, "valP from selected pc");
    W_icode = I_NOP; #1 cmp(pc, 64'h100, "default predicted PC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
