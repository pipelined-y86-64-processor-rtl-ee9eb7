// tb_y86_hazard: checks the pipeline control logic.
//
// Directed cases first: the ret sequence (ret in decode, execute, memory:
// fetch stalls and decode gets a bubble; ret in writeback: normal), the
// conditional-jump sequence, a data hazard against each of the six
// destination fields, the priority of a data hazard over a control wait, and
// the freeze on a non-AOK status in writeback. Then random inputs against an
// independent formulation of the same rules.
module tb_y86_hazard;
  import y86_pkg::*;
  icode_e D_icode, E_icode, M_icode;
  logic [3:0] D_ifun, E_ifun, d_srcA, d_srcB, E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM;
  stat_e W_stat;
  logic F_stall, D_stall, D_bubble, E_stall, E_bubble, M_stall, W_stall, freeze;
  logic ev_data_stall, ev_jcc_wait, ev_ret_wait;
  int checks = 0, failures = 0;

  y86_hazard dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected controls as a string "F D E M W" of N (normal), S (stall), B (bubble)
  function automatic string ctl();
    string s;
    s = {F_stall ? "S" : "N",
         D_stall ? "S" : D_bubble ? "B" : "N",
         E_stall ? "S" : E_bubble ? "B" : "N",
         M_stall ? "S" : "N",
         W_stall ? "S" : "N"};
    return s;
  endfunction

  task automatic expect_ctl(input string exp, input string what);
    #1;
    checks++;
    if (ctl() != exp) begin
      failures++;
      $display("FAIL %s: got %s expected %s", what, ctl(), exp);
    end
  endtask

  task automatic idle();
    D_icode = I_NOP; E_icode = I_NOP; M_icode = I_NOP; D_ifun = 0; E_ifun = 0;
    d_srcA = 4'hF; d_srcB = 4'hF; E_dstE = 4'hF; E_dstM = 4'hF; M_dstE = 4'hF; M_dstM = 4'hF;
    W_dstE = 4'hF; W_dstM = 4'hF; W_stat = S_AOK;
  endtask

  initial begin
    idle(); expect_ctl("NNNNN", "idle");
    // ret moving down the pipe (ret reads %rsp; no writer in flight)
    D_icode = I_RET; d_srcA = 4; d_srcB = 4; expect_ctl("SBNNN", "ret in decode");
    idle(); E_icode = I_RET; E_dstE = 4; expect_ctl("SBNNN", "ret in execute");
    idle(); M_icode = I_RET; M_dstE = 4; expect_ctl("SBNNN", "ret in memory");
    idle(); W_dstE = 4; expect_ctl("NNNNN", "ret in writeback");
    // conditional jump
    idle(); D_icode = I_JXX; D_ifun = C_E; expect_ctl("SBNNN", "jCC in decode");
    idle(); E_icode = I_JXX; E_ifun = C_NE; expect_ctl("SBNNN", "jCC in execute");
    idle(); M_icode = I_JXX; expect_ctl("NNNNN", "jCC in memory");
    idle(); D_icode = I_JXX; D_ifun = C_YES; expect_ctl("NNNNN", "jmp in decode");
    // data hazards against each destination field
    for (int k = 0; k < 6; k++) begin
      idle(); d_srcA = 4'd9;
      case (k)
        0: E_dstE = 9; 1: E_dstM = 9; 2: M_dstE = 9; 3: M_dstM = 9; 4: W_dstE = 9; default: W_dstM = 9;
      endcase
      expect_ctl("SSBNN", $sformatf("data hazard srcA field %0d", k));
      d_srcA = 4'hF; d_srcB = 4'd9; expect_ctl("SSBNN", $sformatf("data hazard srcB field %0d", k));
      d_srcB = 4'd8; expect_ctl("NNNNN", $sformatf("no hazard field %0d", k));
    end
    idle(); E_dstE = 4'hF; d_srcA = 4'hF; expect_ctl("NNNNN", "0xF never matches");
    // data hazard wins over ret wait
    idle(); D_icode = I_RET; d_srcA = 4; d_srcB = 4; E_dstE = 4; expect_ctl("SSBNN", "ret waits for %rsp");
    checks++; if (!ev_data_stall || ev_ret_wait) begin failures++; $display("FAIL event priority"); end
    // freeze
    idle(); W_stat = S_HLT; D_icode = I_RET; expect_ctl("SSSSS", "halt in writeback");
    checks++; if (!freeze) begin failures++; $display("FAIL freeze"); end
    // random against an independent formulation
    for (int it = 0; it < 5000; it++) begin
      logic dh, cw, fr;
      string exp;
      D_icode = icode_e'($urandom_range(0, 11)); E_icode = icode_e'($urandom_range(0, 11));
      M_icode = icode_e'($urandom_range(0, 11));
      D_ifun = 4'($urandom_range(0, 6)); E_ifun = 4'($urandom_range(0, 6));
      d_srcA = 4'($urandom); d_srcB = 4'($urandom);
      E_dstE = 4'($urandom); E_dstM = 4'($urandom); M_dstE = 4'($urandom); M_dstM = 4'($urandom);
      W_dstE = 4'($urandom); W_dstM = 4'($urandom);
      if ($urandom_range(0, 1)) begin E_dstM = 4'hF; M_dstM = 4'hF; W_dstM = 4'hF; E_dstE = 4'hF; end
      W_stat = ($urandom_range(0, 9) == 0) ? S_ADR : S_AOK;
      fr = (W_stat != S_AOK);
      dh = 0;
      for (int s = 0; s < 2; s++) begin
        logic [3:0] src;
        logic [3:0] dsts [6];
        src = s ? d_srcB : d_srcA;
        dsts = '{E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM};
        for (int j = 0; j < 6; j++) if (src != 4'hF && src == dsts[j]) dh = 1;
      end
      cw = (D_icode == I_RET || E_icode == I_RET || M_icode == I_RET) ||
           (D_icode == I_JXX && D_ifun != 0) || (E_icode == I_JXX && E_ifun != 0);
      if (fr)      exp = "SSSSS";
      else if (dh) exp = "SSBNN";
      else if (cw) exp = "SBNNN";
      else         exp = "NNNNN";
      expect_ctl(exp, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
