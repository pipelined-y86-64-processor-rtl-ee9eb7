// y86_fetch: fetch stage and PC update of the Y86-64 pipeline.
//
// PC selection. The register bank in front of fetch holds a *predicted* PC
// rather than the PC itself. The address actually sent to instruction memory
// is chosen each cycle from later stages:
//   - a conditional jump in the memory stage that was taken: its target,
//     which the execute stage left in M_valE;
//   - a ret in the writeback stage: the return address it loaded (W_valM);
//   - otherwise the predicted PC.
// Because the pipeline waits (stalls) until a conditional jump has been
// evaluated and until a ret has loaded its return address, these late
// choices are always correct: nothing is ever fetched from a wrong path.
//
// Splitting. i10bytes[7:4] is icode, [3:0] ifun, [15:12] rA, [11:8] rB.
// The 8-byte constant valC follows the opcode byte, or the register byte
// when the instruction has one. valP = pc + length, the length being
// 1, 2, 9 or 10 bytes depending on whether the instruction has a register
// byte and a constant.
//
// Status. ADR if the instruction does not lie inside instruction memory
// (icode then reads as NOP), INS for an unknown icode or ifun, HLT for halt,
// AOK otherwise.
//
// Prediction of the next PC: call and the unconditional jmp go to valC;
// halt and any error keep the PC where it is (the same instruction is fetched
// again while the faulting one drains to writeback); everything else,
// conditional jumps included, goes to valP. Purely combinational.
//
// The PC-select mux, the "convert icode" length logic (+2, +10, ...) and the
// field positions come from the design; the ifun validity check and the
// prediction for halt and errors are this implementation's choices.
module y86_fetch
  import y86_pkg::*;
#(
  parameter int IMEM_BYTES = 65536
) (
  input  logic [63:0] P_predPC,
  input  icode_e      M_icode,
  input  logic [3:0]  M_ifun,
  input  logic        M_cnd,
  input  logic [63:0] M_valE,
  input  icode_e      W_icode,
  input  logic [63:0] W_valM,
  output logic [63:0] pc,
  input  logic [79:0] i10bytes,
  input  logic        imem_error,
  output d_reg_t      f_out,
  output logic [63:0] f_predPC
);

  logic [3:0] icode_raw, ifun;
  icode_e     icode;
  logic       need_regids, need_valC, valid, adr_error;
  logic [63:0] valC, valP, len;

  always_comb begin
    // PC selection
    if (M_icode == I_JXX && M_ifun != C_YES && M_cnd) pc = M_valE;
    else if (W_icode == I_RET)                         pc = W_valM;
    else                                               pc = P_predPC;

    icode_raw = i10bytes[7:4];
    ifun      = i10bytes[3:0];

    unique case (icode_raw)
      I_HALT, I_NOP, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_CALL, I_RET, I_PUSHQ, I_POPQ:
        valid = (ifun == 4'h0);
      I_RRMOVQ, I_JXX: valid = (ifun <= C_G);
      I_OPQ:           valid = (ifun <= A_XOR);
      default:         valid = 1'b0;
    endcase

    need_regids = icode_raw inside {I_RRMOVQ, I_IRMOVQ, I_RMMOVQ, I_MRMOVQ,
                                    I_OPQ, I_PUSHQ, I_POPQ};
    need_valC   = icode_raw inside {I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX, I_CALL};

    valC = need_regids ? i10bytes[79:16] : i10bytes[71:8];
    len  = 64'd1 + (need_regids ? 64'd1 : 64'd0) + (need_valC ? 64'd8 : 64'd0);
    valP = pc + len;

    adr_error = imem_error || (valP > 64'(IMEM_BYTES)) || (valP < pc);
    icode     = adr_error ? I_NOP : icode_e'(icode_raw);

    f_out.icode = icode;
    f_out.ifun  = adr_error ? 4'h0 : ifun;
    f_out.rA    = need_regids ? i10bytes[15:12] : REG_NONE;
    f_out.rB    = need_regids ? i10bytes[11:8]  : REG_NONE;
    f_out.valC  = valC;
    f_out.valP  = valP;
    if (adr_error)              f_out.stat = S_ADR;
    else if (!valid)            f_out.stat = S_INS;
    else if (icode == I_HALT)   f_out.stat = S_HLT;
    else                        f_out.stat = S_AOK;

    if (f_out.stat != S_AOK)                                f_predPC = pc;
    else if (icode == I_CALL || (icode == I_JXX && ifun == C_YES)) f_predPC = valC;
    else                                                    f_predPC = valP;
  end

endmodule
