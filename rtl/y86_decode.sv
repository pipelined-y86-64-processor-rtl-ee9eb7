// y86_decode: decode stage of the Y86-64 pipeline.
//
// From the fetch->decode record D it chooses which registers to read and
// which to write:
//   srcA: rA for rrmovq/cmovXX, rmmovq, OPq, pushq; %rsp for popq, ret
//   srcB: rB for OPq, rmmovq, mrmovq; %rsp for pushq, popq, call, ret
//   dstE: rB for rrmovq/cmovXX, irmovq, OPq; %rsp for pushq, popq, call, ret
//   dstM: rA for mrmovq, popq
// (0xF everywhere else). srcA/srcB go to the register file, whose outputs
// come back as rvalA/rvalB. valA is the register value, except for call and
// jXX, where it carries valP (the return address to push, or the
// fall-through address). The result is the decode->execute record d_out.
// srcA/srcB are also outputs for the hazard logic. Purely combinational.
// stat, icode, ifun and valC are copied from D into d_out unchanged, as
// every stage passes the fields the later stages need.
//
// dstE <- rB for addq and dstE <- %rsp, valB <- R[%rsp] for pushq are as the
// design gives them; the rows for the other instructions follow the standard
// Y86-64 instruction semantics, and sending valP through valA is this
// implementation's choice.
module y86_decode
  import y86_pkg::*;
(
  input  d_reg_t      D,
  output logic [3:0]  srcA,
  output logic [3:0]  srcB,
  input  logic [63:0] rvalA,
  input  logic [63:0] rvalB,
  output e_reg_t      d_out
);

  always_comb begin
    unique case (D.icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ: srcA = D.rA;
      I_POPQ, I_RET:                      srcA = REG_RSP;
      default:                            srcA = REG_NONE;
    endcase
    unique case (D.icode)
      I_OPQ, I_RMMOVQ, I_MRMOVQ:          srcB = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     srcB = REG_RSP;
      default:                            srcB = REG_NONE;
    endcase

    d_out.stat  = D.stat;
    d_out.icode = D.icode;
    d_out.ifun  = D.ifun;
    d_out.valC  = D.valC;
    d_out.valA  = (D.icode inside {I_CALL, I_JXX}) ? D.valP : rvalA;
    d_out.valB  = rvalB;
    unique case (D.icode)
      I_RRMOVQ, I_IRMOVQ, I_OPQ:          d_out.dstE = D.rB;
      I_PUSHQ, I_POPQ, I_CALL, I_RET:     d_out.dstE = REG_RSP;
      default:                            d_out.dstE = REG_NONE;
    endcase
    unique case (D.icode)
      I_MRMOVQ, I_POPQ:                   d_out.dstM = D.rA;
      default:                            d_out.dstM = REG_NONE;
    endcase
  end

endmodule
