// y86_execute: execute stage of the Y86-64 pipeline, with the condition codes.
//
// ALU operands, from the decode->execute record E:
//   aluA: valA for rrmovq/cmovXX and OPq; valC for irmovq, rmmovq, mrmovq and
//         jXX; -8 for call and pushq; +8 for ret and popq
//   aluB: valB for OPq, rmmovq, mrmovq, call, pushq, ret, popq; 0 otherwise
// The ALU adds, except for OPq, which uses its ifun. So valE is the sum for
// an OPq, the effective address for memory instructions, the new %rsp for
// stack instructions and the jump target for jXX.
//
// Condition codes (ZF, SF, OF) live here, so they are read and written in
// the same stage: an OPq writes them at the end of its execute cycle
// (only when its status is AOK and cc_en is high) and a later jXX or
// cmovXX reads them in its own execute cycle. cnd is the evaluated condition;
// for a cmovXX whose condition is false the destination becomes 0xF, so
// nothing is written. Reset sets ZF=1, SF=0, OF=0.
//
// The output is the execute->memory record e_out. The CC register is the
// only state; everything else is combinational. stat, icode, ifun, valA and
// dstM pass from E to e_out unchanged for the later stages.
//
// Keeping the CC read and write in execute is the design's; the operand
// table follows the standard Y86-64 semantics (pushq: valE <- valB - 8 as in
// the design); the reset value of the flags matches the initial SF/ZF = 0/1
// of the design's control-hazard example.
module y86_execute
  import y86_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  e_reg_t E,
  input  logic   cc_en,
  output m_reg_t e_out,
  output cc_t    cc
);

  logic [63:0] aluA, aluB, valE;
  logic [3:0]  fun;
  logic        zf, sf, of, cnd, set_cc;

  always_comb begin
    unique case (E.icode)
      I_RRMOVQ, I_OPQ:                         aluA = E.valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ, I_JXX:     aluA = E.valC;
      I_CALL, I_PUSHQ:                         aluA = -64'sd8;
      I_RET, I_POPQ:                           aluA = 64'd8;
      default:                                 aluA = 64'd0;
    endcase
    unique case (E.icode)
      I_RMMOVQ, I_MRMOVQ, I_OPQ, I_CALL, I_PUSHQ, I_RET, I_POPQ: aluB = E.valB;
      default:                                                   aluB = 64'd0;
    endcase
    fun = (E.icode == I_OPQ) ? E.ifun : A_ADD;
  end

  y86_alu u_alu (.aluA(aluA), .aluB(aluB), .fun(fun), .valE(valE), .zf(zf), .sf(sf), .of(of));

  assign set_cc = (E.icode == I_OPQ) && (E.stat == S_AOK) && cc_en;

  always_ff @(posedge clk) begin
    if (rst)         cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (set_cc) cc <= '{zf: zf, sf: sf, of: of};
  end

  assign cnd = cond_true(cc, E.ifun);

  always_comb begin
    e_out.stat  = E.stat;
    e_out.icode = E.icode;
    e_out.ifun  = E.ifun;
    e_out.cnd   = (E.icode inside {I_JXX, I_RRMOVQ}) ? cnd : 1'b0;
    e_out.valE  = valE;
    e_out.valA  = E.valA;
    e_out.dstE  = (E.icode == I_RRMOVQ && !cnd) ? REG_NONE : E.dstE;
    e_out.dstM  = E.dstM;
  end

endmodule
