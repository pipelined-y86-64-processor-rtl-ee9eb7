// y86_pkg: types and constants shared by the Y86-64 pipeline.
//
// Instruction codes, status codes and ALU function codes follow the standard
// Y86-64 encoding: the first instruction byte holds icode in bits [7:4] and
// ifun in bits [3:0]; the second byte, when present, holds rA in bits [7:4]
// and rB in bits [3:0]. Register number 0xF (REG_NONE) means "no register".
//
// The pipeline register records (fetch->decode, decode->execute,
// execute->memory, memory->writeback) are packed structs. Each has a bubble
// constant: the do-nothing value a register bank loads on reset or bubble
// (icode NOP, register numbers REG_NONE, data 0, status AOK).
// Linting this package on its own reports its constants as unused; they
// are used by the modules that import it.
package y86_pkg;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,   // also cmovXX (ifun = condition)
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_e;

  typedef enum logic [2:0] {
    S_AOK = 3'd1,      // normal operation
    S_HLT = 3'd2,      // halt executed
    S_ADR = 3'd3,      // bad instruction or data address
    S_INS = 3'd4       // invalid instruction
  } stat_e;

  // ALU functions (ifun of OPq)
  localparam logic [3:0] A_ADD = 4'h0;
  localparam logic [3:0] A_SUB = 4'h1;
  localparam logic [3:0] A_AND = 4'h2;
  localparam logic [3:0] A_XOR = 4'h3;

  // Condition codes (ifun of jXX and cmovXX)
  localparam logic [3:0] C_YES = 4'h0;
  localparam logic [3:0] C_LE  = 4'h1;
  localparam logic [3:0] C_L   = 4'h2;
  localparam logic [3:0] C_E   = 4'h3;
  localparam logic [3:0] C_NE  = 4'h4;
  localparam logic [3:0] C_GE  = 4'h5;
  localparam logic [3:0] C_G   = 4'h6;

  localparam logic [3:0] REG_RSP  = 4'h4;
  localparam logic [3:0] REG_NONE = 4'hF;

  typedef logic [63:0] word_t;
  typedef logic [3:0]  regid_t;

  // condition-code register
  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // fetch -> decode (register bank "fD", read as D_*)
  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    logic [3:0] ifun;
    regid_t rA;
    regid_t rB;
    word_t  valC;
    word_t  valP;
  } d_reg_t;

  // decode -> execute (register bank "dE", read as E_*)
  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    logic [3:0] ifun;
    word_t  valC;
    word_t  valA;
    word_t  valB;
    regid_t dstE;
    regid_t dstM;
  } e_reg_t;

  // execute -> memory (register bank "eM", read as M_*)
  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    logic [3:0] ifun;
    logic   cnd;
    word_t  valE;
    word_t  valA;
    regid_t dstE;
    regid_t dstM;
  } m_reg_t;

  // memory -> writeback (register bank "mW", read as W_*)
  typedef struct packed {
    stat_e  stat;
    icode_e icode;
    word_t  valE;
    word_t  valM;
    regid_t dstE;
    regid_t dstM;
  } w_reg_t;

  localparam d_reg_t D_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0,
                                  rA: REG_NONE, rB: REG_NONE, valC: '0, valP: '0};
  localparam e_reg_t E_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0, valC: '0,
                                  valA: '0, valB: '0, dstE: REG_NONE, dstM: REG_NONE};
  localparam m_reg_t M_BUBBLE = '{stat: S_AOK, icode: I_NOP, ifun: 4'h0, cnd: 1'b0,
                                  valE: '0, valA: '0, dstE: REG_NONE, dstM: REG_NONE};
  localparam w_reg_t W_BUBBLE = '{stat: S_AOK, icode: I_NOP, valE: '0, valM: '0,
                                  dstE: REG_NONE, dstM: REG_NONE};

  // Condition evaluation shared by jXX and cmovXX.
  function automatic logic cond_true(input cc_t cc, input logic [3:0] ifun);
    unique case (ifun)
      C_YES:   return 1'b1;
      C_LE:    return (cc.sf ^ cc.of) | cc.zf;
      C_L:     return cc.sf ^ cc.of;
      C_E:     return cc.zf;
      C_NE:    return ~cc.zf;
      C_GE:    return ~(cc.sf ^ cc.of);
      C_G:     return ~(cc.sf ^ cc.of) & ~cc.zf;
      default: return 1'b0;
    endcase
  endfunction

endpackage
