// addq_pkg: pipeline-register records of the four-stage addq processor.
//
// fD (fetch->decode) carries rA and rB; dE (decode->execute) carries the
// destination register and the two operand values; eW (execute->writeback)
// carries the sum and its destination. Their default (reset / bubble)
// values are register number 0xF ("none") and 0 for data.
// Linting this package on its own reports the defaults as unused; they are
// used by addq_pipe.
package addq_pkg;

  typedef struct packed {
    logic [3:0] rA;
    logic [3:0] rB;
  } aq_d_t;

  typedef struct packed {
    logic [3:0]  dstE;
    logic [63:0] valA;
    logic [63:0] valB;
  } aq_e_t;

  typedef struct packed {
    logic [63:0] valE;
    logic [3:0]  dstE;
  } aq_w_t;

  localparam aq_d_t AQ_D_DEFAULT = '{rA: 4'hF, rB: 4'hF};
  localparam aq_e_t AQ_E_DEFAULT = '{dstE: 4'hF, valA: '0, valB: '0};
  localparam aq_w_t AQ_W_DEFAULT = '{valE: '0, dstE: 4'hF};

endpackage
