// y86_memstage: memory-stage control of the Y86-64 pipeline.
//
// Decides from the execute->memory record M whether the data memory is read
// ("is read?": mrmovq, popq, ret) or written ("is write?": rmmovq, pushq,
// call), and what address and data it gets: the address is valE (computed by
// the ALU) except for popq and ret, which read at the old stack pointer held
// in valA; the write data is always valA. The write is suppressed when the
// instruction's status is not AOK or when hold is high (the pipeline is
// frozen by an earlier exception). The value read comes back on mem_rdata
// and goes into valM; a memory range error turns an AOK status into ADR (an
// earlier status is kept).
// The result is the memory->writeback record m_out (icode, valE, dstE and
// dstM copied from M; valA leaves as the write data). Purely combinational;
// the data memory itself is y86_dmem.
//
// Deriving the read/write controls from the icode carried in the pipeline
// register of this stage is the design's; the address/data table follows the
// standard Y86-64 semantics (pushq: M[valE] <- valA as in the design).
// Lint reports M.ifun and M.cnd as unused: the whole execute->memory record
// comes in as one struct, and those two fields only matter to fetch (which
// reads them from the same bank for the jump decision).
module y86_memstage
  import y86_pkg::*;
(
  input  m_reg_t      M,
  input  logic        hold,
  output logic [63:0] mem_addr,
  output logic [63:0] mem_wdata,
  output logic        mem_read,
  output logic        mem_write,
  input  logic [63:0] mem_rdata,
  input  logic        mem_error,
  output w_reg_t      m_out
);

  logic is_read, is_write;

  always_comb begin
    is_read   = M.icode inside {I_MRMOVQ, I_POPQ, I_RET};
    is_write  = M.icode inside {I_RMMOVQ, I_PUSHQ, I_CALL};
    mem_read  = is_read;
    mem_write = is_write && (M.stat == S_AOK) && !hold;
    mem_addr  = (M.icode inside {I_POPQ, I_RET}) ? M.valA : M.valE;
    mem_wdata = M.valA;

    m_out.stat  = (M.stat == S_AOK && mem_error && (is_read || is_write)) ? S_ADR : M.stat;
    m_out.icode = M.icode;
    m_out.valE  = M.valE;
    m_out.valM  = is_read ? mem_rdata : 64'd0;
    m_out.dstE  = M.dstE;
    m_out.dstM  = M.dstM;
  end

endmodule
