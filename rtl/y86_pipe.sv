// y86_pipe: five-stage pipelined Y86-64 processor that resolves hazards by
// stalling.
//
// Stages and the register banks between them:
//   F  predicted-PC bank  -> fetch   (instruction memory, PC selection, split,
//                                     length, prediction)
//   D  fetch->decode      -> decode  (register file read)
//   E  decode->execute    -> execute (ALU, condition codes read and written)
//   M  execute->memory    -> memory  (data memory read or write)
//   W  memory->writeback  -> writeback (register file write, Stat register)
// Every bank is a pipe_reg with its own stall/bubble controls; y86_hazard
// drives them. Each stage reads only the bank in front of it (D_*, E_*, ...)
// and sends its results into the next bank (f_*, d_*, ...); the exceptions
// are the register file and memories, shared by stages on purpose, and the
// late PC inputs of fetch (a taken conditional jump from the memory stage, a
// return address from writeback).
//
// Timing. With no hazards one instruction enters per cycle and each spends
// one cycle per stage. An instruction that reads a register written by one of
// the three instructions ahead of it waits in decode until the writer has
// left writeback (up to 3 bubbles). A conditional jump costs 2 extra cycles
// (fetch waits while it is in decode and execute and resumes when it is in
// memory); a ret costs 3 (fetch resumes when it is in writeback). call and
// jmp go straight to their target. When an instruction with status HLT, ADR
// or INS reaches writeback the Stat register takes that status, nothing more
// is written and the pipeline holds (halted=1) until reset.
//
// Ports: an instruction-memory byte-load port; a debug read port for the data
// memory and a debug write/read port for the register file (registers have
// no reset; preload them through it or from software); stat/halted; ev_* event pulses (data stall,
// conditional-jump wait, ret wait, instruction retired from writeback) for
// performance counting. Synchronous active-high reset loads every bank with
// its bubble value, the predicted PC with 0, the condition codes with
// ZF=1 SF=0 OF=0 and Stat with AOK.
//
// The stage split, the stalls for data hazards, jCC and ret, the stall/bubble
// banks and Stat being written in writeback are the design's. Instruction
// encodings and semantics follow the standard Y86-64 ISA. Separate
// instruction and data memories, their sizes, the freeze on exceptions and
// the debug ports are this implementation's choices.
module y86_pipe
  import y86_pkg::*;
#(
  parameter int IMEM_BYTES = 65536,
  parameter int DMEM_BYTES = 65536
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_load_en,
  input  logic [63:0] imem_load_addr,
  input  logic [7:0]  imem_load_data,
  input  logic [63:0] dmem_dbg_addr,
  output logic [63:0] dmem_dbg_data,
  input  logic        reg_dbg_we,
  input  logic [3:0]  reg_dbg_widx,
  input  logic [63:0] reg_dbg_wdata,
  input  logic [3:0]  reg_dbg_idx,
  output logic [63:0] reg_dbg_data,
  output stat_e       stat,
  output logic        halted,
  output cc_t         cc,
  output logic        ev_data_stall,
  output logic        ev_jcc_wait,
  output logic        ev_ret_wait,
  output logic        ev_retire
);

  // banks
  logic [63:0] F_predPC, f_predPC;
  d_reg_t D, f_out;
  e_reg_t E, d_out;
  m_reg_t M, e_out;
  w_reg_t W, m_out;

  logic F_stall, D_stall, D_bubble, E_stall, E_bubble, M_stall, W_stall, freeze;

  pipe_reg #(.T(logic [63:0]), .DEFAULT(64'd0)) u_F (
    .clk, .rst, .stall(F_stall), .bubble(1'b0), .d(f_predPC), .q(F_predPC));
  pipe_reg #(.T(d_reg_t), .DEFAULT(D_BUBBLE)) u_D (
    .clk, .rst, .stall(D_stall), .bubble(D_bubble), .d(f_out), .q(D));
  pipe_reg #(.T(e_reg_t), .DEFAULT(E_BUBBLE)) u_E (
    .clk, .rst, .stall(E_stall), .bubble(E_bubble), .d(d_out), .q(E));
  pipe_reg #(.T(m_reg_t), .DEFAULT(M_BUBBLE)) u_M (
    .clk, .rst, .stall(M_stall), .bubble(1'b0), .d(e_out), .q(M));
  pipe_reg #(.T(w_reg_t), .DEFAULT(W_BUBBLE)) u_W (
    .clk, .rst, .stall(W_stall), .bubble(1'b0), .d(m_out), .q(W));

  // fetch
  logic [63:0] pc;
  logic [79:0] i10bytes;
  logic        imem_error;

  y86_imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .load_en(imem_load_en), .load_addr(imem_load_addr), .load_data(imem_load_data),
    .pc, .i10bytes, .error(imem_error));

  y86_fetch #(.IMEM_BYTES(IMEM_BYTES)) u_fetch (
    .P_predPC(F_predPC), .M_icode(M.icode), .M_ifun(M.ifun), .M_cnd(M.cnd), .M_valE(M.valE),
    .W_icode(W.icode), .W_valM(W.valM), .pc, .i10bytes, .imem_error, .f_out, .f_predPC);

  // decode + register file (written by writeback)
  logic [3:0]  d_srcA, d_srcB;
  logic [63:0] rvalA, rvalB;

  y86_decode u_decode (.D, .srcA(d_srcA), .srcB(d_srcB), .rvalA, .rvalB, .d_out);

  y86_regfile u_rf (
    .clk, .srcA(d_srcA), .srcB(d_srcB), .valA(rvalA), .valB(rvalB),
    .we(W.stat == S_AOK), .dstE(W.dstE), .valE(W.valE), .dstM(W.dstM), .valM(W.valM),
    .dbg_we(reg_dbg_we), .dbg_widx(reg_dbg_widx), .dbg_wdata(reg_dbg_wdata),
    .dbg_ridx(reg_dbg_idx), .dbg_rdata(reg_dbg_data));

  // execute
  // the condition codes are not changed behind an instruction that has
  // already faulted (memory stage) or is stopping the machine (writeback)
  y86_execute u_execute (.clk, .rst, .E, .cc_en(!freeze && m_out.stat == S_AOK), .e_out, .cc);

  // memory
  logic [63:0] mem_addr, mem_wdata, mem_rdata;
  logic        mem_read, mem_write, mem_error;

  y86_memstage u_memstage (
    .M, .hold(freeze), .mem_addr, .mem_wdata, .mem_read, .mem_write,
    .mem_rdata, .mem_error, .m_out);

  y86_dmem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .addr(mem_addr), .re(mem_read), .we(mem_write), .wdata(mem_wdata),
    .rdata(mem_rdata), .error(mem_error), .dbg_addr(dmem_dbg_addr), .dbg_rdata(dmem_dbg_data));

  // control
  y86_hazard u_hazard (
    .D_icode(D.icode), .D_ifun(D.ifun), .d_srcA, .d_srcB,
    .E_icode(E.icode), .E_ifun(E.ifun), .E_dstE(E.dstE), .E_dstM(E.dstM),
    .M_icode(M.icode), .M_dstE(M.dstE), .M_dstM(M.dstM),
    .W_dstE(W.dstE), .W_dstM(W.dstM), .W_stat(W.stat),
    .F_stall, .D_stall, .D_bubble, .E_stall, .E_bubble, .M_stall, .W_stall, .freeze,
    .ev_data_stall, .ev_jcc_wait, .ev_ret_wait);

  // writeback: Stat register
  always_ff @(posedge clk) begin
    if (rst)                                   stat <= S_AOK;
    else if (stat == S_AOK && W.stat != S_AOK) stat <= W.stat;
  end
  assign halted = (stat != S_AOK);

  // Valid bits that follow each real instruction down the pipeline (bubbles
  // are not valid), so that ev_retire counts instructions, nops included.
  logic D_valid, E_valid, M_valid, W_valid;
  always_ff @(posedge clk) begin
    if (rst) begin
      D_valid <= 1'b0; E_valid <= 1'b0; M_valid <= 1'b0; W_valid <= 1'b0;
    end else if (!freeze) begin
      if (!D_stall) D_valid <= !D_bubble;
      E_valid <= !E_bubble && D_valid;
      M_valid <= E_valid;
      W_valid <= M_valid;
    end
  end
  assign ev_retire = W_valid && (W.stat == S_AOK);

endmodule
