// addq_pipe: four-stage pipelined processor that executes only
// "addq rA, rB" (R[rB] <- R[rA] + R[rB]), with stalling for data hazards.
//
// Every instruction is two bytes: opcode, then rA in bits [15:12] and rB in
// bits [11:8] of the fetched word. The opcode is not decoded; "addq %none,
// %none" (register byte 0xFF) does nothing and serves as a no-op.
//   fetch:     read instruction memory at PC, split rA/rB, PC <- PC + 2
//   decode:    read R[rA] and R[rB]; dstE = rB
//   execute:   valE = valA + valB
//   writeback: R[dstE] <- valE (at the end of the cycle)
// Pipeline banks: P (PC), fD {rA, rB}, dE {dstE, valA, valB}, eW {valE, dstE},
// each a pipe_reg with default 0xF for register numbers and 0 for data.
//
// Data hazards. The register file is written at the end of writeback and
// read in decode, so an instruction must not read a register in decode while
// an older instruction that writes it is in decode (one stage ahead in the
// fetch-time check) or execute. Two placements of the check are provided,
// selected by STALL_IN_DECODE:
//   0 (default): check in fetch. If the rA or rB just fetched equals the
//     dstE of the instruction in decode or execute, the PC is held and fD
//     gets a bubble (rA = rB = 0xF).
//   1: check in decode. If D_rA or D_rB equals the dstE in execute or
//     writeback, the PC and fD are held and dE gets a bubble.
// Either way a dependent instruction right behind its producer waits two
// cycles. stall reports the cycle's decision; the other trace outputs show
// the bank contents for comparison with a cycle table.
//
// Ports: instruction-memory byte-load port; register-file debug write/read
// port (to preload register values and read results). Synchronous reset.
//
// The datapath, the banks and their defaults, PC+2, and both stall schemes
// with their timing are the design's; the trace/debug ports, the reset and
// the 64 KiB memory size are this implementation's choices.
// Lint reports most of i10bytes and imem_error as unused: the instruction
// memory is the shared ten-byte-window y86_imem, of which only the two bytes
// of an addq are needed, and this processor has no status or error handling,
// so fetching past the end simply reads zero bytes.
module addq_pipe
  import addq_pkg::*;
#(
  parameter int IMEM_BYTES      = 65536,
  parameter bit STALL_IN_DECODE = 1'b0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_load_en,
  input  logic [63:0] imem_load_addr,
  input  logic [7:0]  imem_load_data,
  input  logic        reg_dbg_we,
  input  logic [3:0]  reg_dbg_widx,
  input  logic [63:0] reg_dbg_wdata,
  input  logic [3:0]  reg_dbg_ridx,
  output logic [63:0] reg_dbg_rdata,
  output logic [63:0] P_pc,
  output aq_d_t       D,
  output aq_e_t       E,
  output aq_w_t       W,
  output logic        stall
);

  localparam logic [3:0] NONE = 4'hF;

  // fetch
  logic [63:0] p_pc;
  logic [79:0] i10bytes;
  logic        imem_error;
  aq_d_t       f;

  y86_imem #(.BYTES(IMEM_BYTES)) u_imem (
    .clk, .load_en(imem_load_en), .load_addr(imem_load_addr), .load_data(imem_load_data),
    .pc(P_pc), .i10bytes, .error(imem_error));

  assign p_pc = P_pc + 64'd2;
  assign f.rA = i10bytes[15:12];
  assign f.rB = i10bytes[11:8];

  // decode
  logic [63:0] rvalA, rvalB;
  aq_e_t       d;

  y86_regfile u_rf (
    .clk, .srcA(D.rA), .srcB(D.rB), .valA(rvalA), .valB(rvalB),
    .we(1'b1), .dstE(W.dstE), .valE(W.valE), .dstM(NONE), .valM(64'd0),
    .dbg_we(reg_dbg_we), .dbg_widx(reg_dbg_widx), .dbg_wdata(reg_dbg_wdata),
    .dbg_ridx(reg_dbg_ridx), .dbg_rdata(reg_dbg_rdata));

  assign d.dstE = D.rB;
  assign d.valA = rvalA;
  assign d.valB = rvalB;

  // execute
  aq_w_t e;
  assign e.valE = E.valA + E.valB;
  assign e.dstE = E.dstE;

  // stall logic
  function automatic logic hit(input logic [3:0] src, input logic [3:0] x, input logic [3:0] y);
    return (src != NONE) && (src == x || src == y);
  endfunction

  logic P_stall, D_stall, D_bubble, E_bubble;

  always_comb begin
    if (STALL_IN_DECODE) begin
      stall    = hit(D.rA, E.dstE, W.dstE) || hit(D.rB, E.dstE, W.dstE);
      P_stall  = stall;
      D_stall  = stall;
      D_bubble = 1'b0;
      E_bubble = stall;
    end else begin
      stall    = hit(f.rA, d.dstE, E.dstE) || hit(f.rB, d.dstE, E.dstE);
      P_stall  = stall;
      D_stall  = 1'b0;
      D_bubble = stall;
      E_bubble = 1'b0;
    end
  end

  pipe_reg #(.T(logic [63:0]), .DEFAULT(64'd0)) u_P (
    .clk, .rst, .stall(P_stall), .bubble(1'b0), .d(p_pc), .q(P_pc));
  pipe_reg #(.T(aq_d_t), .DEFAULT(AQ_D_DEFAULT)) u_fD (
    .clk, .rst, .stall(D_stall), .bubble(D_bubble), .d(f), .q(D));
  pipe_reg #(.T(aq_e_t), .DEFAULT(AQ_E_DEFAULT)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(E_bubble), .d(d), .q(E));
  pipe_reg #(.T(aq_w_t), .DEFAULT(AQ_W_DEFAULT)) u_eW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(e), .q(W));

endmodule
