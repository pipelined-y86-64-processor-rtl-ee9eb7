// y86_hazard: pipeline control logic of the Y86-64 pipeline.
//
// Computes, every cycle, the stall and bubble controls of the five register
// banks (F = predicted PC, D = fetch->decode, E = decode->execute,
// M = execute->memory, W = memory->writeback). All hazards are resolved by
// waiting; there is no forwarding.
//
// Data hazard. The register file is written at the end of writeback and read
// in decode, so an instruction in decode must not read a register that an
// instruction in execute, memory or writeback is still going to write
// (E_dstE/E_dstM, M_dstE/M_dstM, W_dstE/W_dstM; 0xF never matches). While
// that holds, F and D keep their values (stall) and E gets a bubble: the
// hardware inserts the no-ops the compiler would otherwise have to.
//
// Control hazards. The fetch stage cannot know the next PC while a
// conditional jump sits in decode or execute (it is decided in execute and
// used from the memory stage on), or while a ret sits in decode, execute or
// memory (the return address is loaded in memory and used from writeback on).
// Then F keeps its value and D gets a bubble ("wait for jCC", "wait for
// ret"): the instruction fetched in that cycle is thrown away.
//
// Exceptions. Once the instruction in writeback has a status other than AOK
// (halt, bad address, invalid instruction) the whole pipeline freezes: every
// bank stalls, and freeze tells the datapath to stop writing registers,
// memory and condition codes. The Stat register is written by writeback.
//
// ev_* outputs report which mechanism acted in this cycle. Purely
// combinational. The stall/bubble decisions per bank are the design's
// (including the ret table: fetch stalls, decode bubbles); checking data
// hazards in decode rather than in fetch is one of the two placements the
// design shows, chosen here for the five-stage pipeline.
module y86_hazard
  import y86_pkg::*;
(
  input  icode_e     D_icode,
  input  logic [3:0] D_ifun,
  input  logic [3:0] d_srcA,
  input  logic [3:0] d_srcB,
  input  icode_e     E_icode,
  input  logic [3:0] E_ifun,
  input  logic [3:0] E_dstE,
  input  logic [3:0] E_dstM,
  input  icode_e     M_icode,
  input  logic [3:0] M_dstE,
  input  logic [3:0] M_dstM,
  input  logic [3:0] W_dstE,
  input  logic [3:0] W_dstM,
  input  stat_e      W_stat,
  output logic       F_stall,
  output logic       D_stall,
  output logic       D_bubble,
  output logic       E_stall,
  output logic       E_bubble,
  output logic       M_stall,
  output logic       W_stall,
  output logic       freeze,
  output logic       ev_data_stall,
  output logic       ev_jcc_wait,
  output logic       ev_ret_wait
);

  function automatic logic pending(input logic [3:0] src,
                                   input logic [3:0] eE, input logic [3:0] eM,
                                   input logic [3:0] mE, input logic [3:0] mM,
                                   input logic [3:0] wE, input logic [3:0] wM);
    return (src != REG_NONE) &&
           (src == eE || src == eM || src == mE || src == mM || src == wE || src == wM);
  endfunction

  logic data_hz, jcc_pend, ret_pend;

  always_comb begin
    freeze   = (W_stat != S_AOK);
    data_hz  = pending(d_srcA, E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM) ||
               pending(d_srcB, E_dstE, E_dstM, M_dstE, M_dstM, W_dstE, W_dstM);
    jcc_pend = (D_icode == I_JXX && D_ifun != C_YES) || (E_icode == I_JXX && E_ifun != C_YES);
    ret_pend = (D_icode == I_RET) || (E_icode == I_RET) || (M_icode == I_RET);

    F_stall  = freeze || data_hz || jcc_pend || ret_pend;
    D_stall  = freeze || data_hz;
    D_bubble = !D_stall && (jcc_pend || ret_pend);
    E_stall  = freeze;
    E_bubble = !freeze && data_hz;
    M_stall  = freeze;
    W_stall  = freeze;

    ev_data_stall = !freeze && data_hz;
    ev_jcc_wait   = !freeze && !data_hz && jcc_pend;
    ev_ret_wait   = !freeze && !data_hz && ret_pend;
  end

endmodule
