// lecture_top: the two processors of this design, side by side.
//
// y86_*: the five-stage pipelined Y86-64 processor (y86_pipe), which resolves
//        data hazards, conditional jumps and ret by stalling.
// aq_*:  the four-stage addq-only pipeline (addq_pipe) with the fetch-time
//        stall check (its default scheme).
// The two share nothing but the clock and reset; each has its own memory
// load port and debug/trace outputs. See the two modules for timing.
module lecture_top
  import y86_pkg::*;
  import addq_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // Y86-64 pipeline
  input  logic        y86_imem_load_en,
  input  logic [63:0] y86_imem_load_addr,
  input  logic [7:0]  y86_imem_load_data,
  input  logic [63:0] y86_dmem_dbg_addr,
  output logic [63:0] y86_dmem_dbg_data,
  input  logic        y86_reg_dbg_we,
  input  logic [3:0]  y86_reg_dbg_widx,
  input  logic [63:0] y86_reg_dbg_wdata,
  input  logic [3:0]  y86_reg_dbg_idx,
  output logic [63:0] y86_reg_dbg_data,
  output stat_e       y86_stat,
  output logic        y86_halted,
  output cc_t         y86_cc,
  output logic        y86_ev_data_stall,
  output logic        y86_ev_jcc_wait,
  output logic        y86_ev_ret_wait,
  output logic        y86_ev_retire,
  // addq pipeline
  input  logic        aq_imem_load_en,
  input  logic [63:0] aq_imem_load_addr,
  input  logic [7:0]  aq_imem_load_data,
  input  logic        aq_reg_dbg_we,
  input  logic [3:0]  aq_reg_dbg_widx,
  input  logic [63:0] aq_reg_dbg_wdata,
  input  logic [3:0]  aq_reg_dbg_ridx,
  output logic [63:0] aq_reg_dbg_rdata,
  output logic [63:0] aq_pc,
  output aq_d_t       aq_D,
  output aq_e_t       aq_E,
  output aq_w_t       aq_W,
  output logic        aq_stall
);

  y86_pipe u_y86 (
    .clk, .rst,
    .imem_load_en(y86_imem_load_en), .imem_load_addr(y86_imem_load_addr),
    .imem_load_data(y86_imem_load_data),
    .dmem_dbg_addr(y86_dmem_dbg_addr), .dmem_dbg_data(y86_dmem_dbg_data),
    .reg_dbg_we(y86_reg_dbg_we), .reg_dbg_widx(y86_reg_dbg_widx),
    .reg_dbg_wdata(y86_reg_dbg_wdata), .reg_dbg_idx(y86_reg_dbg_idx), .reg_dbg_data(y86_reg_dbg_data),
    .stat(y86_stat), .halted(y86_halted), .cc(y86_cc),
    .ev_data_stall(y86_ev_data_stall), .ev_jcc_wait(y86_ev_jcc_wait),
    .ev_ret_wait(y86_ev_ret_wait), .ev_retire(y86_ev_retire));

  addq_pipe u_addq (
    .clk, .rst,
    .imem_load_en(aq_imem_load_en), .imem_load_addr(aq_imem_load_addr),
    .imem_load_data(aq_imem_load_data),
    .reg_dbg_we(aq_reg_dbg_we), .reg_dbg_widx(aq_reg_dbg_widx), .reg_dbg_wdata(aq_reg_dbg_wdata),
    .reg_dbg_ridx(aq_reg_dbg_ridx), .reg_dbg_rdata(aq_reg_dbg_rdata),
    .P_pc(aq_pc), .D(aq_D), .E(aq_E), .W(aq_W), .stall(aq_stall));

endmodule
