// y86_regfile: the processor's register file.
//
// NREGS 64-bit registers (15 for Y86-64: %rax..%r14), numbered 0..NREGS-1.
// Register number 0xF is "no register": reading it returns 0 and writing it
// does nothing. Two combinational read ports (srcA->valA, srcB->valB) serve
// the decode stage; two write ports (dstE<-valE, dstM<-valM) are written on
// the rising clock edge by the writeback stage, so a value written in cycle n
// is read by decode in cycle n+1 (no write-through; the pipeline stalls
// instead). If both write ports name the same register, the M port wins.
//
// A debug port (dbg_we/dbg_widx/dbg_wdata, dbg_ridx/dbg_rdata) loads and
// inspects registers from outside; it has priority over both write ports, and
// works while the processor is held in reset. The registers have no reset of
// their own: software or the debug port gives them their initial values. The port set (srcA, srcB, dstE, dstM and the
// two "next R[...]" inputs) follows the design's datapath drawings; the debug
// port, the absence of a reset and the write priority are this implementation's choices.
module y86_regfile #(
  parameter int NREGS = 15
) (
  input  logic        clk,
  input  logic [3:0]  srcA,
  input  logic [3:0]  srcB,
  output logic [63:0] valA,
  output logic [63:0] valB,
  input  logic        we,
  input  logic [3:0]  dstE,
  input  logic [63:0] valE,
  input  logic [3:0]  dstM,
  input  logic [63:0] valM,
  input  logic        dbg_we,
  input  logic [3:0]  dbg_widx,
  input  logic [63:0] dbg_wdata,
  input  logic [3:0]  dbg_ridx,
  output logic [63:0] dbg_rdata
);

  logic [63:0] regs [NREGS];

  function automatic logic [63:0] rd(input logic [3:0] idx, input logic [63:0] r [NREGS]);
    return (int'(idx) < NREGS) ? r[idx] : 64'd0;
  endfunction

  assign valA      = rd(srcA, regs);
  assign valB      = rd(srcB, regs);
  assign dbg_rdata = rd(dbg_ridx, regs);

  always_ff @(posedge clk) begin
    for (int i = 0; i < NREGS; i++) begin
      if (dbg_we && int'(dbg_widx) == i)        regs[i] <= dbg_wdata;
      else if (we && int'(dstM) == i)           regs[i] <= valM;
      else if (we && int'(dstE) == i)           regs[i] <= valE;
    end
  end

endmodule
