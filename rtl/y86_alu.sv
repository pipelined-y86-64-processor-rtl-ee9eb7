// y86_alu: the 64-bit ALU of the execute stage.
//
// Computes valE = aluB OP aluA, where OP is chosen by fun: add (0),
// subtract (1, aluB - aluA, so "subq rA, rB" gives rB - rA), and (2) and
// xor (3). Alongside the result it produces the zero, sign and overflow
// flags that the execute stage may latch into the condition codes; overflow
// is two's-complement overflow of the add or subtract and 0 for the logic
// operations. Purely combinational.
//
// The ALU with inputs aluA/aluB and output valE is the design's; the flag
// definitions follow the standard Y86-64 instruction set.
module y86_alu
  import y86_pkg::*;
(
  input  logic [63:0] aluA,
  input  logic [63:0] aluB,
  input  logic [3:0]  fun,
  output logic [63:0] valE,
  output logic        zf,
  output logic        sf,
  output logic        of
);

  always_comb begin
    unique case (fun)
      A_SUB:   valE = aluB - aluA;
      A_AND:   valE = aluB & aluA;
      A_XOR:   valE = aluB ^ aluA;
      default: valE = aluB + aluA;
    endcase
    zf = (valE == 64'd0);
    sf = valE[63];
    unique case (fun)
      A_ADD:   of = (aluA[63] == aluB[63]) && (valE[63] != aluB[63]);
      A_SUB:   of = (aluA[63] != aluB[63]) && (valE[63] != aluB[63]);
      default: of = 1'b0;
    endcase
  end

endmodule
