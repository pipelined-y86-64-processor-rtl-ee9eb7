// tb_y86_alu: checks the ALU result and flags.
//
// Directed corner cases (overflow on add and subtract, zero, negative) and
// random operands for all four operations, against an independent model that
// computes overflow from the signed, 65-bit-wide result.
module tb_y86_alu;
  logic [63:0] aluA, aluB, valE;
  logic [3:0] fun;
  logic zf, sf, of;
  int checks = 0, failures = 0;

  y86_alu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] a, input logic [63:0] b, input logic [3:0] f);
    logic [63:0] r;
    logic signed [64:0] wide;
    logic eof;
    aluA = a; aluB = b; fun = f;
    #1;
    case (f)
      4'd1: begin r = b - a; wide = $signed({b[63], b}) - $signed({a[63], a}); end
      4'd2: begin r = b & a; wide = 65'($signed(r)); end
      4'd3: begin r = b ^ a; wide = 65'($signed(r)); end
      default: begin r = b + a; wide = $signed({b[63], b}) + $signed({a[63], a}); end
    endcase
    eof = (wide[64] != wide[63]);
    checks++;
    if (valE !== r || zf !== (r == 0) || sf !== r[63] || of !== eof) begin
      failures++;
      $display("FAIL f=%0d a=%h b=%h: got %h z%b s%b o%b, expected %h o%b", f, a, b, valE, zf, sf, of, r, eof);
    end
  endtask

  initial begin
    run(64'd800, 64'd900, 4'd0);
    run(64'h7FFF_FFFF_FFFF_FFFF, 64'd1, 4'd0);
    run(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 4'd0);
    run(64'd1, 64'h8000_0000_0000_0000, 4'd1);
    run(64'h8000_0000_0000_0000, 64'd0, 4'd1);
    run(64'd5, 64'd5, 4'd1);
    run(64'hF0, 64'h0F, 4'd2);
    run(64'hFF, 64'hFF, 4'd3);
    for (int i = 0; i < 4000; i++) begin
      logic [63:0] a, b;
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (i % 5 == 0) b = a;
      if (i % 7 == 0) a = {1'b0, a[62:0]} | 64'h7FF0_0000_0000_0000;
      run(a, b, 4'($urandom_range(0, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
