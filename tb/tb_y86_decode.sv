// tb_y86_decode: checks register selection and the decode->execute record.
//
// For each icode it checks srcA/srcB/dstE/dstM against a table written here
// from the Y86-64 instruction semantics, the valA choice (valP for call and
// jXX, register value otherwise) and the pass-through fields.
module tb_y86_decode;
  import y86_pkg::*;
  d_reg_t D;
  logic [3:0] srcA, srcB;
  logic [63:0] rvalA, rvalB;
  e_reg_t d_out;
  int checks = 0, failures = 0;

  y86_decode dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [3:0] ic, ra, rb, esa, esb, ede, edm;
      ic = 4'($urandom_range(0, 11));
      ra = 4'($urandom); rb = 4'($urandom);
      D.stat = S_AOK; D.icode = icode_e'(ic); D.ifun = 4'($urandom_range(0, 6));
      D.rA = ra; D.rB = rb; D.valC = {$urandom, $urandom}; D.valP = {$urandom, $urandom};
      rvalA = {$urandom, $urandom}; rvalB = {$urandom, $urandom};
      #1;
      // table: icode -> srcA, srcB, dstE, dstM
      case (ic)
        4'h2: begin esa = ra; esb = 4'hF; ede = rb;   edm = 4'hF; end  // rrmovq
        4'h3: begin esa = 4'hF; esb = 4'hF; ede = rb; edm = 4'hF; end  // irmovq
        4'h4: begin esa = ra; esb = rb;   ede = 4'hF; edm = 4'hF; end  // rmmovq
        4'h5: begin esa = 4'hF; esb = rb; ede = 4'hF; edm = ra;   end  // mrmovq
        4'h6: begin esa = ra; esb = rb;   ede = rb;   edm = 4'hF; end  // OPq
        4'h8: begin esa = 4'hF; esb = 4; ede = 4;     edm = 4'hF; end  // call
        4'h9: begin esa = 4; esb = 4;     ede = 4;     edm = 4'hF; end  // ret
        4'hA: begin esa = ra; esb = 4;    ede = 4;     edm = 4'hF; end  // pushq
        4'hB: begin esa = 4; esb = 4;     ede = 4;     edm = ra;   end  // popq
        default: begin esa = 4'hF; esb = 4'hF; ede = 4'hF; edm = 4'hF; end
      endcase
      cmp(64'(srcA), 64'(esa), $sformatf("srcA ic=%h", ic));
      cmp(64'(srcB), 64'(esb), $sformatf("srcB ic=%h", ic));
      cmp(64'(d_out.dstE), 64'(ede), $sformatf("dstE ic=%h", ic));
      cmp(64'(d_out.dstM), 64'(edm), $sformatf("dstM ic=%h", ic));
      cmp(d_out.valA, (ic == 4'h7 || ic == 4'h8) ? D.valP : rvalA, $sformatf("valA ic=%h", ic));
      cmp(d_out.valB, rvalB, "valB");
      cmp(d_out.valC, D.valC, "valC");
      cmp(64'(d_out.icode), 64'(ic), "icode");
      cmp(64'(d_out.ifun), 64'(D.ifun), "ifun");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
