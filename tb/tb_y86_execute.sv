// tb_y86_execute: checks the execute stage and its condition codes.
//
// Random decode->execute records for every icode; the expected valE comes
// from the instruction semantics (OPq result, address = valB + valC,
// stack pointer -/+ 8, irmovq constant, rrmovq value, jump target = valC).
// The condition codes are modelled here: reset ZF=1 SF=0 OF=0, updated only
// by OPq with AOK status and cc_en; cnd and the cmov destination are checked
// against the model's flags with a condition table written here.
module tb_y86_execute;
  import y86_pkg::*;
  logic clk = 1'b0;
  logic rst, cc_en;
  e_reg_t E;
  m_reg_t e_out;
  cc_t cc;
  int checks = 0, failures = 0;

  y86_execute dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  function automatic logic cond(input logic z, input logic s, input logic o, input logic [3:0] f);
    case (f)
      0: return 1;
      1: return (s != o) || z;
      2: return s != o;
      3: return z;
      4: return !z;
      5: return s == o;
      6: return (s == o) && !z;
      default: return 0;
    endcase
  endfunction

  initial begin
    logic mz, ms, mo;
    rst = 1; cc_en = 1; E = E_BUBBLE;
    @(posedge clk); #1 rst = 0;
    mz = 1; ms = 0; mo = 0;
    cmp(64'({cc.zf, cc.sf, cc.of}), 64'b100, "reset flags");
    for (int it = 0; it < 3000; it++) begin
      logic [3:0] ic;
      logic [63:0] ev, a, b, c;
      logic c_ok, nz, ns, no;
      logic signed [64:0] w;
      ic = 4'($urandom_range(0, 11));
      a = {$urandom, $urandom}; b = {$urandom, $urandom}; c = {$urandom, $urandom};
      if (it % 4 == 0) b = a;
      E.stat = ($urandom_range(0, 9) == 0) ? S_HLT : S_AOK;
      E.icode = icode_e'(ic);
      E.ifun = (ic == 4'h6) ? 4'($urandom_range(0, 3)) : 4'($urandom_range(0, 6));
      E.valA = a; E.valB = b; E.valC = c;
      E.dstE = 4'($urandom); E.dstM = 4'($urandom);
      cc_en = ($urandom_range(0, 9) != 0);
      #1;
      case (ic)
        4'h2: ev = a;
        4'h3: ev = c;
        4'h4, 4'h5: ev = b + c;
        4'h6: case (E.ifun) 0: ev = b + a; 1: ev = b - a; 2: ev = b & a; default: ev = b ^ a; endcase
        4'h7: ev = c;
        4'h8, 4'hA: ev = b - 8;
        4'h9, 4'hB: ev = b + 8;
        default: ev = 0;
      endcase
      if (!(ic inside {4'h0, 4'h1})) cmp(e_out.valE, ev, $sformatf("valE ic=%h fn=%h", ic, E.ifun));
      c_ok = cond(mz, ms, mo, E.ifun);
      if (ic == 4'h7 || ic == 4'h2) cmp(64'(e_out.cnd), 64'(c_ok), $sformatf("cnd fn=%h", E.ifun));
      cmp(64'(e_out.dstE), (ic == 4'h2 && !c_ok) ? 64'hF : 64'(E.dstE), "dstE");
      cmp(64'(e_out.dstM), 64'(E.dstM), "dstM");
      cmp(e_out.valA, a, "valA pass");
      @(posedge clk); #1;
      if (ic == 4'h6 && E.stat == S_AOK && cc_en) begin
        nz = (ev == 0); ns = ev[63];
        case (E.ifun)
          0: begin w = $signed({b[63], b}) + $signed({a[63], a}); no = w[64] != w[63]; end
          1: begin w = $signed({b[63], b}) - $signed({a[63], a}); no = w[64] != w[63]; end
          default: no = 0;
        endcase
        mz = nz; ms = ns; mo = no;
      end
      cmp(64'({cc.zf, cc.sf, cc.of}), 64'({mz, ms, mo}), "flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
