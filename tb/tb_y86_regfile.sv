// tb_y86_regfile: checks the register file against an array model.
//
// Random writes through both write ports and the debug port, random reads on
// both read ports; register 0xF must read 0 and ignore writes, the M port
// must win over the E port, a write must be visible only after the clock
// edge, and we=0 must block writes.
// The registers are first loaded through the debug port.
module tb_y86_regfile;
  logic clk = 1'b0;
  logic [3:0] srcA, srcB, dstE, dstM, dbg_widx, dbg_ridx;
  logic [63:0] valA, valB, valE, valM, dbg_wdata, dbg_rdata;
  logic we, dbg_we;
  int checks = 0, failures = 0;
  logic [63:0] model [16];

  y86_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
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
    we = 0; dbg_we = 0; srcA = 0; srcB = 0; dstE = 4'hF; dstM = 4'hF;
    valE = 0; valM = 0; dbg_widx = 0; dbg_wdata = 0; dbg_ridx = 0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    // initialise through the debug port
    for (int i = 0; i < 15; i++) begin
      dbg_we = 1; dbg_widx = 4'(i); dbg_wdata = 64'(i * 1000);
      model[i] = 64'(i * 1000);
      @(posedge clk); #1;
    end
    dbg_we = 0;
    for (int i = 0; i < 16; i++) begin
      srcA = 4'(i); #1 cmp(valA, model[i], "debug-loaded value");
    end
    for (int it = 0; it < 1500; it++) begin
      we = ($urandom_range(0, 7) != 0);
      dstE = 4'($urandom); dstM = ($urandom_range(0, 3) == 0) ? dstE : 4'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      dbg_we = ($urandom_range(0, 9) == 0); dbg_widx = 4'($urandom); dbg_wdata = {$urandom, $urandom};
      srcA = 4'($urandom); srcB = 4'($urandom); dbg_ridx = 4'($urandom);
      #1;
      // before the edge, old contents
      cmp(valA, model[srcA], "valA");
      cmp(valB, model[srcB], "valB");
      cmp(dbg_rdata, model[dbg_ridx], "dbg_rdata");
      @(posedge clk); #1;
      if (we && dstE != 4'hF) model[dstE] = valE;
      if (we && dstM != 4'hF) model[dstM] = valM;
      if (dbg_we && dbg_widx != 4'hF) model[dbg_widx] = dbg_wdata;
      model[15] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
