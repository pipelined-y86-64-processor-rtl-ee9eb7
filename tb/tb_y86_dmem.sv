// tb_y86_dmem: checks the data memory against a byte-array model.
//
// Random 8-byte reads and writes at unaligned addresses (BYTES = 256),
// including accesses that cross or lie beyond the end: those must raise
// error and must not write. The debug port is compared too.
module tb_y86_dmem;
  localparam int BYTES = 256;
  logic clk = 1'b0;
  logic [63:0] addr, wdata, rdata, dbg_addr, dbg_rdata;
  logic re, we, error;
  int checks = 0, failures = 0;
  logic [7:0] model [BYTES];

  y86_dmem #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] mread(input logic [63:0] a);
    logic [63:0] v;
    for (int k = 0; k < 8; k++) v[8*k +: 8] = model[a + k];
    return v;
  endfunction

  task automatic cmp(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (addr %0d)", what, got, exp, addr);
    end
  endtask

  initial begin
    re = 0; we = 0; addr = 0; wdata = 0; dbg_addr = 0;
    // initialise through the write port
    for (int a = 0; a < BYTES; a += 8) begin
      addr = 64'(a); wdata = {$urandom, $urandom}; we = 1;
      for (int k = 0; k < 8; k++) model[a + k] = wdata[8*k +: 8];
      @(posedge clk); #1;
    end
    for (int it = 0; it < 2000; it++) begin
      logic ok;
      addr = ($urandom_range(0, 9) == 0) ? 64'($urandom_range(BYTES - 8, BYTES + 16))
                                          : 64'($urandom_range(0, BYTES - 8));
      if ($urandom_range(0, 99) == 0) addr = 64'hFFFF_FFFF_FFFF_FFFC;
      ok = (addr <= BYTES - 8);
      re = $urandom_range(0, 1); we = !re && $urandom_range(0, 1);
      wdata = {$urandom, $urandom};
      dbg_addr = 64'($urandom_range(0, BYTES - 8));
      #1;
      checks++;
      if (error !== ((re || we) && !ok)) begin
        failures++; $display("FAIL error flag addr=%0d", addr);
      end
      if (re && ok) cmp(rdata, mread(addr), "rdata");
      cmp(dbg_rdata, mread(dbg_addr), "dbg_rdata");
      @(posedge clk); #1;
      if (we && ok) for (int k = 0; k < 8; k++) model[addr + k] = wdata[8*k +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
