// tb_y86_imem: checks the instruction memory.
//
// Loads a random image through the load port (BYTES = 256 to keep it short),
// then compares the 10-byte little-endian window at many PCs, including
// windows that run past the end (those bytes read 0) and out-of-range PCs
// (error set).
module tb_y86_imem;
  localparam int BYTES = 256;
  logic clk = 1'b0;
  logic load_en;
  logic [63:0] load_addr, pc;
  logic [7:0] load_data;
  logic [79:0] i10bytes;
  logic error;
  int checks = 0, failures = 0;
  logic [7:0] image [BYTES];

  y86_imem #(.BYTES(BYTES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [79:0] exp;
    load_en = 0; load_addr = 0; load_data = 0; pc = 0;
    for (int a = 0; a < BYTES; a++) begin
      image[a] = 8'($urandom);
      load_en = 1; load_addr = 64'(a); load_data = image[a];
      @(posedge clk); #1;
    end
    load_en = 0;
    for (int it = 0; it < 400; it++) begin
      pc = (it < 300) ? 64'($urandom_range(0, BYTES - 1)) : 64'($urandom_range(BYTES - 1, BYTES + 40));
      #1;
      for (int k = 0; k < 10; k++) exp[8*k +: 8] = (pc + k < BYTES) ? image[pc + k] : 8'h00;
      checks++;
      if (i10bytes !== exp || error !== (pc >= BYTES)) begin
        failures++;
        $display("FAIL pc=%0d got %h/%b expected %h", pc, i10bytes, error, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
