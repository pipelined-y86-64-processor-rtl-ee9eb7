// y86_dmem: byte-addressed data memory with 8-byte little-endian accesses.
//
// Holds BYTES bytes. A read (re) returns the 8 bytes at addr combinationally
// on rdata; a write (we) stores wdata at addr on the rising clock edge. An
// access whose 8 bytes do not all lie inside the memory raises error in the
// same cycle and writes nothing; the pipeline turns that into an address
// exception. A second, side-effect-free read port (dbg_addr/dbg_rdata) lets
// a testbench or host inspect memory.
//
// The data memory with address, data in, data out and a write control comes
// from the design's datapath drawings; the size, byte order, the range check
// and the debug port are this implementation's choices. No reset.
module y86_dmem #(
  parameter int BYTES = 65536
) (
  input  logic        clk,
  input  logic [63:0] addr,
  input  logic        re,
  input  logic        we,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  output logic        error,
  input  logic [63:0] dbg_addr,
  output logic [63:0] dbg_rdata
);

  localparam int AW = $clog2(BYTES);
  logic [7:0] mem [BYTES];

  function automatic logic in_range(input logic [63:0] a);
    return a <= 64'(BYTES - 8);
  endfunction

  assign error = (re || we) && !in_range(addr);

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      rdata[8*k +: 8]     = in_range(addr)     ? mem[AW'(addr + 64'(k))]     : 8'h00;
      dbg_rdata[8*k +: 8] = in_range(dbg_addr) ? mem[AW'(dbg_addr + 64'(k))] : 8'h00;
    end
  end

  always_ff @(posedge clk) begin
    if (we && in_range(addr)) begin
      for (int k = 0; k < 8; k++) mem[AW'(addr + 64'(k))] <= wdata[8*k +: 8];
    end
  end

endmodule
