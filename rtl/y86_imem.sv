// y86_imem: byte-addressed instruction memory.
//
// Holds BYTES bytes. The fetch stage presents a PC and receives, in the same
// cycle, the ten bytes starting there packed little-endian into i10bytes
// (byte at pc in bits [7:0], so the instruction's icode is bits [7:4] and
// its register byte is bits [15:8]). Bytes past the end of the memory read
// as 0; error is raised when pc itself lies outside the memory. The fetch
// stage checks the end of the actual instruction against BYTES.
//
// Contents are written one byte per clock through the load port. The memory
// has no reset. Ten bytes per fetch follows the design; the size, the load
// port and the out-of-range behaviour are this implementation's choices.
module y86_imem #(
  parameter int BYTES = 65536
) (
  input  logic        clk,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic [63:0] pc,
  output logic [79:0] i10bytes,
  output logic        error
);

  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (load_en && load_addr < 64'(BYTES)) mem[load_addr[$clog2(BYTES)-1:0]] <= load_data;
  end

  assign error = (pc >= 64'(BYTES));

  always_comb begin
    for (int k = 0; k < 10; k++) begin
      logic [63:0] a;
      a = pc + 64'(k);
      i10bytes[8*k +: 8] = (a < 64'(BYTES)) ? mem[a[$clog2(BYTES)-1:0]] : 8'h00;
    end
  end

endmodule
