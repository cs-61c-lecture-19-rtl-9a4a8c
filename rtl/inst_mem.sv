// inst_mem: instruction memory, WORDS x 32 bits, word addressed by the PC.
//
// The read is combinational from the PC register, so the PC register is the
// only edge in front of the memory (the memory's input register *is* the PC
// pipeline register; no second clock edge is added in fetch).  A write port
// lets a host load a program before or while running; it writes on the rising
// edge.  Byte address bits [1:0] are ignored and addresses wrap modulo the
// memory size.  The size is this design's choice; the lecture gives none.
module inst_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] raddr,   // byte address (PC)
  output logic [31:0] rdata,
  input  logic        we,
  input  logic [31:0] waddr,   // byte address
  input  logic [31:0] wdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[raddr[AW+1:2]];

endmodule
