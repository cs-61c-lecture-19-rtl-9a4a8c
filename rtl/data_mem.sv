// data_mem: data memory for lw/sw, WORDS x 32 bits.
//
// Word accesses only: byte address bits [1:0] are ignored and addresses wrap
// modulo the memory size.  The read is combinational from the EX/ME S
// register (the address), so a load's value is available within the ME stage
// and is registered into ME/WB.M.  A store writes on the rising edge at the
// end of ME.  The size is this design's choice.
module data_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,    // byte address
  input  logic        we,
  input  logic [31:0] wdata,
  output logic [31:0] rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
