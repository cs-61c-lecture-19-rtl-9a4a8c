// reg_file: the 32 x 32-bit MIPS register file, two read ports, one write
// port.
//
// Register $0 always reads zero and ignores writes.  A write happens on the
// rising edge; a read of the register being written in the same cycle returns
// the new value (write-through).  That is the "register hardware" that lets
// an instruction in decode see the result of the instruction in write-back
// three slots ahead without a forwarding path.  All registers clear on reset
// so that simulation starts from a known state; that is this design's choice.
module reg_file (
  input  logic                  clk,
  input  logic                  rst,
  input  mips_pkg::reg_idx_t    ra1,
  output mips_pkg::word_t       rd1,
  input  mips_pkg::reg_idx_t    ra2,
  output mips_pkg::word_t       rd2,
  input  logic                  we,
  input  mips_pkg::reg_idx_t    wa,
  input  mips_pkg::word_t       wd
);
  import mips_pkg::*;

  word_t regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    if (ra1 == 5'd0)                rd1 = '0;
    else if (we && wa == ra1)       rd1 = wd;
    else                            rd1 = regs[ra1];
    if (ra2 == 5'd0)                rd2 = '0;
    else if (we && wa == ra2)       rd2 = wd;
    else                            rd2 = regs[ra2];
  end

endmodule
