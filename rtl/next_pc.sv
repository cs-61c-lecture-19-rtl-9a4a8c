// next_pc: the PC register and the next-PC logic ("Next PC" / IAU).
//
// Every rising edge the PC loads, in priority order:
//   rst         -> RESET_PC
//   stall       -> PC (clock enable off: the same instruction is fetched
//                  again, so the fetch stage needs no extra buffer)
//   take_branch -> br_pc_plus4 + (br_imm << 2)   (beq taken in decode)
//   otherwise   -> PC + 4
// The branch is resolved while the beq is in decode, when the PC already
// holds the address of the instruction after it; that instruction (the delay
// slot) is always executed and the target is fetched next.  pc_plus4 is
// output for the IF/DE register.
module next_pc #(
  parameter logic [31:0] RESET_PC = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        stall,
  input  logic        take_branch,
  input  logic [31:0] br_pc_plus4,  // PC+4 of the branch in decode
  input  logic [31:0] br_imm,       // sign-extended word offset
  output logic [31:0] pc,
  output logic [31:0] pc_plus4
);

  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk) begin
    if (rst)              pc <= RESET_PC;
    else if (stall)       pc <= pc;
    else if (take_branch) pc <= br_pc_plus4 + {br_imm[29:0], 2'b00};
    else                  pc <= pc_plus4;
  end

endmodule
