// alu: the execute-stage ALU ("Exec").
//
// Purely combinational: s = a OP b for the operation the decoder chose.  It
// covers S <- A+B, A-B, A and/or/xor/nor B, A + SX (address and addi) and
// A or ZX (ori); set-less-than is signed (slt) or unsigned (sltu).  No
// overflow trap is raised: add and addi behave as addu and addiu, which is
// this design's simplification.
module alu (
  input  mips_pkg::alu_op_e op,
  input  mips_pkg::word_t   a,
  input  mips_pkg::word_t   b,
  output mips_pkg::word_t   s
);
  import mips_pkg::*;

  always_comb begin
    unique case (op)
      ALU_ADD:  s = a + b;
      ALU_SUB:  s = a - b;
      ALU_AND:  s = a & b;
      ALU_OR:   s = a | b;
      ALU_XOR:  s = a ^ b;
      ALU_NOR:  s = ~(a | b);
      ALU_SLT:  s = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: s = {31'd0, a < b};
      default:  s = a + b;
    endcase
  end

endmodule
