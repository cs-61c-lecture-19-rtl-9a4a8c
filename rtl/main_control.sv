// main_control: the decoder ("Main Control") of the DE stage.
//
// Combinational.  From the instruction register it produces the control
// bundle (ctrl_t) that travels with the instruction through DE/EX, EX/ME and
// ME/WB (data-stationary control: EX uses ALUSrc/ALUOp one cycle later, ME
// uses MemWr two cycles later, WB uses MemtoReg/RegWr three cycles later).
// It also resolves, already in decode, the two choices that only depend on the
// instruction word: the destination register (RegDst: rd for R-type, rt for
// I-type; 0 when nothing is written) and the extended immediate (ExtOp: sign
// extension except for andi/ori/xori, which zero-extend).  Unknown encodings,
// including the all-zero word, decode to a nop.  Branch is beq only.
module main_control (
  input  mips_pkg::word_t    ir,
  output mips_pkg::ctrl_t    ctrl,
  output mips_pkg::reg_idx_t rw,
  output mips_pkg::word_t    imm
);
  import mips_pkg::*;

  logic [5:0] op, fn;
  assign op = ir[31:26];
  assign fn = ir[5:0];

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        ctrl.rs_used = 1'b1;
        ctrl.rt_used = 1'b1;
        ctrl.reg_wr  = 1'b1;
        unique case (fn)
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:          ctrl.alu_op = ALU_AND;
          FN_OR:           ctrl.alu_op = ALU_OR;
          FN_XOR:          ctrl.alu_op = ALU_XOR;
          FN_NOR:          ctrl.alu_op = ALU_NOR;
          FN_SLT:          ctrl.alu_op = ALU_SLT;
          FN_SLTU:         ctrl.alu_op = ALU_SLTU;
          default:         ctrl = CTRL_NOP;
        endcase
      end
      OP_ADDI, OP_ADDIU, OP_ANDI, OP_ORI, OP_XORI: begin
        ctrl.ext_op  = (op == OP_ADDI) || (op == OP_ADDIU);
        ctrl.alu_src = 1'b1;
        ctrl.rs_used = 1'b1;
        ctrl.reg_wr  = 1'b1;
        unique case (op)
          OP_ANDI: ctrl.alu_op = ALU_AND;
          OP_ORI:  ctrl.alu_op = ALU_OR;
          OP_XORI: ctrl.alu_op = ALU_XOR;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.rs_used    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.rs_used = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_op  = ALU_SUB;
        ctrl.branch  = 1'b1;
        ctrl.rs_used = 1'b1;
        ctrl.rt_used = 1'b1;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end

  always_comb begin
    if (!ctrl.reg_wr)     rw = 5'd0;
    else if (ctrl.reg_dst) rw = ir[15:11];
    else                   rw = ir[20:16];
    imm = ctrl.ext_op ? {{16{ir[15]}}, ir[15:0]} : {16'd0, ir[15:0]};
  end

endmodule
