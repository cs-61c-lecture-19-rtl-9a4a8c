// tb_main_control: decodes every supported instruction, with random register
// fields and immediates, and compares the control bundle, destination
// register and extended immediate with a table of expected values written
// from the MIPS instruction definitions.  Also checks that undefined
// encodings and the all-zero word decode to a nop.
module tb_main_control;
  import mips_pkg::*;

  word_t    ir, imm;
  ctrl_t    ctrl;
  reg_idx_t rw;
  int       checks = 0, failures = 0;

  main_control dut (.ir, .ctrl, .rw, .imm);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {alu_src, alu_op, mem_wr, branch, mem_to_reg, reg_wr, rs_used, rt_used},
  // destination kind (0 none, 1 rd, 2 rt), extension (0 zero, 1 sign)
  task automatic check(string name, word_t instr, logic alu_src, alu_op_e aop,
                       logic mw, logic br, logic m2r, logic rwr, logic rsu, logic rtu,
                       int dst, logic sext);
    reg_idx_t exp_rw;
    word_t    exp_imm;
    ir = instr;
    #1;
    exp_rw  = (dst == 1) ? instr[15:11] : (dst == 2) ? instr[20:16] : 5'd0;
    exp_imm = sext ? word_t'($signed(instr[15:0])) : word_t'(instr[15:0]);
    checks++;
    if (ctrl.alu_src !== alu_src || (rwr || br ? ctrl.alu_op !== aop : 1'b0) ||
        ctrl.mem_wr !== mw || ctrl.branch !== br || ctrl.mem_to_reg !== m2r ||
        ctrl.reg_wr !== rwr || ctrl.rs_used !== rsu || ctrl.rt_used !== rtu ||
        rw !== exp_rw || ((alu_src || br) && imm !== exp_imm)) begin
      failures++;
      $display("%s (%h): ctrl=%p rw=%0d imm=%h", name, instr, ctrl, rw, imm);
    end
  endtask

  function automatic word_t rtype(logic [5:0] fn);
    return {6'h00, 15'($urandom), 5'd0, fn};
  endfunction
  function automatic word_t itype(logic [5:0] op);
    return {op, 26'($urandom)};
  endfunction

  initial begin
    repeat (50) begin
      check("add",  rtype(6'h20), 0, ALU_ADD,  0,0,0,1,1,1, 1, 0);
      check("addu", rtype(6'h21), 0, ALU_ADD,  0,0,0,1,1,1, 1, 0);
      check("sub",  rtype(6'h22), 0, ALU_SUB,  0,0,0,1,1,1, 1, 0);
      check("subu", rtype(6'h23), 0, ALU_SUB,  0,0,0,1,1,1, 1, 0);
      check("and",  rtype(6'h24), 0, ALU_AND,  0,0,0,1,1,1, 1, 0);
      check("or",   rtype(6'h25), 0, ALU_OR,   0,0,0,1,1,1, 1, 0);
      check("xor",  rtype(6'h26), 0, ALU_XOR,  0,0,0,1,1,1, 1, 0);
      check("nor",  rtype(6'h27), 0, ALU_NOR,  0,0,0,1,1,1, 1, 0);
      check("slt",  rtype(6'h2a), 0, ALU_SLT,  0,0,0,1,1,1, 1, 0);
      check("sltu", rtype(6'h2b), 0, ALU_SLTU, 0,0,0,1,1,1, 1, 0);
      check("addi", itype(6'h08), 1, ALU_ADD,  0,0,0,1,1,0, 2, 1);
      check("addiu",itype(6'h09), 1, ALU_ADD,  0,0,0,1,1,0, 2, 1);
      check("andi", itype(6'h0c), 1, ALU_AND,  0,0,0,1,1,0, 2, 0);
      check("ori",  itype(6'h0d), 1, ALU_OR,   0,0,0,1,1,0, 2, 0);
      check("xori", itype(6'h0e), 1, ALU_XOR,  0,0,0,1,1,0, 2, 0);
      check("lw",   itype(6'h23), 1, ALU_ADD,  0,0,1,1,1,0, 2, 1);
      check("sw",   itype(6'h2b), 1, ALU_ADD,  1,0,0,0,1,0, 0, 1);
      check("beq",  itype(6'h04), 0, ALU_SUB,  0,1,0,0,1,1, 0, 1);
      check("sll/nop", rtype(6'h00), 0, ALU_ADD, 0,0,0,0,0,0, 0, 0);
      check("j (unsupported)", itype(6'h02), 0, ALU_ADD, 0,0,0,0,0,0, 0, 0);
    end
    check("all-zero", 32'h0, 0, ALU_ADD, 0,0,0,0,0,0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
