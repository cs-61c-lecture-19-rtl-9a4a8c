// tb_hazard_unit: checks the load-use stall condition on random inputs and
// on the directed cases of the load-delay examples: lw then a dependent sub
// (stall), lw then an independent instruction (no stall), lw then a sw of the
// loaded register as store data (no stall), lw into $0 (no stall).
module tb_hazard_unit;
  import mips_pkg::*;

  logic     de_valid, de_rs_used, de_rt_used, ex_valid, ex_mem_to_reg, stall;
  reg_idx_t de_rs, de_rt, ex_rw;
  int       checks = 0, failures = 0, n_stall = 0;

  hazard_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_stall(string name, logic exp);
    #1;
    checks++;
    if (stall !== exp) begin failures++; $display("%s: stall=%b expected %b", name, stall, exp); end
    if (stall) n_stall++;
  endtask

  initial begin
    // lw $t0 in EX; sub $t3,$t0,$t2 in DE
    de_valid = 1; ex_valid = 1; ex_mem_to_reg = 1; ex_rw = 8;
    de_rs_used = 1; de_rt_used = 1; de_rs = 8; de_rt = 10;
    expect_stall("lw/sub rs", 1);
    de_rs = 10; de_rt = 8;
    expect_stall("lw/sub rt", 1);
    de_rs = 9; de_rt = 10;
    expect_stall("lw/independent", 0);
    // sw $t0, 0($t1): rt is store data only
    de_rs_used = 1; de_rt_used = 0; de_rs = 9; de_rt = 8;
    expect_stall("lw/sw data", 0);
    de_rs = 8;
    expect_stall("lw/sw base", 1);
    // ALU instruction in EX never stalls
    ex_mem_to_reg = 0; de_rs_used = 1; de_rt_used = 1; de_rs = 8;
    expect_stall("add/sub", 0);
    // load into $0
    ex_mem_to_reg = 1; ex_rw = 0; de_rs = 0; de_rt = 0;
    expect_stall("lw $0", 0);
    // bubble in EX, bubble in DE
    ex_rw = 8; de_rs = 8; ex_valid = 0;
    expect_stall("invalid EX", 0);
    ex_valid = 1; de_valid = 0;
    expect_stall("invalid DE", 0);
    // random
    for (int c = 0; c < 20000; c++) begin
      logic exp;
      {de_valid, de_rs_used, de_rt_used, ex_valid, ex_mem_to_reg} = 5'($urandom);
      de_rs = reg_idx_t'($urandom_range(0, 3)); de_rt = reg_idx_t'($urandom_range(0, 3));
      ex_rw = reg_idx_t'($urandom_range(0, 3));
      exp = de_valid & ex_valid & ex_mem_to_reg & (ex_rw != 0) &
            ((de_rs_used & (de_rs == ex_rw)) | (de_rt_used & (de_rt == ex_rw)));
      expect_stall("random", exp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
