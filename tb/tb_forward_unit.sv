// tb_forward_unit: exhaustive-style random check of the operand forwarding
// selects and the store-data bypass against the rule "nearest valid pending
// write of a non-zero register wins", written here as a separate function.
module tb_forward_unit;
  import mips_pkg::*;

  reg_idx_t de_rs, de_rt, ex_rw, me_rw, me_rt, wb_rw;
  logic     ex_valid, ex_reg_wr, me_valid, me_reg_wr, me_mem_wr, wb_valid, wb_reg_wr;
  fwd_sel_e fwd_a, fwd_b;
  logic     store_bypass;
  int       checks = 0, failures = 0;
  int       seen [3];

  forward_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_sel_e ref_sel(reg_idx_t r);
    logic ex_hit, me_hit;
    ex_hit = ex_valid & ex_reg_wr & (ex_rw == r) & (r != 0);
    me_hit = me_valid & me_reg_wr & (me_rw == r) & (r != 0);
    return ex_hit ? FWD_EX : (me_hit ? FWD_MEM : FWD_RF);
  endfunction

  initial begin
    logic exp_byp;
    for (int c = 0; c < 20000; c++) begin
      // small register range so that matches are frequent
      de_rs = reg_idx_t'($urandom_range(0, 3)); de_rt = reg_idx_t'($urandom_range(0, 3));
      ex_rw = reg_idx_t'($urandom_range(0, 3)); me_rw = reg_idx_t'($urandom_range(0, 3));
      me_rt = reg_idx_t'($urandom_range(0, 3)); wb_rw = reg_idx_t'($urandom_range(0, 3));
      {ex_valid, ex_reg_wr, me_valid, me_reg_wr, me_mem_wr, wb_valid, wb_reg_wr} = 7'($urandom);
      #1;
      exp_byp = me_valid & me_mem_wr & wb_valid & wb_reg_wr & (wb_rw == me_rt) & (me_rt != 0);
      checks += 3;
      if (fwd_a !== ref_sel(de_rs)) begin failures++; $display("fwd_a rs=%0d", de_rs); end
      if (fwd_b !== ref_sel(de_rt)) begin failures++; $display("fwd_b rt=%0d", de_rt); end
      if (store_bypass !== exp_byp) begin failures++; $display("store_bypass"); end
      seen[fwd_a]++;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
