// tb_reg_file: random reads and writes compared with a reference array;
// checks $0, reset, and the write-through of a same-cycle write to a read.
module tb_reg_file;
  import mips_pkg::*;

  logic     clk = 1'b0, rst, we;
  reg_idx_t ra1, ra2, wa;
  word_t    rd1, rd2, wd;
  word_t    model [32];
  int       checks = 0, failures = 0, n_through = 0;

  reg_file dut (.clk, .rst, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t expect_rd(reg_idx_t r);
    if (r == 0) return '0;
    if (we && wa == r) return wd;
    return model[r];
  endfunction

  initial begin
    rst = 1'b1; we = 1'b0; wa = '0; wd = '0; ra1 = '0; ra2 = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    foreach (model[k]) model[k] = '0;
    for (int c = 0; c < 3000; c++) begin
      we  = ($urandom_range(0, 2) != 0);
      wa  = reg_idx_t'($urandom);
      wd  = $urandom;
      ra1 = ($urandom_range(0, 3) == 0) ? wa : reg_idx_t'($urandom);
      ra2 = ($urandom_range(0, 3) == 0) ? wa : reg_idx_t'($urandom);
      #1;
      checks += 2;
      if (rd1 !== expect_rd(ra1)) begin
        failures++; $display("rd1 r%0d got %h expected %h", ra1, rd1, expect_rd(ra1));
      end
      if (rd2 !== expect_rd(ra2)) begin
        failures++; $display("rd2 r%0d got %h expected %h", ra2, rd2, expect_rd(ra2));
      end
      if (we && wa != 0 && (ra1 == wa || ra2 == wa)) n_through++;
      @(negedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    checks++;
    if (n_through == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
