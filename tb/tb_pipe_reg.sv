// tb_pipe_reg: checks the pipeline register's load, hold (en low), bubble
// and reset behaviour cycle by cycle against a reference register kept here.
module tb_pipe_reg;
  typedef logic [15:0] t_t;

  logic clk = 1'b0, rst, en, bubble, in_valid, out_valid;
  t_t   in_data, out_data;
  int   checks = 0, failures = 0;

  pipe_reg #(.T(t_t)) dut (.clk, .rst, .en, .bubble, .in_valid, .in_data,
                           .out_valid, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic ref_v;
  t_t   ref_d;
  int   n_hold = 0, n_bubble = 0;

  initial begin
    rst = 1'b1; en = 1'b1; bubble = 1'b0; in_valid = 1'b1; in_data = '0;
    @(negedge clk);
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("valid not cleared by reset"); end
    ref_v = 1'b0; ref_d = out_data;
    rst = 1'b0;
    for (int c = 0; c < 1000; c++) begin
      en       = ($urandom_range(0, 3) != 0);
      bubble   = ($urandom_range(0, 4) == 0);
      in_valid = ($urandom_range(0, 5) != 0);
      in_data  = t_t'($urandom);
      @(negedge clk);
      if (en) begin
        ref_v = in_valid && !bubble;
        ref_d = in_data;
        if (bubble) n_bubble++;
      end else begin
        n_hold++;
      end
      checks++;
      if (out_valid !== ref_v || (ref_v && out_data !== ref_d)) begin
        failures++;
        $display("cycle %0d: got v=%b d=%h expected v=%b d=%h", c, out_valid, out_data, ref_v, ref_d);
      end
    end
    checks++;
    if (n_hold == 0 || n_bubble == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
