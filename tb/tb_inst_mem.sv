// tb_inst_mem: writes a pattern through the load port and reads it back by
// byte address, including address wrap-around and the ignored low bits.
module tb_inst_mem;
  localparam int W = 64;

  logic        clk = 1'b0, we;
  logic [31:0] raddr, rdata, waddr, wdata;
  int          checks = 0, failures = 0;

  inst_mem #(.WORDS(W)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pat(int i); return 32'h9e3779b9 * (i + 1); endfunction

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 32'(4 * i); wdata = pat(i);
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < W; i++) begin
      raddr = 32'(4 * i) + 32'($urandom_range(0, 3)) + 32'(W * 4 * $urandom_range(0, 3));
      #1;
      checks++;
      if (rdata !== pat(i)) begin
        failures++;
        $display("word %0d: got %h expected %h", i, rdata, pat(i));
      end
    end
    // a write with we low changes nothing
    @(negedge clk);
    waddr = 32'd8; wdata = 32'hdeadbeef;
    @(negedge clk);
    raddr = 32'd8; #1;
    checks++;
    if (rdata !== pat(2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
