// tb_data_mem: random stores and loads compared with a reference array;
// checks that a store lands on the rising edge and that reads are
// combinational.
module tb_data_mem;
  localparam int W = 64;

  logic        clk = 1'b0, we;
  logic [31:0] addr, wdata, rdata;
  logic [31:0] model [W];
  logic        known [W];
  int          checks = 0, failures = 0;

  data_mem #(.WORDS(W)) dut (.clk, .addr, .we, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i;
    we = 1'b0; addr = '0; wdata = '0;
    foreach (known[k]) known[k] = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      i = int'($urandom_range(0, W - 1));
      addr = 32'(4 * i) + 32'($urandom_range(0, 3));
      we = ($urandom_range(0, 1) == 1);
      wdata = $urandom;
      #1;
      if (known[i]) begin
        checks++;
        if (rdata !== model[i]) begin
          failures++;
          $display("read word %0d: got %h expected %h", i, rdata, model[i]);
        end
      end
      if (we) begin
        @(posedge clk); #1;
        model[i] = wdata; known[i] = 1'b1;
        checks++;
        if (rdata !== wdata) begin
          failures++;
          $display("write word %0d: read back %h expected %h", i, rdata, wdata);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
