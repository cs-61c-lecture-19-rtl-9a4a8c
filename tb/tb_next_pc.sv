// tb_next_pc: drives random stall and branch requests and checks the PC
// after every edge against a reference: reset value, +4 sequencing, hold on
// stall (which wins over a branch), and the branch target
// PC+4 + 4*offset for positive and negative offsets.
module tb_next_pc;
  localparam logic [31:0] RST_PC = 32'h0000_0100;

  logic        clk = 1'b0, rst, stall, take_branch;
  logic [31:0] br_pc_plus4, br_imm, pc, pc_plus4;
  int          checks = 0, failures = 0;

  next_pc #(.RESET_PC(RST_PC)) dut (.clk, .rst, .stall, .take_branch,
                                    .br_pc_plus4, .br_imm, .pc, .pc_plus4);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_pc;
  int n_stall = 0, n_branch = 0;

  initial begin
    rst = 1'b1; stall = 1'b0; take_branch = 1'b0; br_pc_plus4 = '0; br_imm = '0;
    @(negedge clk);
    exp_pc = RST_PC;
    checks++;
    if (pc !== exp_pc) begin failures++; $display("reset: pc=%h", pc); end
    rst = 1'b0;
    for (int c = 0; c < 1000; c++) begin
      stall       = ($urandom_range(0, 4) == 0);
      take_branch = ($urandom_range(0, 3) == 0);
      br_pc_plus4 = 32'($urandom_range(0, 16383)) << 2;
      br_imm      = 32'($signed(16'($urandom)));
      checks++;
      if (pc_plus4 !== exp_pc + 4) begin failures++; $display("pc_plus4 %h", pc_plus4); end
      if (stall) n_stall++;
      else if (take_branch) n_branch++;
      @(negedge clk);
      if (stall)            exp_pc = exp_pc;
      else if (take_branch) exp_pc = br_pc_plus4 + br_imm * 4;
      else                  exp_pc = exp_pc + 4;
      checks++;
      if (pc !== exp_pc) begin
        failures++;
        $display("cycle %0d: pc=%h expected %h", c, pc, exp_pc);
      end
    end
    checks++;
    if (n_stall == 0 || n_branch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
