// tb_alu: checks every ALU operation on random and corner operands against
// results computed here with plain SystemVerilog operators.
module tb_alu;
  import mips_pkg::*;

  alu_op_e op;
  word_t   a, b, s;
  int      checks = 0, failures = 0;

  alu dut (.op, .a, .b, .s);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t model(alu_op_e o, word_t x, word_t y);
    case (o)
      ALU_ADD:  return x + y;
      ALU_SUB:  return x + ~y + 1;
      ALU_AND:  return x & y;
      ALU_OR:   return x | y;
      ALU_XOR:  return x ^ y;
      ALU_NOR:  return ~x & ~y;
      ALU_SLT:  return (x[31] != y[31]) ? word_t'(x[31]) : word_t'(x < y);
      default:  return word_t'(x < y);
    endcase
  endfunction

  task automatic try(alu_op_e o, word_t x, word_t y);
    op = o; a = x; b = y;
    #1;
    checks++;
    if (s !== model(o, x, y)) begin
      failures++;
      $display("op %s a=%h b=%h: got %h expected %h", o.name(), x, y, s, model(o, x, y));
    end
  endtask

  initial begin
    static word_t corners [6] = '{32'h0, 32'h1, 32'hffffffff, 32'h7fffffff, 32'h80000000, 32'h12345678};
    for (int o = 0; o < 8; o++) begin
      foreach (corners[i]) foreach (corners[j]) try(alu_op_e'(o), corners[i], corners[j]);
      repeat (200) try(alu_op_e'(o), $urandom, $urandom);
    end
    // the lecture's examples: r2 + 3, r4 - r5
    try(ALU_ADD, 32'd100, 32'd3);
    try(ALU_SUB, 32'd4, 32'd5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
