// mips_pkg: types and constants shared by the five-stage pipelined MIPS subset.
//
// The instruction set is the integer subset used in the pipelining examples:
// R-type add/addu/sub/subu/and/or/xor/nor/slt/sltu, I-type addi/addiu/andi/
// ori/xori, lw, sw and beq.  Encodings are the standard MIPS ones.  Control is
// data stationary: the decoder produces one ctrl_t per instruction and that
// bundle travels down the pipeline registers next to the data it governs.
// The field names follow the classic control-signal names (ExtOp, ALUSrc,
// ALUOp, RegDst, MemWr, Branch, MemtoReg, RegWr); rs_used/rt_used, which tell
// the hazard and forwarding logic which source registers an instruction
// really reads, are this design's addition.
package mips_pkg;

  localparam int unsigned XLEN = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Primary opcodes (instr[31:26]).
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ADDI  = 6'h08,
    OP_ADDIU = 6'h09,
    OP_ANDI  = 6'h0c,
    OP_ORI   = 6'h0d,
    OP_XORI  = 6'h0e,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // R-type function codes (instr[5:0]).
  typedef enum logic [5:0] {
    FN_ADD  = 6'h20,
    FN_ADDU = 6'h21,
    FN_SUB  = 6'h22,
    FN_SUBU = 6'h23,
    FN_AND  = 6'h24,
    FN_OR   = 6'h25,
    FN_XOR  = 6'h26,
    FN_NOR  = 6'h27,
    FN_SLT  = 6'h2a,
    FN_SLTU = 6'h2b
  } funct_e;

  // ALU operation, chosen entirely by the decoder.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'd0,
    ALU_SUB  = 3'd1,
    ALU_AND  = 3'd2,
    ALU_OR   = 3'd3,
    ALU_XOR  = 3'd4,
    ALU_NOR  = 3'd5,
    ALU_SLT  = 3'd6,
    ALU_SLTU = 3'd7
  } alu_op_e;

  // Control bundle produced in decode.
  typedef struct packed {
    logic    ext_op;      // 1: sign-extend imm16, 0: zero-extend
    logic    alu_src;     // 1: ALU B input is the immediate
    alu_op_e alu_op;
    logic    reg_dst;     // 1: destination is rd, 0: rt
    logic    mem_wr;      // store
    logic    branch;      // beq
    logic    mem_to_reg;  // load: write-back value comes from memory
    logic    reg_wr;      // instruction writes a register
    logic    rs_used;     // rs is a source operand
    logic    rt_used;     // rt is an ALU/compare source (not store data)
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    ext_op: 1'b0, alu_src: 1'b0, alu_op: ALU_ADD, reg_dst: 1'b0,
    mem_wr: 1'b0, branch: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
    rs_used: 1'b0, rt_used: 1'b0
  };

  // Operand source chosen by the forwarding logic for a decode operand.
  typedef enum logic [1:0] {
    FWD_RF  = 2'd0,   // register file (includes its write-through of WB)
    FWD_EX  = 2'd1,   // ALU result of the instruction now in EX
    FWD_MEM = 2'd2    // result of the instruction now in ME (ALU or load)
  } fwd_sel_e;

  // Pipeline register contents.  The valid bit lives in pipe_reg.
  typedef struct packed {
    word_t pc_plus4;
    word_t ir;
  } if_de_t;

  typedef struct packed {
    ctrl_t    ctrl;
    word_t    a;          // operand A (rs), after forwarding
    word_t    b;          // operand B (rt), after forwarding
    word_t    imm;        // extended immediate
    reg_idx_t rw;         // destination register (0 if none)
    reg_idx_t rt;         // rt, for the store-data bypass in ME
  } de_ex_t;

  typedef struct packed {
    logic     mem_wr;
    logic     mem_to_reg;
    logic     reg_wr;
    word_t    s;          // ALU result / memory address
    word_t    d;          // store data (B passed through)
    reg_idx_t rw;
    reg_idx_t rt;
  } ex_me_t;

  typedef struct packed {
    logic     mem_to_reg;
    logic     reg_wr;
    word_t    s;          // ALU result passed through
    word_t    m;          // load result
    reg_idx_t rw;
  } me_wb_t;

endpackage
