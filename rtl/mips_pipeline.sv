// mips_pipeline: a five-stage pipelined MIPS-subset processor.
//
// Stages and their pipeline registers:
//   IF  PC -> instruction memory                  IF/DE: IR, PC+4
//   DE  decode, register read, forwarding muxes,  DE/EX: control, A, B, imm,
//       branch compare, next-PC decision                 rw, rt
//   EX  ALU                                       EX/ME: control, S, D, rw, rt
//   ME  data memory access, store-data bypass     ME/WB: control, S, M, rw
//   WB  MemtoReg mux -> register file write
// Every pipeline register carries a valid bit; a cleared valid bit is a nop.
//
// Control is data stationary: main_control decodes once in DE and the control
// bundle rides along with the instruction.  Hazards are handled as follows.
//   * Forwarding into the operand latches: in DE, each source register is
//     compared with the destinations pending in EX and ME and the nearest one
//     is forwarded into A/B (the ALU result computed this cycle, or the ME
//     result, which for a load is the data-memory output).  WB is covered by
//     the register file's write-through.
//   * Load-use interlock: a load in EX whose destination the DE instruction
//     reads stalls for one cycle (PC and IF/DE hold, bubble into EX).
//   * Store-data bypass in ME: "lw r1; sw r1" does not stall; the store takes
//     the load's value from WB.
//   * Branches (beq) are resolved in DE with one architectural delay slot: the
//     instruction after a branch always executes.  Because the compare uses
//     the forwarded operands, a beq right after the ALU instruction that
//     produces its operand does not stall; a beq right after a load does.
// The pipeline organisation, the register names (IR, A, B, S, D, M), the
// forwarding and stalling rules and the delayed branch follow the lecture
// material this design is built from; memory sizes, the instruction subset,
// reset behaviour and the host program-load port are this design's choices.
//
// Interface: imem_* loads the program (a write per rising edge); wb_* and
// dm_* report, for observation, each register write and each store in the
// cycle it takes effect; stall is high in an interlock cycle.  Reset is
// synchronous and active high; the first instruction (at RESET_PC) is fetched
// in the first cycle after reset.  Throughput is one instruction per cycle
// except for one bubble per load-use stall.
module mips_pipeline #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output logic        wb_we,
  output logic [4:0]  wb_rw,
  output logic [31:0] wb_wdata,
  output logic        dm_we,
  output logic [31:0] dm_addr,
  output logic [31:0] dm_wdata,
  output logic        stall
);
  import mips_pkg::*;

  // ---------------------------------------------------------------- IF
  word_t pc, pc_plus4, instr;
  logic  take_branch;
  word_t br_pc_plus4, br_imm;

  next_pc #(.RESET_PC(RESET_PC)) u_next_pc (
    .clk, .rst, .stall, .take_branch,
    .br_pc_plus4, .br_imm, .pc, .pc_plus4
  );

  inst_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .raddr(pc), .rdata(instr),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  if_de_t ifde_in, ifde;
  logic   de_valid;
  assign ifde_in = '{pc_plus4: pc_plus4, ir: instr};

  pipe_reg #(.T(if_de_t)) u_if_de (
    .clk, .rst, .en(!stall), .bubble(1'b0),
    .in_valid(1'b1), .in_data(ifde_in),
    .out_valid(de_valid), .out_data(ifde)
  );

  // ---------------------------------------------------------------- DE
  ctrl_t    de_ctrl;
  reg_idx_t de_rs, de_rt, de_rw;
  word_t    de_imm, rf_rd1, rf_rd2, op_a, op_b;
  fwd_sel_e fwd_a, fwd_b;

  assign de_rs = ifde.ir[25:21];
  assign de_rt = ifde.ir[20:16];

  main_control u_ctrl (
    .ir(ifde.ir), .ctrl(de_ctrl), .rw(de_rw), .imm(de_imm)
  );

  // signals from later stages, declared here for the forwarding logic
  de_ex_t deex;
  ex_me_t exme;
  me_wb_t mewb;
  logic   ex_valid, me_valid, wb_valid;
  word_t  ex_s, me_result, wb_value, dmem_rdata;
  logic   store_bypass;

  reg_file u_rf (
    .clk, .rst,
    .ra1(de_rs), .rd1(rf_rd1),
    .ra2(de_rt), .rd2(rf_rd2),
    .we(wb_we), .wa(mewb.rw), .wd(wb_value)
  );

  forward_unit u_fwd (
    .de_rs, .de_rt,
    .ex_valid, .ex_reg_wr(deex.ctrl.reg_wr), .ex_rw(deex.rw),
    .me_valid, .me_reg_wr(exme.reg_wr), .me_rw(exme.rw),
    .me_mem_wr(exme.mem_wr), .me_rt(exme.rt),
    .wb_valid, .wb_reg_wr(mewb.reg_wr), .wb_rw(mewb.rw),
    .fwd_a, .fwd_b, .store_bypass
  );

  hazard_unit u_hazard (
    .de_valid, .de_rs_used(de_ctrl.rs_used), .de_rt_used(de_ctrl.rt_used),
    .de_rs, .de_rt,
    .ex_valid, .ex_mem_to_reg(deex.ctrl.mem_to_reg), .ex_rw(deex.rw),
    .stall
  );

  // forwarding muxes in front of the operand latches
  always_comb begin
    unique case (fwd_a)
      FWD_EX:  op_a = ex_s;
      FWD_MEM: op_a = me_result;
      default: op_a = rf_rd1;
    endcase
    unique case (fwd_b)
      FWD_EX:  op_b = ex_s;
      FWD_MEM: op_b = me_result;
      default: op_b = rf_rd2;
    endcase
  end

  // branch compare ("=") and target
  assign take_branch = de_valid && de_ctrl.branch && !stall && (op_a == op_b);
  assign br_pc_plus4 = ifde.pc_plus4;
  assign br_imm      = de_imm;

  de_ex_t deex_in;
  assign deex_in = '{ctrl: de_ctrl, a: op_a, b: op_b, imm: de_imm,
                     rw: de_rw, rt: de_rt};

  pipe_reg #(.T(de_ex_t)) u_de_ex (
    .clk, .rst, .en(1'b1), .bubble(stall),
    .in_valid(de_valid), .in_data(deex_in),
    .out_valid(ex_valid), .out_data(deex)
  );

  // ---------------------------------------------------------------- EX
  word_t alu_b;
  assign alu_b = deex.ctrl.alu_src ? deex.imm : deex.b;

  alu u_alu (.op(deex.ctrl.alu_op), .a(deex.a), .b(alu_b), .s(ex_s));

  ex_me_t exme_in;
  assign exme_in = '{mem_wr: deex.ctrl.mem_wr, mem_to_reg: deex.ctrl.mem_to_reg,
                     reg_wr: deex.ctrl.reg_wr, s: ex_s, d: deex.b,
                     rw: deex.rw, rt: deex.rt};

  pipe_reg #(.T(ex_me_t)) u_ex_me (
    .clk, .rst, .en(1'b1), .bubble(1'b0),
    .in_valid(ex_valid), .in_data(exme_in),
    .out_valid(me_valid), .out_data(exme)
  );

  // ---------------------------------------------------------------- ME
  assign dm_we    = me_valid && exme.mem_wr;
  assign dm_addr  = exme.s;
  assign dm_wdata = store_bypass ? wb_value : exme.d;

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(dm_addr), .we(dm_we), .wdata(dm_wdata), .rdata(dmem_rdata)
  );

  assign me_result = exme.mem_to_reg ? dmem_rdata : exme.s;

  me_wb_t mewb_in;
  assign mewb_in = '{mem_to_reg: exme.mem_to_reg, reg_wr: exme.reg_wr,
                     s: exme.s, m: dmem_rdata, rw: exme.rw};

  pipe_reg #(.T(me_wb_t)) u_me_wb (
    .clk, .rst, .en(1'b1), .bubble(1'b0),
    .in_valid(me_valid), .in_data(mewb_in),
    .out_valid(wb_valid), .out_data(mewb)
  );

  // ---------------------------------------------------------------- WB
  assign wb_value = mewb.mem_to_reg ? mewb.m : mewb.s;
  assign wb_we    = wb_valid && mewb.reg_wr && (mewb.rw != 5'd0);
  assign wb_rw    = mewb.rw;
  assign wb_wdata = wb_value;

  // A load-use stall lasts exactly one cycle: the bubble it issues leaves
  // no load in EX for the next cycle.
  a_stall_one_cycle: assert property (@(posedge clk) disable iff (rst)
    stall |=> !stall);

  // Load data is never taken from EX: an operand that would be forwarded
  // from a load in EX always comes with a stall.
  a_no_load_forward_from_ex: assert property (@(posedge clk) disable iff (rst)
    (de_valid && deex.ctrl.mem_to_reg && ex_valid &&
     ((de_ctrl.rs_used && fwd_a == FWD_EX) || (de_ctrl.rt_used && fwd_b == FWD_EX)))
    |-> stall);

endmodule
