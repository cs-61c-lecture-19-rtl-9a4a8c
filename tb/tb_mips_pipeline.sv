// tb_mips_pipeline: end-to-end test of the pipelined processor.
//
// Each test loads a program through the instruction-memory port, resets the
// core, runs it for a fixed number of cycles and compares the stream of
// register writes (wb_*) and stores (dm_*) with the stream produced by an
// instruction-level reference model written here from the ISA definition
// (sequential execution, one branch delay slot).  Programs end in a halt
// loop "beq $0,$0,-1 ; nop" that makes no writes.
//
// Directed programs are the examples used to explain the pipeline: the
// five-instruction walk-through with a taken branch, the forwarding chain
// add/sub/and/or/xor, the load-use chain lw/sub/and/or, and lw followed by a
// sw of the loaded register.  Their timing is checked too: the first
// instruction writes back in cycle 5 after reset, a program without stalls
// retires one instruction per cycle, and a load-use pair costs exactly one
// stall cycle.  Then random programs over registers $0..$7 with many loads,
// stores and forward branches exercise every hazard case.
//
// Mechanism coverage is counted from the core's internal signals: forwarding
// from EX, from ME (ALU result and load data), register-file write-through,
// load-use stall, store-data bypass, taken and untaken branches.  A
// mechanism that never happens counts as a failure.
//
// Parameters: N_RANDOM random programs (the default configuration of the core
// is used, so this is also the full-size test).
module tb_mips_pipeline;
  import mips_pkg::*;

  localparam int N_RANDOM = 60;
  localparam int DMEM_W   = 1024;

  logic        clk = 1'b0;
  logic        rst;
  logic        imem_we;
  logic [31:0] imem_waddr, imem_wdata;
  logic        wb_we, dm_we, stall;
  logic [4:0]  wb_rw;
  logic [31:0] wb_wdata, dm_addr, dm_wdata;

  mips_pipeline dut (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata,
    .wb_we, .wb_rw, .wb_wdata, .dm_we, .dm_addr, .dm_wdata, .stall
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle;

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- encoding
  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_op(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  localparam logic [31:0] NOP = 32'h0;

  // ------------------------------------------------------------- reference model
  typedef struct { logic is_store; logic [31:0] a; logic [31:0] d; } event_t;

  logic [31:0] prog [$];
  logic [31:0] ref_mem [DMEM_W];
  event_t      exp_rf [$], exp_st [$], got_rf [$], got_st [$];

  function automatic logic [31:0] sx(logic [15:0] v); return {{16{v[15]}}, v}; endfunction
  function automatic logic [31:0] zx(logic [15:0] v); return {16'd0, v}; endfunction

  // Runs the program from address 0 until the halt loop; fills exp_rf and
  // exp_st.  Returns the number of instructions executed (halt excluded).
  function automatic int run_model(int halt_pc);
    logic [31:0] r [32];
    logic [31:0] pc, npc, ins, a, b, res, tgt;
    logic [5:0]  op, fn;
    int          rs, rt, rd, n;
    logic        wr, br;
    for (int i = 0; i < 32; i++) r[i] = '0;
    pc = 0; npc = 4; n = 0;
    exp_rf.delete(); exp_st.delete();
    while (int'(pc) != halt_pc && n < 10000) begin
      ins = prog[pc[31:2]];
      op = ins[31:26]; fn = ins[5:0];
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      a = r[rs]; b = r[rt];
      wr = 1'b0; br = 1'b0; res = '0; tgt = pc + 4 + (sx(ins[15:0]) << 2);
      case (op)
        6'h00: begin
          wr = 1'b1;
          case (fn)
            6'h20, 6'h21: res = a + b;
            6'h22, 6'h23: res = a - b;
            6'h24: res = a & b;
            6'h25: res = a | b;
            6'h26: res = a ^ b;
            6'h27: res = ~(a | b);
            6'h2a: res = ($signed(a) < $signed(b)) ? 1 : 0;
            6'h2b: res = (a < b) ? 1 : 0;
            default: wr = 1'b0;
          endcase
        end
        6'h08, 6'h09: begin wr = 1'b1; res = a + sx(ins[15:0]); rd = rt; end
        6'h0c: begin wr = 1'b1; res = a & zx(ins[15:0]); rd = rt; end
        6'h0d: begin wr = 1'b1; res = a | zx(ins[15:0]); rd = rt; end
        6'h0e: begin wr = 1'b1; res = a ^ zx(ins[15:0]); rd = rt; end
        6'h23: begin
          wr = 1'b1; rd = rt;
          res = ref_mem[(a + sx(ins[15:0])) >> 2 & (DMEM_W - 1)];
        end
        6'h2b: begin
          ref_mem[(a + sx(ins[15:0])) >> 2 & (DMEM_W - 1)] = b;
          exp_st.push_back('{1'b1, a + sx(ins[15:0]), b});
        end
        6'h04: br = (a == b);
        default: ;
      endcase
      if (wr && rd != 0) begin
        r[rd] = res;
        exp_rf.push_back('{1'b0, 32'(rd), res});
      end
      pc = npc;
      npc = br ? tgt : npc + 4;
      n++;
    end
    return n;
  endfunction

  // ------------------------------------------------------------- DUT side
  logic        running = 1'b0;
  int unsigned first_wb_cycle, last_wb_cycle, stall_cycles;

  // coverage of the mechanisms
  int n_fwd_ex, n_fwd_me_alu, n_fwd_me_load, n_rf_through, n_stall,
      n_store_byp, n_br_taken, n_br_untaken, n_stall_branch;

  always @(posedge clk) begin
    if (rst) begin
      cycle <= 0;
    end else if (running) begin
      cycle <= cycle + 1;
      if (wb_we) begin
        got_rf.push_back('{1'b0, 32'(wb_rw), wb_wdata});
        if (first_wb_cycle == 0) first_wb_cycle = cycle + 1;
        last_wb_cycle = cycle + 1;
      end
      if (dm_we) got_st.push_back('{1'b1, dm_addr, dm_wdata});
      if (stall) stall_cycles++;
      // coverage (only for instructions that really use the operand)
      if (dut.de_valid && !dut.stall) begin
        if (dut.de_ctrl.rs_used || dut.de_ctrl.rt_used || dut.de_ctrl.mem_wr) begin
          if ((dut.de_ctrl.rs_used && dut.fwd_a == FWD_EX) ||
              (dut.de_ctrl.rt_used && dut.fwd_b == FWD_EX)) n_fwd_ex++;
          if ((dut.de_ctrl.rs_used && dut.fwd_a == FWD_MEM) ||
              (dut.de_ctrl.rt_used && dut.fwd_b == FWD_MEM)) begin
            if (dut.exme.mem_to_reg) n_fwd_me_load++;
            else                      n_fwd_me_alu++;
          end
          if (dut.wb_we && dut.de_ctrl.rs_used && dut.fwd_a == FWD_RF &&
              dut.de_rs == dut.wb_rw && dut.de_rs != 0) n_rf_through++;
        end
        if (dut.de_ctrl.branch) begin
          if (dut.take_branch) n_br_taken++;
          else                 n_br_untaken++;
        end
      end
      if (dut.stall) begin
        n_stall++;
        if (dut.de_ctrl.branch) n_stall_branch++;
      end
      if (dut.store_bypass && dut.dm_we) n_store_byp++;
    end
  end

  // ------------------------------------------------------------- test runner
  task automatic load_and_run(int cycles, output int executed);
    int halt_pc;
    // halt loop
    halt_pc = prog.size() * 4;
    prog.push_back(i_op(6'h04, 0, 0, -1));
    prog.push_back(NOP);
    rst = 1'b1;
    running = 1'b0;
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      imem_we = 1'b1; imem_waddr = 32'(i * 4); imem_wdata = prog[i];
    end
    @(negedge clk);
    imem_we = 1'b0;
    @(posedge clk);
    // initial data memory: take the memory's start contents as the model's
    for (int i = 0; i < DMEM_W; i++) ref_mem[i] = dut.u_dmem.mem[i];
    executed = run_model(halt_pc);
    got_rf.delete(); got_st.delete();
    first_wb_cycle = 0; last_wb_cycle = 0; stall_cycles = 0;
    @(negedge clk);
    rst = 1'b0;
    running = 1'b1;
    repeat (cycles) @(posedge clk);
    @(negedge clk);
    running = 1'b0;
  endtask

  task automatic compare(string name);
    int bad = 0;
    checks++;
    if (got_rf.size() != exp_rf.size()) begin
      $display("%s: %0d register writes, expected %0d", name, got_rf.size(), exp_rf.size());
      bad++;
    end
    for (int i = 0; i < got_rf.size() && i < exp_rf.size(); i++) begin
      checks++;
      if (got_rf[i].a != exp_rf[i].a || got_rf[i].d != exp_rf[i].d) begin
        if (bad < 5) $display("%s: write %0d got r%0d=%h expected r%0d=%h", name, i,
                              got_rf[i].a, got_rf[i].d, exp_rf[i].a, exp_rf[i].d);
        bad++;
      end
    end
    checks++;
    if (got_st.size() != exp_st.size()) begin
      $display("%s: %0d stores, expected %0d", name, got_st.size(), exp_st.size());
      bad++;
    end
    for (int i = 0; i < got_st.size() && i < exp_st.size(); i++) begin
      checks++;
      if (got_st[i].a != exp_st[i].a || got_st[i].d != exp_st[i].d) begin
        if (bad < 5) $display("%s: store %0d got [%h]=%h expected [%h]=%h", name, i,
                              got_st[i].a, got_st[i].d, exp_st[i].a, exp_st[i].d);
        bad++;
      end
    end
    if (bad != 0) failures++;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // preamble: give registers 1..14 distinct values with addi
  task automatic preamble(int base);
    for (int i = 1; i <= 14; i++) prog.push_back(i_op(6'h08, i, 0, base + 17 * i));
  endtask

  int executed;

  initial begin
    rst = 1'b1; imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    {n_fwd_ex, n_fwd_me_alu, n_fwd_me_load, n_rf_through, n_stall,
     n_store_byp, n_br_taken, n_br_untaken, n_stall_branch} = '0;
    repeat (3) @(posedge clk);

    // --- 1. timing: independent instructions, one per cycle
    prog.delete();
    for (int i = 1; i <= 8; i++) prog.push_back(i_op(6'h0d, i, 0, 100 + i)); // ori ri,$0,k
    load_and_run(40, executed);
    compare("independent");
    expect_eq("first write-back cycle", int'(first_wb_cycle), 5);
    expect_eq("8 instructions retire in 8 cycles", int'(last_wb_cycle - first_wb_cycle), 7);
    expect_eq("no stalls without loads", int'(stall_cycles), 0);

    // --- 2. walk-through: lw, addi, sub, beq (taken), ori (delay slot),
    //        add (skipped), ..., and at the target
    prog.delete();
    preamble(0);
    prog.push_back(i_op(6'h2b, 9, 2, 36));            // sw r9, 36(r2): seed memory
    prog.push_back(i_op(6'h08, 7, 6, 0));             // addi r7, r6, 0 (make r6 == r7)
    prog.push_back(i_op(6'h23, 1, 2, 36));            // lw   r1, 36(r2)
    prog.push_back(i_op(6'h08, 2, 2, 3));             // addi r2, r2, 3
    prog.push_back(r_op(6'h22, 3, 4, 5));             // sub  r3, r4, r5
    prog.push_back(i_op(6'h04, 7, 6, 4));             // beq  r6, r7, andi
    prog.push_back(i_op(6'h0d, 8, 9, 17));            // ori  r8, r9, 17 (delay slot)
    prog.push_back(r_op(6'h20, 10, 11, 12));          // add  r10, r11, r12 (skipped)
    prog.push_back(r_op(6'h20, 10, 10, 10));          // skipped
    prog.push_back(r_op(6'h20, 10, 10, 10));          // skipped
    prog.push_back(i_op(6'h0c, 13, 14, 15));          // andi r13, r14, 15 (target)
    load_and_run(60, executed);
    compare("walk-through");
    expect_eq("walk-through r1 = r9", int'(exp_rf[15].d), 9 * 17);
    // 14 preamble + sw, addi, lw, addi, sub, beq, ori, andi = 22 instructions
    // from the first to the last write: the taken branch costs no cycle
    // beyond its delay slot, and nothing stalls.
    expect_eq("walk-through: 22 instructions in 22 cycles", int'(last_wb_cycle - first_wb_cycle), 21);
    expect_eq("walk-through: no stall", int'(stall_cycles), 0);
    // the instructions between the delay slot and the target never write r10
    begin
      automatic int n_r10 = 0;
      foreach (got_rf[i]) if (got_rf[i].a == 10) n_r10++;
      expect_eq("walk-through: skipped add leaves r10 alone", n_r10, 1);
    end

    // --- 3. forwarding chain: no stalls, one instruction per cycle
    prog.delete();
    preamble(5);
    prog.push_back(r_op(6'h20, 8, 1, 2));             // add $t0,$t1,$t2
    prog.push_back(r_op(6'h22, 12, 8, 3));            // sub $t4,$t0,$t3
    prog.push_back(r_op(6'h24, 13, 8, 6));            // and $t5,$t0,$t6
    prog.push_back(r_op(6'h25, 15, 8, 9));            // or  $t7,$t0,$t8
    prog.push_back(r_op(6'h26, 14, 8, 10));           // xor $t9,$t0,$t10
    load_and_run(50, executed);
    compare("forwarding");
    expect_eq("forwarding: no stall", int'(stall_cycles), 0);
    expect_eq("forwarding: 19 writes in 19 cycles", int'(last_wb_cycle - first_wb_cycle), 18);

    // --- 4. load-use chain: exactly one stall
    prog.delete();
    preamble(9);
    prog.push_back(i_op(6'h2b, 5, 1, 0));             // sw  r5, 0(r1)
    prog.push_back(i_op(6'h23, 8, 1, 0));             // lw  $t0, 0($t1)
    prog.push_back(r_op(6'h22, 11, 8, 10));           // sub $t3,$t0,$t2
    prog.push_back(r_op(6'h24, 13, 8, 12));           // and $t5,$t0,$t4
    prog.push_back(r_op(6'h25, 15, 8, 14));           // or  $t7,$t0,$t6
    load_and_run(50, executed);
    compare("load-use");
    expect_eq("load-use: one stall cycle", int'(stall_cycles), 1);
    // 14 + sw + lw + 3 = 19 instructions from first to last write, plus one stall
    expect_eq("load-use: 19 instructions in 20 cycles", int'(last_wb_cycle - first_wb_cycle), 19);

    // --- 5. lw then sw of the loaded value: bypass in ME, no stall
    prog.delete();
    preamble(3);
    prog.push_back(i_op(6'h2b, 7, 1, 8));             // sw r7, 8(r1)
    prog.push_back(i_op(6'h23, 1, 1, 8));             // lw r1, 8(r1)
    prog.push_back(i_op(6'h2b, 1, 3, 34));            // sw r1, 34(r3)
    load_and_run(50, executed);
    compare("lw-sw");
    expect_eq("lw-sw: no stall", int'(stall_cycles), 0);

    // --- 6. random programs
    for (int t = 0; t < N_RANDOM; t++) begin
      int len;
      prog.delete();
      for (int i = 1; i < 8; i++) prog.push_back(i_op(6'h08, i, 0, int'($urandom_range(0, 255)) * 4));
      len = 40 + int'($urandom_range(0, 40));
      for (int i = 0; i < len; i++) begin
        int k, rd, rs, rt;
        logic prev_branch;
        prev_branch = prog.size() > 0 && prog[prog.size()-1][31:26] == 6'h04;
        k  = int'($urandom_range(0, 99));
        rd = int'($urandom_range(0, 7)); rs = int'($urandom_range(0, 7)); rt = int'($urandom_range(0, 7));
        if (k < 35) begin
          static logic [5:0] fns [10] = '{6'h20, 6'h21, 6'h22, 6'h23, 6'h24, 6'h25, 6'h26, 6'h27, 6'h2a, 6'h2b};
          prog.push_back(r_op(fns[$urandom_range(0, 9)], rd, rs, rt));
        end else if (k < 50) begin
          static logic [5:0] ops [5] = '{6'h08, 6'h09, 6'h0c, 6'h0d, 6'h0e};
          prog.push_back(i_op(ops[$urandom_range(0, 4)], rt, rs, int'($urandom_range(0, 65535))));
        end else if (k < 68) begin
          prog.push_back(i_op(6'h23, rt, rs, int'($urandom_range(0, 63)) * 4 - 128));
        end else if (k < 82) begin
          prog.push_back(i_op(6'h2b, rt, rs, int'($urandom_range(0, 63)) * 4 - 128));
        end else if (k < 92 && !prev_branch && i < len - 6) begin
          // forward branch, often with equal operands
          if ($urandom_range(0, 2) == 0) rt = rs;
          prog.push_back(i_op(6'h04, rt, rs, int'($urandom_range(1, 4))));
        end else begin
          prog.push_back(NOP);
        end
      end
      load_and_run(3 * prog.size() + 40, executed);
      compare($sformatf("random %0d", t));
    end

    // --- mechanism coverage
    $display("coverage: fwd_ex=%0d fwd_me_alu=%0d fwd_me_load=%0d rf_write_through=%0d",
             n_fwd_ex, n_fwd_me_alu, n_fwd_me_load, n_rf_through);
    $display("coverage: load_use_stall=%0d stall_on_branch=%0d store_bypass=%0d br_taken=%0d br_untaken=%0d",
             n_stall, n_stall_branch, n_store_byp, n_br_taken, n_br_untaken);
    expect_eq("forward from EX happened", int'(n_fwd_ex > 0), 1);
    expect_eq("forward of ALU result from ME happened", int'(n_fwd_me_alu > 0), 1);
    expect_eq("forward of load data from ME happened", int'(n_fwd_me_load > 0), 1);
    expect_eq("register-file write-through happened", int'(n_rf_through > 0), 1);
    expect_eq("load-use stall happened", int'(n_stall > 0), 1);
    expect_eq("stall of a branch on a load happened", int'(n_stall_branch > 0), 1);
    expect_eq("store-data bypass happened", int'(n_store_byp > 0), 1);
    expect_eq("taken branch happened", int'(n_br_taken > 0), 1);
    expect_eq("untaken branch happened", int'(n_br_untaken > 0), 1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
