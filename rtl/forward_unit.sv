// forward_unit: forwarding (bypass) control.
//
// Decode operands.  For each operand register r of the instruction in DE it
// looks at the pending writes held in the later pipeline registers and picks
// the nearest valid one:
//   EX writes r  -> FWD_EX  (the ALU result being computed this cycle)
//   else ME writes r -> FWD_MEM (ALU result in EX/ME.S, or the load data
//                        coming out of data memory)
//   else         -> FWD_RF  (register file; its write-through covers WB)
// r == $0 never forwards, and neither does a stage whose valid bit is low or
// which does not write a register.  The forwarded value is latched into the
// DE/EX operand latches A and B, so the ALU and the branch comparator both see
// it.  A load in EX cannot supply its value yet; hazard_unit stalls for that
// case and this unit's FWD_EX choice is then not used.
//
// Store data.  A store in ME whose data register rt is written by the
// instruction now in WB takes the WB value instead of EX/ME.D
// (store_bypass).  This is the memory-stage bypass that lets "lw r1; sw r1"
// run without a stall.
//
// Purely combinational.
module forward_unit (
  // decode operands
  input  mips_pkg::reg_idx_t de_rs,
  input  mips_pkg::reg_idx_t de_rt,
  // pending write in EX
  input  logic               ex_valid,
  input  logic               ex_reg_wr,
  input  mips_pkg::reg_idx_t ex_rw,
  // pending write in ME
  input  logic               me_valid,
  input  logic               me_reg_wr,
  input  mips_pkg::reg_idx_t me_rw,
  // store in ME
  input  logic               me_mem_wr,
  input  mips_pkg::reg_idx_t me_rt,
  // write in WB
  input  logic               wb_valid,
  input  logic               wb_reg_wr,
  input  mips_pkg::reg_idx_t wb_rw,
  output mips_pkg::fwd_sel_e fwd_a,
  output mips_pkg::fwd_sel_e fwd_b,
  output logic               store_bypass
);
  import mips_pkg::*;

  function automatic fwd_sel_e pick(reg_idx_t r, logic ex_w, reg_idx_t exr,
                                    logic me_w, reg_idx_t mer);
    if (r == 5'd0)                 return FWD_RF;
    else if (ex_w && exr == r)     return FWD_EX;
    else if (me_w && mer == r)     return FWD_MEM;
    else                           return FWD_RF;
  endfunction

  logic ex_w, me_w;
  assign ex_w = ex_valid && ex_reg_wr;
  assign me_w = me_valid && me_reg_wr;

  assign fwd_a = pick(de_rs, ex_w, ex_rw, me_w, me_rw);
  assign fwd_b = pick(de_rt, ex_w, ex_rw, me_w, me_rw);

  assign store_bypass = me_valid && me_mem_wr && wb_valid && wb_reg_wr &&
                        (me_rt != 5'd0) && (wb_rw == me_rt);

endmodule
