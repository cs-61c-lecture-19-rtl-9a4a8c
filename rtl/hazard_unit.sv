// hazard_unit: load-use interlock ("stall logic"), detected in decode.
//
// The only hazard forwarding cannot resolve is an instruction in DE that
// needs, as an ALU or branch-compare operand, the register a load in EX is
// about to fetch from memory: the value exists only at the end of ME.  Then
//   stall = 1 -> PC and IF/DE hold (the same instruction is fetched and
//               decoded again) and a bubble (valid = 0) is issued to EX.
// One cycle later the load is in ME and its data is forwarded from the
// memory output, so the stall lasts exactly one cycle.  A store whose *data*
// register is the load's destination does not stall: the store-data bypass
// in ME covers it.  Loads into $0 never stall.  The logic holds no state.
module hazard_unit (
  input  logic               de_valid,
  input  logic               de_rs_used,
  input  logic               de_rt_used,
  input  mips_pkg::reg_idx_t de_rs,
  input  mips_pkg::reg_idx_t de_rt,
  input  logic               ex_valid,
  input  logic               ex_mem_to_reg,   // instruction in EX is a load
  input  mips_pkg::reg_idx_t ex_rw,
  output logic               stall
);

  logic load_in_ex;
  assign load_in_ex = ex_valid && ex_mem_to_reg && (ex_rw != 5'd0);

  assign stall = de_valid && load_in_ex &&
                 ((de_rs_used && de_rs == ex_rw) ||
                  (de_rt_used && de_rt == ex_rw));

endmodule
