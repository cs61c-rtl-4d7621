// Hazard control: the load-use interlock, detected at issue.
//
// Forwarding covers every dependence except one: a load in EX whose result
// the instruction in decode needs. The load data exists only at the end of
// ME, so the dependent instruction must wait one cycle and then take the
// value through the ME forwarding path. This unit detects that case in
// decode and then
//   - stalls the PC and the IF/DE register (their clock enables go low, so
//     the same instruction is fetched and decoded again), and
//   - inserts a bubble into DE/EX (its valid bit is cleared), which is the
//     same as executing a nop.
// Stages from EX onward proceed as usual. A store whose only dependence on
// the load is its data register (rt) is not stalled: the memory-stage
// store bypass in forward_unit supplies the data. A beq reads both
// registers in decode, so it stalls on either. The logic keeps no state.
module hazard_unit
  import mips_pkg::*;
(
  input  logic de_valid,
  input  reg_t de_rs,
  input  reg_t de_rt,
  input  logic de_use_rs,
  input  logic de_use_rt,
  input  logic de_store,       // instruction in decode is sw
  input  logic ex_valid,
  input  logic ex_load,        // instruction in EX is lw
  input  reg_t ex_rw,
  output logic stall,          // hold PC and IF/DE
  output logic bubble          // clear the valid bit entering DE/EX
);

  logic rs_dep, rt_dep;

  assign rs_dep = de_use_rs && (de_rs == ex_rw);
  assign rt_dep = de_use_rt && !de_store && (de_rt == ex_rw);

  assign stall  = de_valid && ex_valid && ex_load && (ex_rw != '0) && (rs_dep || rt_dep);
  assign bubble = stall;

endmodule
