// Forwarding control: the select lines of the forwarding muxes.
//
// Decode-stage forwarding. For each operand register (rs, rt) of the
// instruction in decode it finds the nearest instruction further down the
// pipe that is valid and will write that register, and selects its value:
// the ALU output of the instruction in EX, the memory-stage result of the
// instruction in ME (load data for a load, S otherwise), or the value being
// written back in WB. With no pending write the register file value is
// used. The chosen value is latched into the operand latch A or B (and used
// by the branch comparator), bypassing the rest of the pipe. Register r0 is
// never forwarded; the destination numbers it receives are already 0 for
// instructions that write nothing.
//
// Memory-stage store bypass. A store in EX whose data register is the
// destination of a load in ME takes the load data straight from the data
// memory output into its D register, so a load followed by a store of the
// loaded value needs no stall.
//
// A load in EX cannot be forwarded from (its value does not exist yet);
// hazard_unit stalls that case, and the EX select made here is then
// discarded with the bubble. Purely combinational.
module forward_unit
  import mips_pkg::*;
(
  // decode operands
  input  reg_t     de_rs,
  input  reg_t     de_rt,
  // pending writes (rw is 0 when the instruction writes no register)
  input  logic     ex_valid,
  input  reg_t     ex_rw,
  input  logic     me_valid,
  input  reg_t     me_rw,
  input  logic     wb_valid,
  input  reg_t     wb_rw,
  output fwd_sel_e sel_a,
  output fwd_sel_e sel_b,
  // store-data bypass in the memory stage
  input  logic     ex_store,     // valid sw in EX
  input  reg_t     ex_rt,        // its data register
  input  logic     me_load,      // valid lw in ME
  output logic     store_bypass
);

  function automatic fwd_sel_e pick(reg_t r, logic exv, reg_t exr,
                                    logic mev, reg_t mer, logic wbv, reg_t wbr);
    if (r == '0)                return FWD_RF;
    else if (exv && exr == r)   return FWD_EX;
    else if (mev && mer == r)   return FWD_ME;
    else if (wbv && wbr == r)   return FWD_WB;
    else                        return FWD_RF;
  endfunction

  assign sel_a = pick(de_rs, ex_valid, ex_rw, me_valid, me_rw, wb_valid, wb_rw);
  assign sel_b = pick(de_rt, ex_valid, ex_rw, me_valid, me_rw, wb_valid, wb_rw);

  assign store_bypass = ex_store && me_load && (ex_rt != '0) && (me_rw == ex_rt);

endmodule
