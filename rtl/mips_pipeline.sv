// Five-stage pipelined MIPS subset processor.
//
// Stages: IF (fetch at PC), DE (decode, register read, forwarding, branch
// decision, hazard check), EX (ALU), ME (data memory), WB (register write).
// Each pipeline register carries a valid bit and the instruction's control
// word, which main_control produces once in decode ("data-stationary"
// control). Every write (register file, data memory) is gated by the valid
// bit of the stage doing it, so a cleared valid bit is a bubble.
//
// Branches: beq is compared in decode on forwarded operands and redirects
// the PC one cycle later, so the instruction after a branch always executes
// (one delay slot, part of the instruction set: there is no flush).
// Forwarding: the operand latches A and B in DE/EX are loaded from the
// nearest pending write: the EX ALU output, the ME result (load data or S)
// or the WB value, else the register file.
// Store bypass: a sw in EX whose data register a lw in ME loads takes the
// memory output into D.
// Interlock: a load in EX whose result the decode instruction needs holds
// PC and IF/DE for one cycle and sends a bubble into DE/EX; one cycle later
// the value is forwarded from ME.
//
// Host ports load the instruction memory, read and write the data memory
// and read the registers. The ev_* outputs pulse for one cycle when a
// mechanism acts, for performance counting. Reset is synchronous, active
// low; the PC starts at RESET_PC.
//
// The stage split, the valid bits, decode-time branch resolution with one
// delay slot, the three forwarding paths, the memory-stage store bypass and
// the stall-by-refetch interlock follow the classic five-stage teaching
// pipeline this design is built on. Memory sizes, instruction encodings,
// host ports, event outputs and the reset style are this design's own.
module mips_pipeline
  import mips_pkg::*;
#(
  parameter int    IMEM_WORDS = 256,
  parameter int    DMEM_WORDS = 256,
  parameter word_t RESET_PC   = '0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // instruction memory load port
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_waddr,
  input  word_t                         imem_wdata,
  // data memory host port
  input  logic [$clog2(DMEM_WORDS)-1:0] dmem_h_addr,
  input  logic                          dmem_h_we,
  input  word_t                         dmem_h_wdata,
  output word_t                         dmem_h_rdata,
  // register inspection port
  input  reg_t                          reg_h_addr,
  output word_t                         reg_h_rdata,
  // status and events
  output word_t                         pc,
  output logic                          retire,          // valid instruction in WB
  output logic                          ev_stall,        // load-use interlock
  output logic                          ev_fwd_ex,       // operand taken from EX
  output logic                          ev_fwd_me,       // operand taken from ME
  output logic                          ev_fwd_wb,       // operand taken from WB
  output logic                          ev_store_bypass, // load data into D in EX
  output logic                          ev_branch_taken
);

  // ------------------------------------------------------------------ IF
  word_t pc4, if_ir;
  logic  stall, bubble, taken;

  // ------------------------------------------------------------------ regs
  ifde_t if_d, de_q;
  deex_t de_d, ex_q;
  exme_t ex_d, me_q;
  mewb_t me_d, wb_q;
  logic  de_valid, ex_valid, me_valid, wb_valid;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(pc), .rdata(if_ir),
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  assign if_d = '{ir: if_ir, pc4: pc4};

  pipe_reg #(.T(ifde_t)) u_ifde (
    .clk, .rst_n, .en(!stall), .bubble(1'b0), .valid_in(1'b1),
    .d(if_d), .valid(de_valid), .q(de_q)
  );

  // ------------------------------------------------------------------ DE
  ctrl_t    de_ctrl;
  reg_t     de_rw, de_rs, de_rt;
  word_t    rf_a, rf_b, de_a, de_b;
  word_t    ex_s, me_res, wb_wd, me_m;
  fwd_sel_e sel_a, sel_b;
  logic     store_bypass;

  assign de_rs = de_q.ir[25:21];
  assign de_rt = de_q.ir[20:16];

  main_control u_ctrl (.ir(de_q.ir), .ctrl(de_ctrl), .rw(de_rw));

  regfile u_rf (
    .clk, .rst_n,
    .ra1(de_rs), .rd1(rf_a), .ra2(de_rt), .rd2(rf_b),
    .we(wb_valid && wb_q.ctrl.reg_wr), .wa(wb_q.rw), .wd(wb_wd),
    .ra3(reg_h_addr), .rd3(reg_h_rdata)
  );

  forward_unit u_fwd (
    .de_rs, .de_rt,
    .ex_valid, .ex_rw(ex_q.rw), .me_valid, .me_rw(me_q.rw),
    .wb_valid, .wb_rw(wb_q.rw),
    .sel_a, .sel_b,
    .ex_store(ex_valid && ex_q.ctrl.mem_w), .ex_rt(ex_q.rt),
    .me_load(me_valid && me_q.ctrl.mem_to_reg),
    .store_bypass
  );

  // forwarding muxes in front of the operand latches
  function automatic word_t fwd_mux(fwd_sel_e sel, word_t rf, word_t ex,
                                    word_t me, word_t wb);
    unique case (sel)
      FWD_EX:  return ex;
      FWD_ME:  return me;
      FWD_WB:  return wb;
      default: return rf;
    endcase
  endfunction

  assign de_a = fwd_mux(sel_a, rf_a, ex_s, me_res, wb_wd);
  assign de_b = fwd_mux(sel_b, rf_b, ex_s, me_res, wb_wd);

  hazard_unit u_haz (
    .de_valid, .de_rs, .de_rt,
    .de_use_rs(de_ctrl.use_rs), .de_use_rt(de_ctrl.use_rt),
    .de_store(de_ctrl.mem_w),
    .ex_valid, .ex_load(ex_q.ctrl.mem_to_reg), .ex_rw(ex_q.rw),
    .stall, .bubble
  );

  next_pc #(.RESET_PC(RESET_PC)) u_npc (
    .clk, .rst_n, .stall,
    .branch(de_valid && de_ctrl.branch),
    .op_a(de_a), .op_b(de_b), .de_pc4(de_q.pc4), .de_imm(de_q.ir[15:0]),
    .pc, .pc4, .taken
  );

  assign de_d = '{ctrl: de_ctrl, rw: de_rw, rt: de_rt, a: de_a, b: de_b,
                  imm: de_q.ir[15:0]};

  pipe_reg #(.T(deex_t)) u_deex (
    .clk, .rst_n, .en(1'b1), .bubble, .valid_in(de_valid),
    .d(de_d), .valid(ex_valid), .q(ex_q)
  );

  // ------------------------------------------------------------------ EX
  alu u_alu (
    .a(ex_q.a), .b(ex_q.b), .imm(ex_q.imm),
    .ext_op(ex_q.ctrl.ext_op), .alu_src(ex_q.ctrl.alu_src),
    .alu_op(ex_q.ctrl.alu_op), .s(ex_s)
  );

  assign ex_d = '{ctrl: ex_q.ctrl, rw: ex_q.rw, s: ex_s,
                  d: store_bypass ? me_m : ex_q.b};

  pipe_reg #(.T(exme_t)) u_exme (
    .clk, .rst_n, .en(1'b1), .bubble(1'b0), .valid_in(ex_valid),
    .d(ex_d), .valid(me_valid), .q(me_q)
  );

  // ------------------------------------------------------------------ ME
  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(me_q.s), .rdata(me_m),
    .we(me_valid && me_q.ctrl.mem_w), .wdata(me_q.d),
    .h_addr(dmem_h_addr), .h_rdata(dmem_h_rdata),
    .h_we(dmem_h_we), .h_wdata(dmem_h_wdata)
  );

  assign me_res = me_q.ctrl.mem_to_reg ? me_m : me_q.s;
  assign me_d   = '{ctrl: me_q.ctrl, rw: me_q.rw, s: me_q.s, m: me_m};

  pipe_reg #(.T(mewb_t)) u_mewb (
    .clk, .rst_n, .en(1'b1), .bubble(1'b0), .valid_in(me_valid),
    .d(me_d), .valid(wb_valid), .q(wb_q)
  );

  // ------------------------------------------------------------------ WB
  assign wb_wd = wb_q.ctrl.mem_to_reg ? wb_q.m : wb_q.s;

  // ------------------------------------------------------------------ events
  logic use_a, use_b;
  assign use_a = de_valid && !stall && de_ctrl.use_rs;
  assign use_b = de_valid && !stall && de_ctrl.use_rt;

  assign retire          = wb_valid;
  assign ev_stall        = stall;
  assign ev_fwd_ex       = (use_a && sel_a == FWD_EX) || (use_b && sel_b == FWD_EX);
  assign ev_fwd_me       = (use_a && sel_a == FWD_ME) || (use_b && sel_b == FWD_ME);
  assign ev_fwd_wb       = (use_a && sel_a == FWD_WB) || (use_b && sel_b == FWD_WB);
  assign ev_store_bypass = store_bypass;
  assign ev_branch_taken = taken;

  // ------------------------------------------------------------------ rules
  // An interlock only ever waits on a load in EX, and it always leaves a
  // bubble in EX behind it while the held instruction stays in decode.
  a_stall_on_load: assert property (@(posedge clk) disable iff (!rst_n)
    stall |-> ex_valid && ex_q.ctrl.mem_to_reg);
  a_bubble_follows: assert property (@(posedge clk) disable iff (!rst_n)
    stall |=> !ex_valid && de_valid);
  // The store bypass only ever replaces a store's data with load data.
  a_bypass_store_load: assert property (@(posedge clk) disable iff (!rst_n)
    store_bypass |-> ex_q.ctrl.mem_w && me_q.ctrl.mem_to_reg);

endmodule
