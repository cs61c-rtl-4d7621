// Shared types and constants of the five-stage pipelined MIPS subset.
//
// The instruction set is the subset the pipeline runs: R-type add, sub,
// and, or, xor; addi, ori, lw, sw and beq. Opcode and funct values are the
// standard MIPS-I encodings. Control travels down the pipe with each
// instruction ("data-stationary" control): the decode stage produces one
// ctrl_t per instruction, and every later stage reads the fields it needs
// from its own pipeline register.
package mips_pkg;

  localparam int XLEN = 32;
  localparam int NREG = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_t;

  // Opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_ORI   = 6'h0D;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // R-type funct codes (instruction bits 5:0)
  localparam logic [5:0] FN_ADD = 6'h20;
  localparam logic [5:0] FN_SUB = 6'h22;
  localparam logic [5:0] FN_AND = 6'h24;
  localparam logic [5:0] FN_OR  = 6'h25;
  localparam logic [5:0] FN_XOR = 6'h26;

  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_AND = 3'd2,
    ALU_OR  = 3'd3,
    ALU_XOR = 3'd4
  } alu_op_e;

  // Forwarding-mux select for one decode operand, nearest stage first.
  typedef enum logic [1:0] {
    FWD_RF  = 2'd0,   // value read from the register file
    FWD_EX  = 2'd1,   // ALU result of the instruction in EX
    FWD_ME  = 2'd2,   // result of the instruction in ME (load data or S)
    FWD_WB  = 2'd3    // value being written back in WB
  } fwd_sel_e;

  // Control word produced by main_control in decode.
  typedef struct packed {
    logic    ext_op;    // 1: sign-extend imm16, 0: zero-extend
    logic    alu_src;   // 1: ALU B input is the immediate
    alu_op_e alu_op;
    logic    reg_dst;   // 1: destination is rd, 0: rt
    logic    mem_w;     // store
    logic    branch;    // beq
    logic    mem_to_reg;// load: write-back value comes from memory
    logic    reg_wr;    // instruction writes a register
    logic    use_rs;    // instruction reads rs
    logic    use_rt;    // instruction reads rt (in decode or as store data)
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{ext_op: 1'b0, alu_src: 1'b0, alu_op: ALU_ADD,
                                 reg_dst: 1'b0, mem_w: 1'b0, branch: 1'b0,
                                 mem_to_reg: 1'b0, reg_wr: 1'b0,
                                 use_rs: 1'b0, use_rt: 1'b0};

  // IF/DE register: the fetched instruction and the address after it.
  typedef struct packed {
    word_t ir;
    word_t pc4;
  } ifde_t;

  // DE/EX register: control, destination, the two operand latches A and B,
  // the raw immediate and the rt number (for the store-data bypass).
  typedef struct packed {
    ctrl_t        ctrl;
    reg_t         rw;
    reg_t         rt;
    word_t        a;
    word_t        b;
    logic [15:0]  imm;
  } deex_t;

  // EX/ME register: S (ALU result) and D (store data).
  typedef struct packed {
    ctrl_t ctrl;
    reg_t  rw;
    word_t s;
    word_t d;
  } exme_t;

  // ME/WB register: S passed through and M (load result).
  typedef struct packed {
    ctrl_t ctrl;
    reg_t  rw;
    word_t s;
    word_t m;
  } mewb_t;

  // Instruction builders, used by testbenches and handy for test programs.
  function automatic word_t enc_r(logic [5:0] fn, reg_t rd, reg_t rs, reg_t rt);
    return {OP_RTYPE, rs, rt, rd, 5'd0, fn};
  endfunction

  function automatic word_t enc_i(logic [5:0] op, reg_t rt, reg_t rs, logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

endpackage
