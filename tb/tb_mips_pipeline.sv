// End-to-end test of the pipelined processor at its default sizes.
//
// Each program is loaded into instruction memory, data memory gets random
// contents, and the processor runs from reset. The same program is run by
// an instruction-level reference model in this testbench, which executes
// one instruction at a time with the delayed-branch rule (the instruction
// after a beq always executes). When the model reaches the final
// self-loop, the processor is run long enough to drain, and all 32
// registers and every data-memory word are compared.
//
// Timing is checked too: with no interlock the pipeline retires one
// instruction per cycle, and each load-use interlock costs exactly one
// cycle, so (cycle of k-th retirement) - k - (interlocks the model
// predicts before instruction k) must stay constant. The model's count of
// interlocks must also equal the processor's stall count.
//
// Programs: the lecture-style examples (the delayed-branch walk-through,
// the forwarding chain add/sub/and/or/xor, the load-use chain, and a load
// followed by a store of the loaded value) and then random programs over
// registers r0..r7 with loads, stores and forward branches. Every
// mechanism (stall, forwarding from EX, ME and WB, store bypass, taken
// branch) must have happened at least once over the run.
module tb_mips_pipeline;
  import mips_pkg::*;

  localparam int IW = 256;
  localparam int DW = 256;
  localparam int N_RANDOM = 40;

  logic clk = 0, rst_n = 0;
  logic imem_we = 0;
  logic [$clog2(IW)-1:0] imem_waddr = '0;
  word_t imem_wdata = '0;
  logic [$clog2(DW)-1:0] dmem_h_addr = '0;
  logic dmem_h_we = 0;
  word_t dmem_h_wdata = '0, dmem_h_rdata;
  reg_t reg_h_addr = '0;
  word_t reg_h_rdata, pc;
  logic retire, ev_stall, ev_fwd_ex, ev_fwd_me, ev_fwd_wb, ev_store_bypass, ev_branch_taken;

  mips_pipeline dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_stall = 0, n_fwd_ex = 0, n_fwd_me = 0, n_fwd_wb = 0, n_sbyp = 0, n_taken = 0;
  int n_retire = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      n_stall  += int'(ev_stall);
      n_fwd_ex += int'(ev_fwd_ex);
      n_fwd_me += int'(ev_fwd_me);
      n_fwd_wb += int'(ev_fwd_wb);
      n_sbyp   += int'(ev_store_bypass);
      n_taken  += int'(ev_branch_taken);
    end
  end

  // ------------------------------------------------------------ reference
  word_t prog [IW];
  word_t mref [DW];
  word_t rref [32];
  int    stall_before [$];   // interlocks predicted before each dynamic instruction
  int    ref_len;

  function automatic word_t sx(logic [15:0] i);
    return {{16{i[15]}}, i};
  endfunction

  function automatic logic reads_reg(word_t ins, reg_t r);
    logic [5:0] op = ins[31:26];
    reg_t rs = ins[25:21], rt = ins[20:16];
    if (r == 0) return 1'b0;
    case (op)
      OP_RTYPE: return (ins[5:0] inside {FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR}) &&
                       (rs == r || rt == r);
      OP_ADDI, OP_ORI, OP_LW, OP_SW: return rs == r;
      OP_BEQ: return rs == r || rt == r;
      default: return 1'b0;
    endcase
  endfunction

  // Runs the program until it reaches the self-loop at halt_pc.
  task automatic run_ref(word_t halt_pc);
    word_t cur = 0, nxt = 4, nn;
    word_t prev = 0;
    int stalls = 0;
    stall_before.delete();
    for (int i = 0; i < 32; i++) rref[i] = 0;
    ref_len = 0;
    while (cur != halt_pc && ref_len < 5000) begin
      word_t ins = prog[cur[9:2]];
      logic [5:0] op = ins[31:26];
      reg_t rs = ins[25:21], rt = ins[20:16], rd = ins[15:11];
      word_t a = rref[rs], b = rref[rt];
      word_t res = 0;
      reg_t  dst = 0;
      if (prev[31:26] == OP_LW && reads_reg(ins, prev[20:16]) &&
          !(op == OP_SW && prev[20:16] != rs))
        stalls++;
      stall_before.push_back(stalls);
      nn = nxt + 4;
      case (op)
        OP_RTYPE: begin
          dst = rd;
          case (ins[5:0])
            FN_ADD: res = a + b;
            FN_SUB: res = a - b;
            FN_AND: res = a & b;
            FN_OR:  res = a | b;
            FN_XOR: res = a ^ b;
            default: dst = 0;
          endcase
        end
        OP_ADDI: begin dst = rt; res = a + sx(ins[15:0]); end
        OP_ORI:  begin dst = rt; res = a | {16'h0, ins[15:0]}; end
        OP_LW:   begin dst = rt; res = mref[8'((a + sx(ins[15:0])) >> 2)]; end
        OP_SW:   mref[8'((a + sx(ins[15:0])) >> 2)] = b;
        OP_BEQ:  if (a == b) nn = cur + 4 + (sx(ins[15:0]) << 2);
        default: ;
      endcase
      if (dst != 0) rref[dst] = res;
      prev = ins;
      cur = nxt;
      nxt = nn;
      ref_len++;
    end
    if (ref_len >= 5000) begin
      failures++;
      $display("FAIL reference model did not reach the halt loop");
    end
  endtask

  // ------------------------------------------------------------ driver
  task automatic run_program(string name, int len);
    word_t halt_pc = word_t'(len * 4);
    int    k = 0;
    longint first = -1;
    int    stall0;
    word_t dinit [DW];
    int    fails0 = failures;
    // self-loop with its delay slot
    prog[len]     = enc_i(OP_BEQ, 5'd0, 5'd0, 16'hFFFF);
    prog[len + 1] = 32'h0;
    for (int i = len + 2; i < IW; i++) prog[i] = 32'h0;
    for (int i = 0; i < DW; i++) begin
      dinit[i] = (i < 16) ? word_t'(i * 4) : $urandom;  // low words hold small addresses
      mref[i] = dinit[i];
    end
    run_ref(halt_pc);

    rst_n = 0;
    @(negedge clk);
    for (int i = 0; i < IW; i++) begin
      imem_we = 1; imem_waddr = 8'(i); imem_wdata = prog[i];
      dmem_h_we = 1; dmem_h_addr = 8'(i % DW); dmem_h_wdata = dinit[i % DW];
      @(negedge clk);
    end
    imem_we = 0; dmem_h_we = 0;
    @(negedge clk);
    stall0 = n_stall;
    rst_n = 1;
    // run: watch retirements until the model's instruction count is reached
    while (k < ref_len) begin
      @(posedge clk);
      #1;
      if (retire) begin
        // retire of instruction k (0-based) seen in this cycle
        if (first < 0) first = cycles;
        checks++;
        if (cycles - first - k != longint'(stall_before[k])) begin
          failures++;
          $display("FAIL %s: instruction %0d retired at cycle %0d, expected %0d",
                   name, k, cycles - first, k + stall_before[k]);
        end
        k++;
      end
      if (cycles > 100000) break;
    end
    repeat (10) @(posedge clk);
    @(negedge clk);
    checks++;
    if (n_stall - stall0 != (ref_len > 0 ? stall_before[ref_len - 1] : 0)) begin
      failures++;
      $display("FAIL %s: %0d interlock cycles, model predicts %0d", name,
               n_stall - stall0, stall_before[ref_len - 1]);
    end
    for (int r = 0; r < 32; r++) begin
      reg_h_addr = reg_t'(r);
      #1;
      checks++;
      if (reg_h_rdata !== rref[r]) begin
        failures++;
        $display("FAIL %s: r%0d = %h, expected %h", name, r, reg_h_rdata, rref[r]);
      end
    end
    for (int i = 0; i < DW; i++) begin
      dmem_h_addr = 8'(i);
      #1;
      checks++;
      if (dmem_h_rdata !== mref[i]) begin
        failures++;
        $display("FAIL %s: mem[%0d] = %h, expected %h", name, i, dmem_h_rdata, mref[i]);
      end
    end
    n_retire += ref_len;
    if (failures == fails0)
      $display("%s: %0d instructions, %0d interlock cycles, ok", name, ref_len,
               stall_before[ref_len - 1]);
  endtask

  // ------------------------------------------------------------ programs
  function automatic word_t rnd_ins(int idx, int len, logic prev_branch);
    reg_t a = reg_t'($urandom_range(0, 7));
    reg_t b = reg_t'($urandom_range(0, 7));
    reg_t c = reg_t'($urandom_range(0, 7));
    int kind = $urandom_range(0, 99);
    logic [5:0] fns [5] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR};
    if (kind < 35)      return enc_r(fns[$urandom_range(0, 4)], a, b, c);
    else if (kind < 45) return enc_i(OP_ADDI, a, b, 16'($signed($urandom_range(0, 200)) - 100));
    else if (kind < 52) return enc_i(OP_ORI, a, b, 16'($urandom));
    else if (kind < 67) return enc_i(OP_LW, a, ($urandom_range(0, 1) ? 5'd0 : b),
                                     16'($urandom_range(0, 15) * 4));
    else if (kind < 80) return enc_i(OP_SW, a, ($urandom_range(0, 1) ? 5'd0 : b),
                                     16'($urandom_range(0, 15) * 4));
    else if (kind < 92 && !prev_branch && idx + 2 <= len) begin
      int room = len - idx - 1;
      int off  = $urandom_range(1, (room < 4) ? room : 4);
      return enc_i(OP_BEQ, b, a, 16'(off));
    end
    else return enc_i(OP_ADDI, a, 5'd0, 16'($urandom_range(0, 60)));
  endfunction

  initial begin
    int len;
    @(negedge clk); @(negedge clk);

    // Delayed-branch walk-through (addresses 0x10.. after a prologue that
    // sets the registers; the branch target holds the 'and').
    for (int i = 0; i < IW; i++) prog[i] = 32'h0;
    for (int r = 1; r < 16; r++) prog[r - 1] = enc_i(OP_ADDI, reg_t'(r), 5'd0, 16'(r * 4));
    prog[15] = enc_i(OP_ADDI, 5'd7, 5'd0, 16'd24);      // make r6 == r7 so the beq is taken
    prog[16] = enc_i(OP_LW,   5'd1, 5'd2, 16'd36);
    prog[17] = enc_i(OP_ADDI, 5'd2, 5'd2, 16'd3);
    prog[18] = enc_r(FN_SUB,  5'd3, 5'd4, 5'd5);
    prog[19] = enc_i(OP_BEQ,  5'd7, 5'd6, 16'd10);     // to word 30
    prog[20] = enc_i(OP_ORI,  5'd8, 5'd9, 16'd17);     // delay slot: always runs
    prog[21] = enc_r(FN_ADD,  5'd10, 5'd11, 5'd12);    // skipped
    prog[30] = enc_r(FN_AND,  5'd13, 5'd14, 5'd15);
    run_program("branch walk-through", 31);

    // Forwarding chain: add $t0 then four readers of $t0 (t-registers 8..)
    for (int i = 0; i < IW; i++) prog[i] = 32'h0;
    for (int r = 8; r < 19; r++) prog[r - 8] = enc_i(OP_ADDI, reg_t'(r), 5'd0, 16'(r * 3 + 1));
    prog[11] = enc_r(FN_ADD, 5'd8, 5'd9, 5'd10);
    prog[12] = enc_r(FN_SUB, 5'd12, 5'd8, 5'd11);
    prog[13] = enc_r(FN_AND, 5'd13, 5'd8, 5'd14);
    prog[14] = enc_r(FN_OR,  5'd15, 5'd8, 5'd16);
    prog[15] = enc_r(FN_XOR, 5'd17, 5'd8, 5'd18);
    run_program("forwarding chain", 16);

    // Load-use chain: lw $t0,0($t1); sub; and; or -> one interlock cycle
    for (int i = 0; i < IW; i++) prog[i] = 32'h0;
    prog[0] = enc_i(OP_ADDI, 5'd9, 5'd0, 16'd8);
    prog[1] = enc_i(OP_ADDI, 5'd10, 5'd0, 16'd5);
    prog[2] = enc_i(OP_ADDI, 5'd12, 5'd0, 16'd6);
    prog[3] = enc_i(OP_ADDI, 5'd14, 5'd0, 16'd7);
    prog[4] = enc_i(OP_LW,   5'd8, 5'd9, 16'd0);
    prog[5] = enc_r(FN_SUB,  5'd11, 5'd8, 5'd10);
    prog[6] = enc_r(FN_AND,  5'd13, 5'd8, 5'd12);
    prog[7] = enc_r(FN_OR,   5'd15, 5'd8, 5'd14);
    run_program("load-use chain", 8);

    // Load then store of the loaded value: memory-stage bypass, no stall.
    // Also a load feeding a branch in decode (interlock then ME forward).
    for (int i = 0; i < IW; i++) prog[i] = 32'h0;
    prog[0] = enc_i(OP_ADDI, 5'd2, 5'd0, 16'd12);
    prog[1] = enc_i(OP_ADDI, 5'd3, 5'd0, 16'd64);
    prog[2] = enc_i(OP_LW,   5'd1, 5'd2, 16'd0);
    prog[3] = enc_i(OP_SW,   5'd1, 5'd3, 16'd34);
    prog[4] = enc_i(OP_LW,   5'd4, 5'd0, 16'd12);
    prog[5] = enc_i(OP_BEQ,  5'd4, 5'd1, 16'd2);
    prog[6] = enc_i(OP_ADDI, 5'd5, 5'd0, 16'd1);
    prog[7] = enc_i(OP_ADDI, 5'd6, 5'd0, 16'd1);
    prog[8] = enc_i(OP_ADDI, 5'd7, 5'd0, 16'd1);
    run_program("load/store bypass", 9);

    for (int p = 0; p < N_RANDOM; p++) begin
      logic pb = 0;
      for (int i = 0; i < IW; i++) prog[i] = 32'h0;
      len = $urandom_range(20, 120);
      for (int i = 0; i < len; i++) begin
        // after a load, often store the loaded register (store-data bypass)
        if (i > 0 && prog[i-1][31:26] == OP_LW && $urandom_range(0, 1) == 1)
          prog[i] = enc_i(OP_SW, prog[i-1][20:16], 5'd0, 16'($urandom_range(0, 15) * 4));
        else
          prog[i] = rnd_ins(i, len, pb);
        pb = (prog[i][31:26] == OP_BEQ);
      end
      run_program($sformatf("random %0d", p), len);
    end

    $display("events: stall=%0d fwd_ex=%0d fwd_me=%0d fwd_wb=%0d store_bypass=%0d branch_taken=%0d retired=%0d",
             n_stall, n_fwd_ex, n_fwd_me, n_fwd_wb, n_sbyp, n_taken, n_retire);
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL interlock never happened"); end
    checks++; if (n_fwd_ex == 0) begin failures++; $display("FAIL EX forwarding never happened"); end
    checks++; if (n_fwd_me == 0) begin failures++; $display("FAIL ME forwarding never happened"); end
    checks++; if (n_fwd_wb == 0) begin failures++; $display("FAIL WB forwarding never happened"); end
    checks++; if (n_sbyp == 0)   begin failures++; $display("FAIL store bypass never happened"); end
    checks++; if (n_taken == 0)  begin failures++; $display("FAIL no branch taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
