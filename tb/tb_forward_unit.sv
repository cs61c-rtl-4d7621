// Self-checking test of forward_unit: random register numbers drawn from a
// small set (so matches are frequent) and random valid bits, against a
// reference that scans the later stages youngest first for a valid write
// to the operand register, never for r0. The store-bypass output is
// checked against its definition.
module tb_forward_unit;
  import mips_pkg::*;

  logic clk = 0;
  reg_t de_rs, de_rt, ex_rw, me_rw, wb_rw, ex_rt;
  logic ex_valid, me_valid, wb_valid, ex_store, me_load, store_bypass;
  fwd_sel_e sel_a, sel_b;
  int checks = 0, failures = 0;
  int seen [4];

  forward_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fwd_sel_e ref_sel(reg_t r);
    reg_t  rws [3];
    logic  v   [3];
    rws = '{ex_rw, me_rw, wb_rw};
    v   = '{ex_valid, me_valid, wb_valid};
    if (r == 0) return FWD_RF;
    for (int k = 0; k < 3; k++)
      if (v[k] && rws[k] == r) return fwd_sel_e'(k + 1);
    return FWD_RF;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      de_rs = reg_t'($urandom_range(0, 3)); de_rt = reg_t'($urandom_range(0, 3));
      ex_rw = reg_t'($urandom_range(0, 3)); me_rw = reg_t'($urandom_range(0, 3));
      wb_rw = reg_t'($urandom_range(0, 3)); ex_rt = reg_t'($urandom_range(0, 3));
      ex_valid = 1'($urandom); me_valid = 1'($urandom); wb_valid = 1'($urandom);
      ex_store = 1'($urandom); me_load = 1'($urandom);
      #1;
      checks++;
      if (sel_a !== ref_sel(de_rs)) begin failures++; $display("FAIL sel_a"); end
      checks++;
      if (sel_b !== ref_sel(de_rt)) begin failures++; $display("FAIL sel_b"); end
      seen[ref_sel(de_rs)]++;
      checks++;
      if (store_bypass !== (ex_store && me_load && ex_rt != 0 && me_rw == ex_rt)) begin
        failures++; $display("FAIL store_bypass");
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL select %0d never exercised", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
