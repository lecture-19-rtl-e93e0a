// tb_forward_unit: self-checking testbench for forward_unit.
// Random pipeline occupancy (valid bits, register write flags, destination
// registers drawn from a small set so matches are frequent). The expected
// operand is found by walking the pending writes from newest to oldest, the
// way the rule is stated: the nearest valid writer of the register supplies
// the value, a load in execute supplies none (the interlock covers that case),
// register 0 is never forwarded. Also checks the memory-stage store bypass.
module tb_forward_unit;
  import mips_pkg::*;
  reg_idx_t rs, rt, ex_rw, me_rw, me_rt, wb_rw;
  word_t rf_rs, rf_rt, ex_result, me_result, me_d, wb_result;
  logic ex_valid, ex_reg_wr, ex_mem_to_reg, me_valid, me_reg_wr, me_mem_wr;
  logic wb_valid, wb_reg_wr;
  word_t a_val, b_val, store_data;
  logic [1:0] a_sel, b_sel;
  logic store_bypass;
  int checks = 0, failures = 0;
  int n_ex = 0, n_me = 0, n_byp = 0;

  forward_unit dut (.*);

  function automatic word_t expect_op(reg_idx_t r, word_t rf);
    if (r == 0) return rf;
    // newest pending write first
    if (ex_valid && ex_reg_wr && ex_rw == r) return ex_mem_to_reg ? rf : ex_result;
    if (me_valid && me_reg_wr && me_rw == r) return me_result;
    return rf;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      rs = $urandom_range(3); rt = $urandom_range(3);
      ex_rw = $urandom_range(3); me_rw = $urandom_range(3);
      me_rt = $urandom_range(3); wb_rw = $urandom_range(3);
      rf_rs = $urandom; rf_rt = $urandom; ex_result = $urandom;
      me_result = $urandom; me_d = $urandom; wb_result = $urandom;
      {ex_valid, ex_reg_wr, ex_mem_to_reg, me_valid, me_reg_wr, me_mem_wr,
       wb_valid, wb_reg_wr} = 8'($urandom);
      #1;
      checks++;
      if (a_val !== expect_op(rs, rf_rs)) begin failures++; $display("A mismatch n=%0d", n); end
      checks++;
      if (b_val !== expect_op(rt, rf_rt)) begin failures++; $display("B mismatch n=%0d", n); end
      checks++;
      if (store_data !== ((me_valid && me_mem_wr && wb_valid && wb_reg_wr &&
                           wb_rw != 0 && wb_rw == me_rt) ? wb_result : me_d)) begin
        failures++; $display("store data mismatch n=%0d", n);
      end
      if (a_sel == 1) n_ex++;
      if (a_sel == 2) n_me++;
      if (store_bypass) n_byp++;
    end
    checks++; if (n_ex == 0 || n_me == 0 || n_byp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
