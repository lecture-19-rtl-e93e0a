// tb_regfile: self-checking testbench for regfile.
// Random reads and writes against a reference register array. Checks: $0
// reads zero and ignores writes, reset clears registers, and a write is
// visible to a read of the same register in the same cycle (write-through).
module tb_regfile;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  reg_idx_t ra1 = '0, ra2 = '0, wa = '0, dbg_ra = '0;
  word_t rd1, rd2, wd = '0, dbg_rd;
  word_t ref_r [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  function automatic word_t expect_rd(reg_idx_t ra);
    if (ra == 0) return '0;
    if (we && wa == ra) return wd;
    return ref_r[ra];
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) ref_r[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      dbg_ra = i[4:0]; #1; checks++; if (dbg_rd !== '0) failures++;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = $urandom_range(31); wd = $urandom;
      ra1 = $urandom_range(31);
      ra2 = ($urandom_range(3) == 0) ? wa : 5'($urandom_range(31));
      dbg_ra = $urandom_range(31);
      #1;
      checks++; if (rd1 !== expect_rd(ra1)) begin failures++; $display("rd1 r%0d %h", ra1, rd1); end
      checks++; if (rd2 !== expect_rd(ra2)) begin failures++; $display("rd2 r%0d %h", ra2, rd2); end
      checks++; if (dbg_rd !== ref_r[dbg_ra]) failures++;
      @(posedge clk);
      if (we && wa != 0) ref_r[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
