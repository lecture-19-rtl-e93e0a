// tb_next_pc: self-checking testbench for next_pc.
// Drives random stall / branch-taken patterns and checks the PC against a
// reference PC kept in the testbench: hold on stall, target on taken branch,
// PC+4 otherwise; checks pc_plus4 and the reset value.
module tb_next_pc;
  import mips_pkg::*;
  logic clk = 0, rst_n = 0, stall = 0, br_taken = 0;
  word_t br_target = '0, pc, pc_plus4, ref_pc;
  int checks = 0, failures = 0;

  next_pc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (pc !== 32'd0) failures++;
    rst_n = 1; ref_pc = 0;
    for (int i = 0; i < 500; i++) begin
      stall     = ($urandom_range(3) == 0);
      br_taken  = ($urandom_range(3) == 0);
      br_target = {$urandom} & ~32'h3;
      #1;
      checks++; if (pc_plus4 !== ref_pc + 4) failures++;
      @(posedge clk);
      if (!stall) ref_pc = br_taken ? br_target : ref_pc + 4;
      #1;
      checks++;
      if (pc !== ref_pc) begin
        failures++;
        $display("pc %h expected %h", pc, ref_pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
