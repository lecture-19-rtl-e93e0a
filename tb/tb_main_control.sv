// tb_main_control: self-checking testbench for main_control.
// For every supported instruction (with random register/immediate fields)
// compares the eight control signals with a hand-written truth table, and
// checks that unknown opcodes, unknown function codes and nop are inactive.
module tb_main_control;
  import mips_pkg::*;
  word_t instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_control dut (.*);

  // {ext_op, alu_src, alu_op, reg_dst, mem_wr, branch, mem_to_reg, reg_wr}
  task automatic check(input logic [5:0] op, input logic [5:0] fn,
                       input logic [9:0] exp, input string name);
    for (int k = 0; k < 8; k++) begin
      instr = {op, 20'($urandom), fn};
      #1;
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("%s: got %b expected %b", name, ctrl, exp);
      end
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //                          ext src op  dst mw br m2r rw
    check(6'h00, 6'h20, 10'b0_0_000_1_0_0_0_1, "add");
    check(6'h00, 6'h21, 10'b0_0_000_1_0_0_0_1, "addu");
    check(6'h00, 6'h22, 10'b0_0_001_1_0_0_0_1, "sub");
    check(6'h00, 6'h23, 10'b0_0_001_1_0_0_0_1, "subu");
    check(6'h00, 6'h24, 10'b0_0_010_1_0_0_0_1, "and");
    check(6'h00, 6'h25, 10'b0_0_011_1_0_0_0_1, "or");
    check(6'h00, 6'h26, 10'b0_0_100_1_0_0_0_1, "xor");
    check(6'h00, 6'h2a, 10'b0_0_101_1_0_0_0_1, "slt");
    check(6'h00, 6'h00, 10'b0_0_000_0_0_0_0_0, "sll/nop");
    check(6'h08, 6'($urandom), 10'b1_1_000_0_0_0_0_1, "addi");
    check(6'h09, 6'($urandom), 10'b1_1_000_0_0_0_0_1, "addiu");
    check(6'h0c, 6'($urandom), 10'b0_1_010_0_0_0_0_1, "andi");
    check(6'h0d, 6'($urandom), 10'b0_1_011_0_0_0_0_1, "ori");
    check(6'h23, 6'($urandom), 10'b1_1_000_0_0_0_1_1, "lw");
    check(6'h2b, 6'($urandom), 10'b1_1_000_0_1_0_0_0, "sw");
    check(6'h04, 6'($urandom), 10'b1_0_000_0_0_1_0_0, "beq");
    check(6'h02, 6'($urandom), 10'b0, "j (unsupported)");
    check(6'h3f, 6'($urandom), 10'b0, "unknown");
    instr = '0; #1; checks++; if (ctrl !== 10'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
