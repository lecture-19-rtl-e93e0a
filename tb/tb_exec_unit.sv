// tb_exec_unit: self-checking testbench for exec_unit.
// Random operands, immediates and control settings; the expected result is
// computed in the testbench with 64-bit arithmetic and explicit bit
// manipulation for the extension, independent of the unit's code.
module tb_exec_unit;
  import mips_pkg::*;
  ctrl_t ctrl;
  word_t a, b, s;
  logic [15:0] imm16;
  reg_idx_t rt, rd, rw;
  int checks = 0, failures = 0;

  exec_unit dut (.*);

  function automatic word_t model(ctrl_t c, word_t x, word_t y, logic [15:0] im);
    longint unsigned ext, opb, r;
    longint sx, sy;
    ext = c.ext_op && im[15] ? (64'hFFFF_0000 | im) : im;
    opb = c.alu_src ? ext : y;
    case (c.alu_op)
      ALU_ADD: r = (x + opb) % (64'd1 << 32);
      ALU_SUB: r = (x + (64'd1 << 32) - opb) % (64'd1 << 32);
      ALU_AND: r = x & opb;
      ALU_OR:  r = x | opb;
      ALU_XOR: r = x ^ opb;
      ALU_SLT: begin
        sx = x[31] ? longint'(x) - (64'sd1 <<< 32) : longint'(x);
        sy = opb[31] ? longint'(opb) - (64'sd1 <<< 32) : longint'(opb);
        r = (sx < sy) ? 1 : 0;
      end
      default: r = 0;
    endcase
    return r[31:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      ctrl = CTRL_NOP;
      ctrl.ext_op  = $urandom_range(1);
      ctrl.alu_src = $urandom_range(1);
      ctrl.alu_op  = alu_op_e'($urandom_range(5));
      ctrl.reg_dst = $urandom_range(1);
      a = (n % 7 == 0) ? 32'h8000_0000 : $urandom;
      b = (n % 5 == 0) ? a : $urandom;
      imm16 = $urandom; rt = $urandom; rd = $urandom;
      #1;
      checks++;
      if (s !== model(ctrl, a, b, imm16)) begin
        failures++;
        $display("op %0d a %h b %h imm %h src %b ext %b: s %h exp %h",
                 ctrl.alu_op, a, b, imm16, ctrl.alu_src, ctrl.ext_op, s, model(ctrl, a, b, imm16));
      end
      checks++;
      if (rw !== (ctrl.reg_dst ? rd : rt)) failures++;
    end
    // the lecture's example values: addi r2 = r2 + 3, ori with 17
    ctrl = CTRL_NOP; ctrl.ext_op = 1; ctrl.alu_src = 1; ctrl.alu_op = ALU_ADD;
    a = 32'd100; imm16 = 16'd3; #1; checks++; if (s !== 32'd103) failures++;
    imm16 = 16'hFFFF; #1; checks++; if (s !== 32'd99) failures++;
    ctrl.ext_op = 0; ctrl.alu_op = ALU_OR; a = 32'h0; imm16 = 16'h8011; #1;
    checks++; if (s !== 32'h0000_8011) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
