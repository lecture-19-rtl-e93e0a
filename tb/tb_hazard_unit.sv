// tb_hazard_unit: self-checking testbench for hazard_unit.
// Uses real instruction encodings decoded by a table in the testbench to
// decide which registers the instruction in decode needs in execute; a stall
// is expected only when a valid load in execute writes one of them (not $0).
module tb_hazard_unit;
  import mips_pkg::*;
  logic de_valid, ex_valid, ex_reg_wr, ex_mem_to_reg, stall;
  ctrl_t de_ctrl;
  reg_idx_t rs, rt, ex_rw;
  int checks = 0, failures = 0, n_stall = 0;

  hazard_unit dut (.*);

  // kind: 0 R-type (rs, rt), 1 immediate ALU / lw (rs), 2 sw (rs only), 3 beq (rs, rt), 4 nop
  function automatic ctrl_t ctrl_of(int kind);
    ctrl_t c = CTRL_NOP;
    case (kind)
      0: begin c.reg_dst = 1; c.reg_wr = 1; end
      1: begin c.alu_src = 1; c.reg_wr = 1; c.mem_to_reg = $urandom_range(1); end
      2: begin c.alu_src = 1; c.mem_wr = 1; c.ext_op = 1; end
      3: begin c.branch = 1; c.ext_op = 1; end
      default: ;
    endcase
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int kind;
      logic exp;
      kind = $urandom_range(4);
      de_ctrl = ctrl_of(kind);
      de_valid = $urandom_range(7) != 0;
      rs = $urandom_range(3); rt = $urandom_range(3); ex_rw = $urandom_range(3);
      ex_valid = $urandom_range(7) != 0;
      ex_mem_to_reg = $urandom_range(1);
      ex_reg_wr = ex_mem_to_reg ? 1'b1 : 1'($urandom_range(1));
      exp = 0;
      if (de_valid && ex_valid && ex_reg_wr && ex_mem_to_reg && ex_rw != 0) begin
        if (kind != 4 && rs == ex_rw) exp = 1;
        if ((kind == 0 || kind == 3) && rt == ex_rw) exp = 1;
      end
      #1;
      checks++;
      if (stall !== exp) begin
        failures++;
        $display("kind %0d rs %0d rt %0d ex_rw %0d: stall %b exp %b", kind, rs, rt, ex_rw, stall, exp);
      end
      if (stall) n_stall++;
    end
    checks++; if (n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
