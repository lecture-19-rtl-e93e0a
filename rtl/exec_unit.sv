// exec_unit: the execute stage datapath.
//
// Extends the 16-bit immediate (sign extension when ExtOp is set, zero
// extension otherwise), picks the ALU's second operand (bus B, or the
// immediate when ALUSrc is set), and computes S = A op B for the operation
// ALUOp. It also selects the destination register, rd for R-type (RegDst set)
// and rt otherwise, which is latched into EX/ME as the pending write "rw".
// Purely combinational; the result is latched into EX/ME.S.
//   S <- A + B, A - B, A and B, A or B, A xor B, (A < B signed)
//   S <- A or ZX(imm) (ori), A and ZX(imm) (andi), A + SX(imm) (addi, lw, sw)
// The operations follow the lecture's register-transfer table; the encoding
// of ALUOp and slt are this design's choices. No overflow exception.
module exec_unit
  import mips_pkg::*;
(
  input  ctrl_t       ctrl,
  input  word_t       a,
  input  word_t       b,
  input  logic [15:0] imm16,
  input  reg_idx_t    rt,
  input  reg_idx_t    rd,
  output word_t       s,
  output reg_idx_t    rw
);

  word_t imm_ext, opb;

  assign imm_ext = ctrl.ext_op ? {{16{imm16[15]}}, imm16} : {16'h0000, imm16};
  assign opb     = ctrl.alu_src ? imm_ext : b;
  assign rw      = ctrl.reg_dst ? rd : rt;

  always_comb begin
    unique case (ctrl.alu_op)
      ALU_ADD: s = a + opb;
      ALU_SUB: s = a - opb;
      ALU_AND: s = a & opb;
      ALU_OR:  s = a | opb;
      ALU_XOR: s = a ^ opb;
      ALU_SLT: s = {31'b0, $signed(a) < $signed(opb)};
      default: s = '0;
    endcase
  end

endmodule
