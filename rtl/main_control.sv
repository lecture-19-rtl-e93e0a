// main_control: main control of the decode (Reg/Dec) stage.
//
// Decodes the opcode and, for R-type instructions, the function field of the
// instruction in IF/DE.IR into the control bundle ctrl_t: ExtOp, ALUSrc, ALUOp
// and RegDst (used by execute one cycle later), MemWr (used by the memory
// stage two cycles later), MemtoReg and RegWr (used in write back three cycles
// later), and Branch (used in decode itself, since the branch is resolved
// there). The bundle is latched into DE/EX and travels with its instruction.
// Purely combinational.
// Supported: add addu sub subu and or xor slt (R-type), addi addiu andi ori,
// lw, sw, beq. Any other encoding, including the all-zero nop, produces the
// all-inactive bundle CTRL_NOP. The set of instructions follows the lecture's
// examples and register-transfer table; slt, addu/subu and the treatment of
// unknown encodings are this design's choices.
module main_control
  import mips_pkg::*;
(
  input  word_t instr,
  output ctrl_t ctrl
);

  logic [5:0] op, funct;
  assign op    = instr[31:26];
  assign funct = instr[5:0];

  always_comb begin
    ctrl = CTRL_NOP;
    unique case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        ctrl.reg_wr  = 1'b1;
        unique case (funct)
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:          ctrl.alu_op = ALU_AND;
          FN_OR:           ctrl.alu_op = ALU_OR;
          FN_XOR:          ctrl.alu_op = ALU_XOR;
          FN_SLT:          ctrl.alu_op = ALU_SLT;
          default:         ctrl = CTRL_NOP;
        endcase
      end
      OP_ADDI, OP_ADDIU: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALU_ADD;
        ctrl.reg_wr  = 1'b1;
      end
      OP_ANDI: begin
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALU_AND;
        ctrl.reg_wr  = 1'b1;
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALU_OR;
        ctrl.reg_wr  = 1'b1;
      end
      OP_LW: begin
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.alu_op     = ALU_ADD;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_op  = ALU_ADD;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op = 1'b1;
        ctrl.branch = 1'b1;
      end
      default: ctrl = CTRL_NOP;
    endcase
  end

endmodule
