// next_pc: program counter and next-PC logic of the fetch stage.
//
// Every cycle the PC advances to PC+4, or to the branch target when the branch
// in the decode stage is taken. Because the branch is resolved in decode, the
// instruction fetched in the same cycle (the one right after the branch) is
// always executed: the branch has one delay slot, as the MIPS ISA defines.
// During a stall the PC keeps its value so the same instruction is fetched
// again ("turn off nextPC update").
//   stall     : hold the PC
//   br_taken  : the branch in decode is taken; br_target is the new PC
//   pc        : address of the instruction being fetched (byte address)
//   pc_plus4  : pc + 4, latched into IF/DE for branch target computation
// Reset loads RESET_PC. One rising-edge register; outputs come from it and
// one adder. The reset address is this design's choice.
module next_pc
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  stall,
  input  logic  br_taken,
  input  word_t br_target,
  output word_t pc,
  output word_t pc_plus4
);

  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pc <= RESET_PC;
    else if (!stall)   pc <= br_taken ? br_target : pc_plus4;
  end

endmodule
