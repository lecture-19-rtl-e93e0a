// inst_mem: instruction memory of the fetch stage.
//
// A word array read combinationally at the PC (the byte address is divided by
// four and wraps at DEPTH words), so the instruction is available within the
// fetch cycle and latched into IF/DE.IR at the end of it. A synchronous write
// port loads the program before or while the processor runs.
//   addr        : byte address of the fetch (pc)
//   instr       : instruction word at addr
//   we/waddr/wdata : program load port (word address)
// Size and the load port are this design's choices; the block itself is the
// instruction memory of the classic five-stage pipeline.
module inst_mem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  word_t                    addr,
  output word_t                    instr,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  word_t                    wdata
);

  word_t mem [DEPTH];

  assign instr = mem[addr[$clog2(DEPTH)+1:2]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
