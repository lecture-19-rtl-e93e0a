// data_mem: data memory of the memory stage.
//
// Word-addressed array. The read is combinational at the byte address addr
// (S, the ALU result), giving the load result M within the memory cycle; a
// store writes wdata (D, the store data) at the rising clock edge when we is
// high. Addresses wrap at DEPTH words; the two low address bits are ignored
// (word accesses only). A second, read-only port (dbg_addr/dbg_rdata) lets a
// testbench or a host inspect memory contents.
// Size, word-only access and the inspection port are this design's choices.
module data_mem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  word_t                    addr,
  input  logic                     we,
  input  word_t                    wdata,
  output word_t                    rdata,
  input  logic [$clog2(DEPTH)-1:0] dbg_addr,
  output word_t                    dbg_rdata
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t mem [DEPTH];

  assign rdata     = mem[addr[AW+1:2]];
  assign dbg_rdata = mem[dbg_addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW+1:2]] <= wdata;
  end

endmodule
