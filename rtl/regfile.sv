// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// Register 0 always reads as zero and ignores writes. Reads are
// combinational. A write in the write-back stage is also passed straight to a
// read of the same register in the same cycle (write-through), so an
// instruction in decode sees a result that is being written back without any
// forwarding path: three instructions after a producer need no bypass.
//   ra1/rd1, ra2/rd2 : read ports (rs and rt of the instruction in decode)
//   we/wa/wd         : write port, written at the rising clock edge
// Reset clears all registers (this design's choice, so simulation starts from
// known values). A third, read-only port (dbg_ra/dbg_rd) exposes any register
// for inspection.
module regfile
  import mips_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t ra1,
  output word_t    rd1,
  input  reg_idx_t ra2,
  output word_t    rd2,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd,
  input  reg_idx_t dbg_ra,
  output word_t    dbg_rd
);

  word_t regs [NREGS];

  function automatic word_t read_port(reg_idx_t ra);
    if (ra == '0)                 return '0;
    else if (we && (wa == ra))    return wd;
    else                          return regs[ra];
  endfunction

  assign rd1    = read_port(ra1);
  assign rd2    = read_port(ra2);
  assign dbg_rd = (dbg_ra == '0) ? '0 : regs[dbg_ra];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && (wa != '0)) begin
      regs[wa] <= wd;
    end
  end

endmodule
