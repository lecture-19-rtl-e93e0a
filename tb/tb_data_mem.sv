// tb_data_mem: self-checking testbench for data_mem.
// Random stores and loads against a reference array; checks that a store
// takes effect at the clock edge, loads read combinationally, and the
// inspection port returns the same contents.
module tb_data_mem;
  import mips_pkg::*;
  localparam int DEPTH = 32;
  logic clk = 0, we = 0;
  word_t addr = '0, wdata = '0, rdata, dbg_rdata;
  logic [$clog2(DEPTH)-1:0] dbg_addr = '0;
  word_t ref_mem [DEPTH];
  int checks = 0, failures = 0;

  data_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; addr = i * 4; wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      int w;
      w = $urandom_range(DEPTH - 1);
      @(negedge clk);
      addr = w * 4; we = $urandom_range(1); wdata = $urandom;
      dbg_addr = $urandom_range(DEPTH - 1);
      #1;
      checks++; if (rdata !== ref_mem[w]) begin failures++; $display("rd %0d", w); end
      checks++; if (dbg_rdata !== ref_mem[dbg_addr]) failures++;
      @(posedge clk);
      if (we) ref_mem[w] = wdata;
      #1;
      checks++; if (rdata !== ref_mem[w]) begin failures++; $display("after wr %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
