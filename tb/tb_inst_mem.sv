// tb_inst_mem: self-checking testbench for inst_mem.
// Loads a pattern (a function of the address) through the write port, then
// reads every word through the byte-addressed fetch port and compares.
module tb_inst_mem;
  import mips_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] waddr = '0;
  word_t addr = '0, instr, wdata = '0;
  int checks = 0, failures = 0;

  inst_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  function automatic word_t pat(int i);
    return 32'h9e37_79b9 * (i + 1) ^ 32'h0f0f_1234;
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = i[$clog2(DEPTH)-1:0]; wdata = pat(i);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      addr = i * 4 + $urandom_range(3) * 0; #1;
      checks++;
      if (instr !== pat(i)) begin failures++; $display("word %0d: %h", i, instr); end
    end
    // byte address wraps at DEPTH words
    addr = DEPTH * 4 + 8; #1; checks++; if (instr !== pat(2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
