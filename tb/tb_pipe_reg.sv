// tb_pipe_reg: self-checking testbench for pipe_reg.
// Random enable / bubble / data, compared with a reference register:
// reset clears valid, bubble clears valid, a low enable holds.
module tb_pipe_reg;
  typedef logic [19:0] pay_t;
  logic clk = 0, rst_n = 0, en = 0, bubble = 0, d_valid = 0, q_valid;
  pay_t d = '0, q, ref_q;
  logic ref_v;
  int checks = 0, failures = 0;

  pipe_reg #(.T(pay_t)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++; if (q_valid !== 1'b0 || q !== '0) failures++;
    ref_q = '0; ref_v = 0;
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en = $urandom_range(3) != 0; bubble = $urandom_range(4) == 0;
      d = 20'($urandom); d_valid = $urandom_range(3) != 0;
      @(posedge clk);
      if (bubble)  begin ref_q = d; ref_v = 0; end
      else if (en) begin ref_q = d; ref_v = d_valid; end
      #1;
      checks++; if (q_valid !== ref_v) begin failures++; $display("valid %b exp %b", q_valid, ref_v); end
      checks++; if (q !== ref_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
