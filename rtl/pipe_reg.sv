// pipe_reg: one pipeline register (IF/DE, DE/EX, EX/ME or ME/WB) with its
// valid bit.
//
// The payload type T is a parameter, so each stage boundary latches its own
// struct. Each stage keeps a valid bit next to its payload; a cleared valid bit
// is a bubble, an instruction slot that does nothing (its register and memory
// writes are ignored downstream).
//   en     : clock enable. Low holds the register ("turn CEs off so no change").
//   bubble : load a bubble (valid <= 0) instead of the incoming instruction.
//            Takes priority over en.
// Reset clears the valid bit and the payload. Timing: one rising-edge register.
// The valid bit and the enable/bubble behaviour follow the pipeline control the
// design describes; the payload being cleared at reset is this design's choice.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic bubble,
  input  T     d,
  input  logic d_valid,
  output T     q,
  output logic q_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      q_valid <= 1'b0;
    end else if (bubble) begin
      q       <= d;
      q_valid <= 1'b0;
    end else if (en) begin
      q       <= d;
      q_valid <= d_valid;
    end
  end

endmodule
