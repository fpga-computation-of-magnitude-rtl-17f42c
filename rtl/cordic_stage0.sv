// cordic_stage0: first CORDIC vectoring iteration (k = 0, no shift).
//
// Both inputs are unsigned, so the vector lies in the first quadrant and the
// first rotation is always clockwise by 45 degrees:
//   x1 = x0 + y0      (BA1: plain unsigned adder, IN_W+1 bit result)
//   y1 = y0 - x0      (BA2: y0 + ~x0 with a carry-in of 1)
// BA2 works on IN_W+1 bits, which holds any difference of two IN_W-bit
// unsigned numbers; its result is sign-extended to the INT_W-bit internal
// word, x1 is zero-extended (its two top bits are therefore always 0, since
// x0 + y0 < 2^(IN_W+1)). Both results are registered, so the stage has a
// latency of one clock and accepts a new pair every clock. in_valid travels
// with the data. The adder structure follows the source design; the register
// at the stage output and the valid flag are this implementation's choice.
module cordic_stage0 #(
  parameter int IN_W  = cordic_pkg::IN_W,
  parameter int INT_W = cordic_pkg::INT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         x_in,
  input  logic [IN_W-1:0]         y_in,
  output logic                    out_valid,
  output logic signed [INT_W-1:0] x_out,
  output logic signed [INT_W-1:0] y_out
);

  logic [IN_W:0] ba1_sum;   // x0 + y0, unsigned
  logic [IN_W:0] ba2_diff;  // y0 - x0, two's complement on IN_W+1 bits

  always_comb begin
    ba1_sum  = {1'b0, x_in} + {1'b0, y_in};
    ba2_diff = {1'b0, y_in} + {1'b1, ~x_in} + (IN_W+1)'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      x_out     <= signed'(INT_W'(ba1_sum));
      y_out     <= signed'({{(INT_W-IN_W-1){ba2_diff[IN_W]}}, ba2_diff});
    end
  end

endmodule
