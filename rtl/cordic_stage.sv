// cordic_stage: one integer CORDIC vectoring iteration with shift k = SHIFT.
//
//   y(k) <  0:  x(k+1) = x(k) - (y(k) >>> k),  y(k+1) = y(k) + (x(k) >> k)
//   y(k) >= 0:  x(k+1) = x(k) + (y(k) >>> k),  y(k+1) = y(k) - (x(k) >> k)
//
// The shifts truncate toward minus infinity (arithmetic shift of the two's
// complement word), so the stage computes the floor-based integer iteration
// and |y| shrinks while x grows. As in the source design, the subtractions are
// additions of a one's complement (inverters) whose missing 1 enters as the
// carry-in of the adder, and the sign of y(k) selects through a multiplexer
// which operand is inverted. x is non-negative in every stage after the first.
// Results are registered: latency one clock, one new operand pair per clock,
// in_valid travels with the data.
module cordic_stage #(
  parameter int SHIFT = 1,
  parameter int INT_W = cordic_pkg::INT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [INT_W-1:0] x_in,
  input  logic signed [INT_W-1:0] y_in,
  output logic                    out_valid,
  output logic signed [INT_W-1:0] x_out,
  output logic signed [INT_W-1:0] y_out
);

  logic                    y_neg;
  logic signed [INT_W-1:0] x_sh, y_sh;     // x(k) >> k, y(k) >>> k
  logic        [INT_W-1:0] x_op, y_op;     // multiplexed, possibly inverted
  logic signed [INT_W-1:0] x_next, y_next;

  always_comb begin
    y_neg  = y_in[INT_W-1];
    x_sh   = x_in >>> SHIFT;
    y_sh   = y_in >>> SHIFT;
    // y < 0: x gains -(y>>>k), y gains +(x>>k); y >= 0: the opposite.
    x_op   = y_neg ? ~y_sh : y_sh;
    y_op   = y_neg ? x_sh  : ~x_sh;
    x_next = signed'(x_in + x_op + INT_W'(y_neg));
    y_next = signed'(y_in + y_op + INT_W'(!y_neg));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_out     <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      x_out     <= x_next;
      y_out     <= y_next;
    end
  end

  // x never becomes negative inside the vectoring chain.
  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !x_in[INT_W-1])
    else $error("cordic_stage: negative x operand");

endmodule
