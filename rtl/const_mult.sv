// const_mult: multiplication by the inverse CORDIC gain (MULT1).
//
// Each CORDIC pseudo-rotation lengthens the vector by sqrt(1 + 2^-2k); the
// corrected x therefore has to be scaled by the inverse cumulation factor
// 0.6076 to give the magnitude. The constant is an unsigned fixed-point value
// K_INV / 2^K_FRAC (default 39820 / 2^16 = 0.607605), and the product is
// rounded to the nearest integer:
//   mag = (x * K_INV + 2^(K_FRAC-1)) >> K_FRAC.
// Result registered: latency one clock, one result per clock. The constant
// 0.6076 follows the source design; its Q0.16 format and the rounding are this
// implementation's choice.
module const_mult #(
  parameter int INT_W  = cordic_pkg::INT_W,
  parameter int OUT_W  = cordic_pkg::OUT_W,
  parameter int K_FRAC = cordic_pkg::K_FRAC,
  parameter int K_INV  = cordic_pkg::K_INV
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [INT_W-1:0] x_in,
  output logic             out_valid,
  output logic [OUT_W-1:0] mag
);

  localparam int P_W = INT_W + K_FRAC;

  logic [P_W-1:0] prod;

  always_comb prod = P_W'(x_in) * P_W'(K_INV) + P_W'(1 << (K_FRAC - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
    end else begin
      out_valid <= in_valid;
      mag       <= OUT_W'(prod >> K_FRAC);
    end
  end

endmodule
