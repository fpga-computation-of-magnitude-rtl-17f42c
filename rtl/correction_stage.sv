// correction_stage: final correction after the last CORDIC iteration.
//
// Forms the 6-bit address of the correction ROM from the last stage's output
// and adds the looked-up amount to x:
//   x index = the XA_BITS most significant magnitude bits of x (x >= 0),
//   y index = |y| >> YA_LSB, saturated to 2^YA_BITS - 1,
//   x_corr  = x + ROM[x index, y index].
// |y| is formed by inversion and increment when y is negative. The sum is
// registered: latency one clock, one result per clock, in_valid travels with
// the data. Taking 3 bits of each operand and y/64 follows the source design;
// the saturation of the y index is this implementation's choice (|y| after
// five stages reaches about 545, just beyond the 3-bit range of 0..511).
module correction_stage #(
  parameter int INT_W   = cordic_pkg::INT_W,
  parameter int XA_BITS = cordic_pkg::XA_BITS,
  parameter int YA_BITS = cordic_pkg::YA_BITS,
  parameter int YA_LSB  = cordic_pkg::YA_LSB,
  parameter int CORR_W  = cordic_pkg::CORR_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [INT_W-1:0] x_in,
  input  logic signed [INT_W-1:0] y_in,
  output logic                    out_valid,
  output logic        [INT_W-1:0] x_corr,
  output logic                    y_sat      // y index was saturated
);

  localparam int X_LSB  = INT_W - 1 - XA_BITS;
  localparam int YQ_W   = INT_W - YA_LSB;
  localparam int YI_MAX = (1 << YA_BITS) - 1;

  logic [INT_W-1:0]   y_abs;
  logic [YQ_W-1:0]    y_q;
  logic [XA_BITS-1:0] x_idx;
  logic [YA_BITS-1:0] y_idx;
  logic               sat;
  logic [CORR_W-1:0]  corr;

  always_comb begin
    y_abs = y_in[INT_W-1] ? (~y_in + INT_W'(1)) : y_in;
    y_q   = y_abs[INT_W-1:YA_LSB];
    sat   = (y_q > YQ_W'(YI_MAX));
    y_idx = sat ? YA_BITS'(YI_MAX) : y_q[YA_BITS-1:0];
    x_idx = x_in[INT_W-2 -: XA_BITS];
  end

  corr_rom #(
    .XA_BITS(XA_BITS), .YA_BITS(YA_BITS),
    .X_LSB(X_LSB), .Y_LSB(YA_LSB), .CORR_W(CORR_W)
  ) u_rom (
    .x_idx(x_idx), .y_idx(y_idx), .corr(corr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      x_corr    <= '0;
      y_sat     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      x_corr    <= x_in + INT_W'(corr);
      y_sat     <= in_valid & sat;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !x_in[INT_W-1])
    else $error("correction_stage: negative x operand");

endmodule
