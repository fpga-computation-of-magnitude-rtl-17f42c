// cordic_magnitude: pipelined magnitude |x + jy| of a complex sample with
// unsigned IN_W-bit parts, by a shortened CORDIC with a final correction.
//
// Datapath (one register per box, one new sample per clock):
//   cordic_stage0          k = 0: x1 = x0 + y0, y1 = y0 - x0
//   cordic_stage x (N-1)   k = 1..N_ITER-1: rotate toward the x axis, shift k
//   correction_stage       x_corr = x_N + ROM(3 msbs of x_N, |y_N| / 64)
//   const_mult             mag = round(x_corr * 0.6076)
// Latency is N_ITER + 2 clocks (7 with the default five iterations); out_valid
// follows in_valid by that many clocks. There is no back-pressure: the
// pipeline never stalls. Over all 12-bit input pairs the result stays within
// 4.8 of the exact magnitude (11.7 without the correction ROM). y_sat is
// aligned with mag and flags a sample whose |y_N| exceeded the range of the
// ROM's y index, so that the correction used the largest entry of its row.
// Five iterations, the ROM correction and the constant multiplier follow the
// source design; the pipeline registers, valid flag and y_sat are this
// implementation's choice.
module cordic_magnitude #(
  parameter int IN_W   = cordic_pkg::IN_W,
  parameter int INT_W  = cordic_pkg::INT_W,
  parameter int N_ITER = cordic_pkg::N_ITER,
  parameter int OUT_W  = cordic_pkg::OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  x_in,
  input  logic [IN_W-1:0]  y_in,
  output logic             out_valid,
  output logic [OUT_W-1:0] mag,
  output logic             y_sat
);

  logic                    v [N_ITER];
  logic signed [INT_W-1:0] xs [N_ITER];
  logic signed [INT_W-1:0] ys [N_ITER];

  logic             corr_valid;
  logic [INT_W-1:0] x_corr;
  logic             corr_sat;

  cordic_stage0 #(.IN_W(IN_W), .INT_W(INT_W)) u_stage0 (
    .clk, .rst_n, .in_valid, .x_in, .y_in,
    .out_valid(v[0]), .x_out(xs[0]), .y_out(ys[0])
  );

  for (genvar k = 1; k < N_ITER; k++) begin : g_iter
    cordic_stage #(.SHIFT(k), .INT_W(INT_W)) u_stage (
      .clk, .rst_n,
      .in_valid(v[k-1]), .x_in(xs[k-1]), .y_in(ys[k-1]),
      .out_valid(v[k]), .x_out(xs[k]), .y_out(ys[k])
    );
  end

  correction_stage #(.INT_W(INT_W)) u_corr (
    .clk, .rst_n,
    .in_valid(v[N_ITER-1]), .x_in(xs[N_ITER-1]), .y_in(ys[N_ITER-1]),
    .out_valid(corr_valid), .x_corr, .y_sat(corr_sat)
  );

  const_mult #(.INT_W(INT_W), .OUT_W(OUT_W)) u_mult (
    .clk, .rst_n, .in_valid(corr_valid), .x_in(x_corr),
    .out_valid, .mag
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_sat <= 1'b0;
    else        y_sat <= corr_sat;
  end

endmodule
