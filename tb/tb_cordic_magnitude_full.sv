// tb_cordic_magnitude_full: exhaustive accuracy run of the magnitude
// calculator at its default parameters.
//
// Feeds every pair (x, y) with 0 <= x, y <= 4095 back to back, one per clock
// (16.8 million samples), and checks each result bit for bit against the
// reference model. It measures the largest distance to the exact magnitude
// over 1 <= x, y <= 4095, with and without the ROM correction (the latter
// taken from the model), prints where it occurs, and fails if the corrected
// error exceeds 5 or the correction does not reduce it. The first result must
// appear 7 clocks after the first input, and results must arrive without gaps.
module tb_cordic_magnitude_full;
  import cordic_ref_pkg::*;
  localparam int LATENCY = 7;
  localparam int N = 4096;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [11:0] x_in = '0, y_in = '0;
  logic out_valid, y_sat;
  logic [12:0] mag;

  int checks = 0, failures = 0, mismatches = 0;
  longint cycle = 0, first_in = -1, first_out = -1, n_out = 0;
  real emax = 0.0, emax_nc = 0.0;
  int emax_x = 0, emax_y = 0;

  cordic_magnitude dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (N * N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input side: x in the outer loop, y in the inner one.
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        @(negedge clk);
        x_in = 12'(x); y_in = 12'(y); in_valid = 1'b1;
        if (first_in < 0) first_in = cycle;
      end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // Output side: the k-th result belongs to input pair k.
  always @(posedge clk) if (rst_n && out_valid) begin
    int x, y;
    ref_t r;
    real e, enc;
    x = int'(n_out / N);
    y = int'(n_out % N);
    if (first_out < 0) first_out = cycle;
    r = ref_mag(x, y);
    if (int'(mag) != r.mag || y_sat != r.sat) begin
      mismatches++;
      if (mismatches < 10)
        $display("(%0d,%0d): got %0d expected %0d", x, y, mag, r.mag);
    end
    if (x > 0 && y > 0) begin
      e   = fabs(real'(mag) - exact_mag(x, y));
      enc = fabs(real'(r.x5) * 0.6076 - exact_mag(x, y));
      if (e > emax) begin emax = e; emax_x = x; emax_y = y; end
      if (enc > emax_nc) emax_nc = enc;
    end
    n_out++;
    if (n_out == longint'(N) * N) begin
      checks++;
      if (mismatches != 0) begin failures++; $display("%0d results differ from the model", mismatches); end
      checks++;
      if (first_out - first_in != LATENCY) begin
        failures++; $display("latency %0d", first_out - first_in);
      end
      checks++;
      if (cycle - first_out != n_out - 1) begin failures++; $display("gaps in the output stream"); end
      checks++;
      if (emax > 5.0) begin failures++; $display("maximum error above 5"); end
      checks++;
      if (emax >= emax_nc) begin failures++; $display("correction does not reduce the error"); end
      $display("results %0d, maximum error %f at (%0d,%0d), without correction %f",
               n_out, emax, emax_x, emax_y, emax_nc);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
