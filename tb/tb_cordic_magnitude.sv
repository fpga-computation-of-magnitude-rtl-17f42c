// tb_cordic_magnitude: end-to-end test of the magnitude calculator.
//
// Streams directed and random 12-bit pairs with idle cycles in between and
// checks for every result: the bit-true value from the reference model, the
// distance to the exact magnitude (at most 5), the y_sat flag, and that it
// appears exactly N_ITER + 2 = 7 clocks after its input. It also counts the
// mechanisms of the design and fails if one never happened: both rotation
// directions, a non-zero ROM correction, a saturated ROM y index, idle
// cycles in the stream, and back-to-back samples.
module tb_cordic_magnitude;
  import cordic_ref_pkg::*;
  localparam int LATENCY = 7;
  localparam int N_RANDOM = 20000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [11:0] x_in = '0, y_in = '0;
  logic out_valid, y_sat;
  logic [12:0] mag;

  int checks = 0, failures = 0;
  int n_neg = 0, n_pos = 0, n_corr = 0, n_sat = 0, n_idle = 0, n_b2b = 0, n_out = 0;
  longint cycle = 0;
  real max_err = 0.0;

  typedef struct { int x; int y; longint t; } sample_t;
  sample_t q[$];

  cordic_magnitude dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker
  always @(posedge clk) if (rst_n && out_valid) begin
    sample_t s;
    ref_t r;
    real e;
    n_out++;
    checks++;
    if (q.size() == 0) begin
      failures++; $display("unexpected output %0d", mag);
    end else begin
      s = q.pop_front();
      r = ref_mag(s.x, s.y);
      e = fabs(real'(mag) - exact_mag(s.x, s.y));
      if (e > max_err) max_err = e;
      if (cycle - s.t != LATENCY) begin
        failures++; $display("(%0d,%0d): latency %0d", s.x, s.y, cycle - s.t);
      end
      if (int'(mag) != r.mag || y_sat != r.sat) begin
        failures++;
        $display("(%0d,%0d): got %0d sat=%0b expected %0d sat=%0b", s.x, s.y, mag, y_sat, r.mag, r.sat);
      end
      checks++;
      if (e > 5.0) begin failures++; $display("(%0d,%0d): error %f", s.x, s.y, e); end
      if (r.sat) n_sat++;
      if (r.xcorr != r.x5) n_corr++;
      n_neg += r.neg_count;
      n_pos += r.pos_count;
    end
  end

  bit last_valid = 0;
  task automatic drive(int x, int y, bit v);
    @(negedge clk);
    x_in = 12'(x); y_in = 12'(y); in_valid = v;
    if (!v) n_idle++;
    else if (last_valid) n_b2b++;
    last_valid = v;
    @(posedge clk);
    if (v) q.push_back('{x, y, cycle});
  endtask

  initial begin
    int sat_x, sat_y;
    ref_t r;
    sat_x = -1;
    sat_y = -1;
    // find an input pair whose |y5| leaves the ROM's y range
    for (int x = 4095; x > 3000 && sat_x < 0; x--)
      for (int y = 4095; y > 3000; y--) begin
        r = ref_mag(x, y);
        if (r.sat) begin sat_x = x; sat_y = y; break; end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    drive(0, 0, 1);
    drive(4095, 4095, 1);
    drive(4095, 0, 1);
    drive(0, 4095, 1);
    drive(1, 1, 1);
    drive(0, 0, 0);
    drive(3371, 4082, 1);
    drive(4088, 3386, 1);
    if (sat_x >= 0) drive(sat_x, sat_y, 1);
    for (int i = 0; i < N_RANDOM; i++)
      drive(int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)),
            1'($urandom_range(0, 9) != 0));
    drive(0, 0, 0);
    repeat (LATENCY + 2) drive(0, 0, 0);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("outputs %0d, max error %f", n_out, max_err);
    $display("mechanisms: y<0 rotations %0d, y>=0 rotations %0d, non-zero corrections %0d, saturated y index %0d, idle cycles %0d, back-to-back samples %0d",
             n_neg, n_pos, n_corr, n_sat, n_idle, n_b2b);
    if (n_neg == 0) begin failures++; $display("y<0 rotation never happened"); end
    if (n_pos == 0) begin failures++; $display("y>=0 rotation never happened"); end
    if (n_corr == 0) begin failures++; $display("correction never happened"); end
    if (n_sat == 0) begin failures++; $display("saturated y index never happened"); end
    if (n_idle == 0) begin failures++; $display("idle cycle never happened"); end
    if (n_b2b == 0) begin failures++; $display("back-to-back samples never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
