// tb_const_mult: multiplies every 14-bit input by the inverse gain and checks
// that the result is x * 0.6076 rounded to the nearest integer (computed here
// in real arithmetic; the fixed-point constant differs from 0.6076 by less
// than 4e-6, which stays below the rounding margin for these inputs), plus
// the one-clock latency and the valid flag.
module tb_const_mult;
  import cordic_ref_pkg::*;
  localparam int INT_W = 15, OUT_W = 13;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [INT_W-1:0] x_in = '0;
  logic out_valid;
  logic [OUT_W-1:0] mag;
  int checks = 0, failures = 0;

  const_mult dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exact;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int x = 0; x < 13000; x++) begin
      @(negedge clk);
      x_in = INT_W'(x);
      in_valid = (x % 11) != 5;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin failures++; $display("valid mismatch at %0d", x); end
      if (in_valid) begin
        exact = x * 0.6076;
        checks++;
        if (fabs(real'(mag) - exact) > 0.5 + 0.07) begin
          failures++;
          $display("x=%0d: got %0d expected %f", x, mag, exact);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
