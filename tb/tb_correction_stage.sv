// tb_correction_stage: checks the ROM address formation (3 msbs of x, |y|/64
// saturated to 7), the added correction, the saturation flag, the one-clock
// latency and the valid flag, on corner cases and on random (x, y) pairs in
// the range reached after five CORDIC iterations.
module tb_correction_stage;
  import cordic_ref_pkg::*;
  localparam int INT_W = 15;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [INT_W-1:0] x_in = '0, y_in = '0;
  logic out_valid, y_sat;
  logic [INT_W-1:0] x_corr;
  int checks = 0, failures = 0, n_sat = 0, n_negy = 0;

  correction_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, int y, bit v);
    int yabs, yi, ex;
    bit es;
    @(negedge clk);
    x_in = INT_W'(x); y_in = INT_W'(y); in_valid = v;
    @(posedge clk); #1;
    yabs = (y < 0) ? -y : y;
    yi = yabs / 64;
    es = yi > 7;
    if (es) yi = 7;
    ex = x + ref_corr(x / 2048, yi);
    checks++;
    if (out_valid !== v) begin failures++; $display("valid mismatch"); end
    if (v) begin
      if (es) n_sat++;
      if (y < 0) n_negy++;
      checks++;
      if (int'(x_corr) != ex || y_sat !== es) begin
        failures++;
        $display("x=%0d y=%0d: got %0d sat=%0b expected %0d sat=%0b", x, y, x_corr, y_sat, ex, es);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    apply(9527, 545, 1);      // largest |y| seen after five stages: saturates
    apply(9527, -545, 1);
    apply(9000, 511, 1);      // top of the unsaturated range
    apply(9000, -512, 1);     // first saturated value
    apply(0, 0, 1);
    apply(16383, 0, 1);
    apply(4000, -300, 0);
    for (int i = 0; i < 10000; i++)
      apply(int'($urandom_range(0, 9600)), int'($urandom_range(0, 1200)) - 600,
            1'($urandom_range(0, 7) != 0));
    checks++;
    if (n_sat == 0 || n_negy == 0) begin failures++; $display("saturation or negative y never tested"); end
    $display("saturated %0d times, negative y %0d times", n_sat, n_negy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
