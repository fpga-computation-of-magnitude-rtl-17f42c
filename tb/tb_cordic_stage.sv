// tb_cordic_stage: checks the shifted CORDIC iteration for k = 1..4 against
// the floor-based integer recurrence, with both signs of y, one-clock latency
// and the valid flag. Four instances, one per shift, receive the same inputs.
module tb_cordic_stage;
  import cordic_ref_pkg::*;
  localparam int INT_W = 15;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [INT_W-1:0] x_in = '0, y_in = '0;
  logic                    ov [1:4];
  logic signed [INT_W-1:0] xo [1:4];
  logic signed [INT_W-1:0] yo [1:4];
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  for (genvar k = 1; k <= 4; k++) begin : g_dut
    cordic_stage #(.SHIFT(k), .INT_W(INT_W)) dut (
      .clk, .rst_n, .in_valid, .x_in, .y_in,
      .out_valid(ov[k]), .x_out(xo[k]), .y_out(yo[k])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, int y, bit v);
    int ex, ey;
    @(negedge clk);
    x_in = INT_W'(x); y_in = INT_W'(y); in_valid = v;
    @(posedge clk); #1;
    if (y < 0) n_neg++; else n_pos++;
    for (int k = 1; k <= 4; k++) begin
      checks++;
      if (ov[k] !== v) begin failures++; $display("valid mismatch k=%0d", k); end
      if (v) begin
        if (y < 0) begin ex = x - floor_div2(y, k); ey = y + floor_div2(x, k); end
        else       begin ex = x + floor_div2(y, k); ey = y - floor_div2(x, k); end
        checks++;
        if (int'(xo[k]) != ex || int'(yo[k]) != ey) begin
          failures++;
          $display("k=%0d x=%0d y=%0d: got %0d,%0d expected %0d,%0d", k, x, y, xo[k], yo[k], ex, ey);
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    apply(0, 0, 1);
    apply(8190, -1, 1);
    apply(8190, 4095, 1);
    apply(8190, -4095, 1);
    apply(7, -7, 1);
    apply(100, 3, 0);
    for (int i = 0; i < 10000; i++)
      apply(int'($urandom_range(0, 9000)), int'($urandom_range(0, 8190)) - 4095,
            1'($urandom_range(0, 7) != 0));
    checks++;
    if (n_neg == 0 || n_pos == 0) begin failures++; $display("a sign branch never ran"); end
    $display("y<0 branch %0d times, y>=0 branch %0d times", n_neg, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
