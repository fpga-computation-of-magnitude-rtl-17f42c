// tb_cordic_stage0: checks the first CORDIC iteration (x1 = x0 + y0,
// y1 = y0 - x0, sign-extended) on corner cases and random pairs, its
// one-clock latency and the valid flag.
module tb_cordic_stage0;
  localparam int IN_W = 12, INT_W = 15;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [IN_W-1:0] x_in = '0, y_in = '0;
  logic out_valid;
  logic signed [INT_W-1:0] x_out, y_out;
  int checks = 0, failures = 0;

  cordic_stage0 #(.IN_W(IN_W), .INT_W(INT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int x, int y, bit v);
    @(negedge clk);
    x_in = IN_W'(x); y_in = IN_W'(y); in_valid = v;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== v) begin
      failures++; $display("valid mismatch for %0d,%0d", x, y);
    end
    if (v) begin
      checks++;
      if (int'(x_out) != x + y || int'(y_out) != y - x) begin
        failures++;
        $display("x0=%0d y0=%0d: got x1=%0d y1=%0d", x, y, x_out, y_out);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    apply(0, 0, 1);
    apply(4095, 4095, 1);
    apply(4095, 0, 1);
    apply(0, 4095, 1);
    apply(1, 2, 0);
    apply(1, 4094, 1);
    for (int i = 0; i < 5000; i++)
      apply(int'($urandom_range(0, 4095)), int'($urandom_range(0, 4095)), 1'($urandom_range(0, 7) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
