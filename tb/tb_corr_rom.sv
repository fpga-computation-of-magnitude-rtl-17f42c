// tb_corr_rom: reads all 64 words of the correction table and compares each
// with round(yc * atan(yc/xc) / 2) at the bin centres, computed here with
// real arithmetic. Combinational block: the check runs on a time step.
module tb_corr_rom;
  import cordic_ref_pkg::*;
  logic [2:0] x_idx, y_idx;
  logic [7:0] corr;
  int checks = 0, failures = 0;

  corr_rom dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < 8; xi++)
      for (int yi = 0; yi < 8; yi++) begin
        x_idx = 3'(xi); y_idx = 3'(yi);
        #1;
        checks++;
        if (int'(corr) != ref_corr(xi, yi)) begin
          failures++;
          $display("xi=%0d yi=%0d: got %0d expected %0d", xi, yi, corr, ref_corr(xi, yi));
        end
      end
    // spot values worked out by hand: (0,7) -> 480*atan(480/1024)/2 = 105.3,
    // (7,0) -> 32*atan(32/15360)/2 = 0.03
    x_idx = 3'd0; y_idx = 3'd7; #1;
    checks++; if (corr != 8'd105) begin failures++; $display("word (0,7) = %0d", corr); end
    x_idx = 3'd7; y_idx = 3'd0; #1;
    checks++; if (corr != 8'd0) begin failures++; $display("word (7,0) = %0d", corr); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
