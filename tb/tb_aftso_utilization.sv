// tb_aftso_utilization: PREU lane utilisation of the AFTSO hit-point update
// operation controller with 4, 8 and 16 lanes and one four-entry photon
// buffer.
//
// Three controllers receive the same stream of 2000 photons (about 225k
// hit-point updates) as fast as they accept it.  Utilisation is the number
// of dispatched lanes divided by N_SET times the cycles from the first to
// the last dispatch; the engine's own analysis reports 99.99% for all three
// sizes on its scenes.  This stream is synthetic, so the check asks for at
// least 99% and the measured values are printed.  Each lane stream is also
// checked address by address.
module tb_aftso_utilization;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic fin [3];
  int   lanes [3], total [3], span [3], errors [3];

  aftso_util_run #(.N_SET(4))  u4  (.clk, .rst_n, .finished(fin[0]), .lanes(lanes[0]), .total(total[0]), .span(span[0]), .errors(errors[0]));
  aftso_util_run #(.N_SET(8))  u8  (.clk, .rst_n, .finished(fin[1]), .lanes(lanes[1]), .total(total[1]), .span(span[1]), .errors(errors[1]));
  aftso_util_run #(.N_SET(16)) u16 (.clk, .rst_n, .finished(fin[2]), .lanes(lanes[2]), .total(total[2]), .span(span[2]), .errors(errors[2]));

  int checks = 0, failures = 0;
  localparam int NS [3] = '{4, 8, 16};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2]);
    repeat (5) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      real u;
      u = real'(lanes[i]) / real'(NS[i] * span[i]);
      $display("N_SET=%0d: %0d updates, %0d cycles, utilisation %0.4f%%", NS[i], lanes[i], span[i], 100.0 * u);
      checks++;
      if (lanes[i] != total[i] || errors[i] != 0) begin
        failures++;
        $display("N_SET=%0d: %0d lanes for %0d updates, %0d address errors", NS[i], lanes[i], total[i], errors[i]);
      end
      checks++;
      if (u < 0.99) begin
        failures++;
        $display("N_SET=%0d: utilisation below 99%%", NS[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
