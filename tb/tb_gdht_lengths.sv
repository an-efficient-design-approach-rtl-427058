// tb_gdht_lengths: end-to-end test of gdht_top at prime lengths other than
// the default, N = 3, 5, 11, 13 and 31 (primitive roots 2, 2, 2, 2, 3), one
// gdht_top_harness each, run side by side. The tolerance grows with N
// because the rounding errors of the fixed-point coefficients accumulate
// through the recursion over (N-1)/2 steps.
module tb_gdht_lengths;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic d3, d5, d11, d13, d31;
  int   c3, c5, c11, c13, c31, f3, f5, f11, f13, f31;

  gdht_top_harness #(.N(3),  .G(2), .NFRAMES(30), .TOL(16.0))  h3  (.clk, .rst_n, .done(d3),  .checks(c3),  .failures(f3));

  gdht_top_harness #(.N(5),  .G(2), .NFRAMES(30), .TOL(24.0))  h5  (.clk, .rst_n, .done(d5),  .checks(c5),  .failures(f5));
  gdht_top_harness #(.N(11), .G(2), .NFRAMES(30), .TOL(64.0))  h11 (.clk, .rst_n, .done(d11), .checks(c11), .failures(f11));
  gdht_top_harness #(.N(13), .G(2), .NFRAMES(30), .TOL(64.0))  h13 (.clk, .rst_n, .done(d13), .checks(c13), .failures(f13));
  gdht_top_harness #(.N(31), .G(3), .NFRAMES(20), .TOL(256.0)) h31 (.clk, .rst_n, .done(d31), .checks(c31), .failures(f31));

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d3 && d5 && d11 && d13 && d31);
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5 + c11 + c13 + c31, f3 + f5 + f11 + f13 + f31);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c3 + c5 + c11 + c13 + c31, f3 + f5 + f11 + f13 + f31 + 1);
    $finish;
  end
endmodule
