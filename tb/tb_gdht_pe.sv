// tb_gdht_pe: self-checking test of one processing element. Random words,
// coefficients, partial sums and tags are applied; the expected outputs come
// from a small model of the stationary operands kept in the testbench.
// Checks the pass-through outputs, both multiply-accumulate channels, the
// tag-controlled capture and the hold of xi1/xi2 while tc = 0.
module tb_gdht_pe;
  localparam int DW = 19, CW = 16, YW = 38;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] xe1_i, xe2_i, xe1_o, xe2_o;
  logic signed [CW-1:0] c_i, c_o;
  logic signed [YW-1:0] y1_i, y2_i, y1_o, y2_o;
  logic tc_i, tc_o;

  gdht_pe #(.DW(DW), .CW(CW), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_load = 0, n_hold = 0;
  longint m1 = 0, m2 = 0;     // model of xi1 / xi2

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint a1, a2;
    xe1_i = '0; xe2_i = '0; c_i = '0; y1_i = '0; y2_i = '0; tc_i = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      xe1_i = DW'($urandom);
      xe2_i = DW'($urandom);
      c_i   = CW'($urandom);
      y1_i  = YW'({$urandom, $urandom}) >>> 4;
      y2_i  = YW'({$urandom, $urandom}) >>> 4;
      tc_i  = ($urandom_range(3) == 0);
      #1;
      a1 = tc_i ? longint'(xe1_i) : m1;
      a2 = tc_i ? longint'(xe2_i) : m2;
      check("y1_o", y1_o, longint'(y1_i) + a1 * longint'(c_i));
      check("y2_o", y2_o, longint'(y2_i) + a2 * longint'(c_i));
      check("xe1_o", xe1_o, xe1_i);
      check("xe2_o", xe2_o, xe2_i);
      check("c_o", c_o, c_i);
      check("tc_o", tc_o, tc_i);
      if (tc_i) begin
        m1 = xe1_i; m2 = xe2_i; n_load++;
      end else n_hold++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (n_load == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: load %0d / hold %0d never both exercised", n_load, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
