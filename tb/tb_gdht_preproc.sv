// tb_gdht_preproc: self-checking test of the pre-processing stage at
// N = 7, G = 3. The expected word stream is written out from the worked
// example of the transform (a = 2*pi/7):
//   slot 0: x(6)cos(3a) - x(1)cos(4a),  x(6)sin(3a) - x(1)sin(4a),  c = cos(4a)
//   slot 1: x(4)cos(2a) - x(3)cos(5a),  x(4)sin(2a) - x(3)sin(5a),  c = cos(2a)
//   slot 2: x(2)cos(a)  - x(5)cos(6a),  x(2)sin(a)  - x(5)sin(6a),  c = cos(6a)
// with the tag on slot 2, and H_C(0)/H_S(0) the sums of the three words.
// Coefficients are rounded to FB fraction bits and the word is the exact
// difference of products shifted right by FB, as the stage specifies.
// Frames are offered back to back (checking the one-frame-per-M-clocks
// acceptance) and with gaps; the coefficient period is checked throughout.
module tb_gdht_preproc;
  localparam int N = 7, G = 3, XW = 16, CW = 16, FB = 14;
  localparam int M = 3, DW = XW + CW - FB + 1, SW = DW + 2;
  localparam real PI = 3.14159265358979323846;

  // worked example: sample indices and angles in units of pi/7
  localparam int XA [M] = '{6, 4, 2};
  localparam int XB [M] = '{1, 3, 5};
  localparam int AA [M] = '{6, 4, 2};     // 3a, 2a, a
  localparam int AB [M] = '{8, 10, 12};   // 4a, 5a, 6a
  localparam int AC [M] = '{8, 4, 12};    // c(4a), c(2a), c(6a)

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [XW-1:0] x_i [N];
  logic signed [DW-1:0] xe1_o, xe2_o;
  logic signed [CW-1:0] c_o;
  logic tc_o;
  logic signed [XW-1:0] x0_o;
  logic signed [SW-1:0] hc0_o, hs0_o;

  gdht_preproc #(.N(N), .G(G), .XW(XW), .CW(CW), .FB(FB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic longint q(real v);
    return longint'(v * real'(1 << FB));
  endfunction

  // expected values: M words per channel, then x0, hc0, hs0
  longint eq1 [$], eq2 [$], ex0 [$], ehc [$], ehs [$];
  longint h1 [M], h2 [M], hc [M];      // output history, newest last
  int n_out = 0, n_stall = 0, n_acc = 0, last_acc = -1, n_b2b_ok = 0;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d (cycle %0d)", what, got, exp, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < M - 1; s++) begin
        h1[s] = h1[s+1]; h2[s] = h2[s+1]; hc[s] = hc[s+1];
      end
      h1[M-1] = xe1_o; h2[M-1] = xe2_o; hc[M-1] = c_o;
      if (tc_o) begin
        longint s1, s2;
        s1 = 0; s2 = 0;
        for (int s = 0; s < M; s++) begin
          chk("xe1", h1[s], eq1.pop_front());
          chk("xe2", h2[s], eq2.pop_front());
          chk("c", hc[s], q($cos(PI * AC[s] / N)));
          s1 += h1[s]; s2 += h2[s];
        end
        chk("x0", x0_o, ex0.pop_front());
        chk("hc0", hc0_o, s1);
        chk("hs0", hs0_o, s2);
        n_out++;
      end
    end
  end

  task automatic offer(input bit fast);
    longint xs [N];
    for (int i = 0; i < N; i++) begin
      xs[i] = longint'($signed(XW'($urandom)));
      x_i[i] = XW'(xs[i]);
    end
    if (fast && $urandom_range(3) == 0) for (int i = 0; i < N; i++) begin
      xs[i] = (i % 2) ? -32768 : 32767; x_i[i] = XW'(xs[i]);
    end
    for (int s = 0; s < M; s++) begin
      eq1.push_back((xs[XA[s]] * q($cos(PI * AA[s] / N)) - xs[XB[s]] * q($cos(PI * AB[s] / N))) >>> FB);
      eq2.push_back((xs[XA[s]] * q($sin(PI * AA[s] / N)) - xs[XB[s]] * q($sin(PI * AB[s] / N))) >>> FB);
    end
    ex0.push_back(xs[0]);
    in_valid = 1'b1;
    @(posedge clk);
    while (!in_ready) begin n_stall++; @(posedge clk); end
    if (fast && last_acc >= 0) begin
      checks++;
      if (cycle - last_acc != M) begin
        failures++;
        $display("FAIL: back-to-back acceptance %0d clocks apart, expected %0d", cycle - last_acc, M);
      end else n_b2b_ok++;
    end
    last_acc = cycle;
    n_acc++;
    #1 in_valid = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < N; i++) x_i[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    for (int f = 0; f < 20; f++) offer(f > 1);   // back to back (steady from the third)
    last_acc = -1;
    for (int f = 0; f < 30; f++) begin             // with gaps
      offer(1'b0);
      repeat ($urandom_range(8)) @(posedge clk);
      #1;
    end
    repeat (4 * M) @(posedge clk);
    chk("frames out", n_out, n_acc);
    checks++;
    if (n_stall == 0 || n_b2b_ok == 0) begin
      failures++;
      $display("FAIL: back-pressure (%0d) or back-to-back rate (%0d) never seen", n_stall, n_b2b_ok);
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
