// tb_gdht_recur: self-checking test of the recursion and output stage at
// N = 7. Random T_C(k), T_S(k) (k = 1..3), x(0), H_C(0), H_S(0) are streamed
// in; the expected frame is worked out here, in 64-bit integers, from
//   H_C(k) = 2 T_C(k) - H_C(k-1),  H_S(k) = 2 T_S(k) + H_S(k-1),
//   Y(k) = x0 + H_C(k) + H_S(k) (k = 0..3),
//   Y(7-k) = x0 + H_C(k-1) - H_S(k-1) (k = 1..3),
// with x0 and H(0) scaled by 2^FB and each Y rounded (add 2^(FB-1), shift
// right by FB). out_valid must rise one clock after the last step.
module tb_gdht_recur;
  localparam int N = 7, XW = 16, TW = 38, SW = 21, FB = 14;
  localparam int M = 3, OW = XW + 3 + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic i_valid = 1'b0, i_first = 1'b0, i_last = 1'b0;
  logic signed [TW-1:0] tcv_i, tsv_i;
  logic signed [XW-1:0] x0_i;
  logic signed [SW-1:0] hc0_i, hs0_i;
  logic out_valid;
  logic signed [OW-1:0] y_o [N];

  gdht_recur #(.N(N), .XW(XW), .TW(TW), .SW(SW), .FB(FB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0;
  longint eq [$];

  function automatic longint rnd(longint v);
    return (v + (longint'(1) << (FB - 1))) >>> FB;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      for (int k = 0; k < N; k++) begin
        longint e;
        e = eq.pop_front();
        checks++;
        if (longint'(y_o[k]) != e) begin
          failures++;
          $display("FAIL: frame %0d Y(%0d) = %0d, expected %0d", n_out, k, y_o[k], e);
        end
      end
      n_out++;
    end
  end

  initial begin
    longint tc [M+1], ts [M+1], hc [M+1], hs [M+1], x0, y [N];
    int gap;
    tcv_i = '0; tsv_i = '0; x0_i = '0; hc0_i = '0; hs0_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 50; f++) begin
      // values in the range the full design produces
      x0 = longint'($signed(XW'($urandom)));
      hc[0] = longint'($urandom_range(200000)) - 100000;
      hs[0] = longint'($urandom_range(200000)) - 100000;
      for (int k = 1; k <= M; k++) begin
        tc[k] = (longint'($urandom_range(100000)) - 50000) * (1 << FB) + $urandom_range(16383);
        ts[k] = (longint'($urandom_range(100000)) - 50000) * (1 << FB) + $urandom_range(16383);
      end
      hc[0] = hc[0] << FB; hs[0] = hs[0] << FB;
      for (int k = 1; k <= M; k++) begin
        hc[k] = 2 * tc[k] - hc[k-1];
        hs[k] = 2 * ts[k] + hs[k-1];
      end
      for (int k = 0; k <= M; k++) y[k] = rnd((x0 << FB) + hc[k] + hs[k]);
      for (int k = 1; k <= M; k++) y[N-k] = rnd((x0 << FB) + hc[k-1] - hs[k-1]);
      for (int k = 0; k < N; k++) eq.push_back(y[k]);
      x0_i = XW'(x0); hc0_i = SW'(hc[0] >>> FB); hs0_i = SW'(hs[0] >>> FB);
      for (int k = 1; k <= M; k++) begin
        i_valid = 1'b1; i_first = (k == 1); i_last = (k == M);
        tcv_i = TW'(tc[k]); tsv_i = TW'(ts[k]);
        @(posedge clk);
        #1;
        checks++;
        if (out_valid != (k == M)) begin
          failures++;
          $display("FAIL: frame %0d step %0d: out_valid = %0b", f, k, out_valid);
        end
      end
      i_valid = 1'b0; i_first = 1'b0; i_last = 1'b0;
      gap = $urandom_range(2);
      repeat (gap) @(posedge clk);
      #1;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != 50) begin failures++; $display("FAIL: %0d frames out", n_out); end
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
