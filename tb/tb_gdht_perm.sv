// tb_gdht_perm: self-checking test of the output permutation at N = 7,
// G = 3. The systolic array delivers T(3), T(2), T(1) in that order (the row
// order of the worked example); the block must hand them on as T(1), T(2),
// T(3), on M consecutive clocks with first/last flags, together with the
// frame's side values. Frames arrive back to back (both banks in use at
// once) and with random gaps.
module tb_gdht_perm;
  localparam int N = 7, G = 3, TW = 38, XW = 16, SW = 21;
  localparam int M = 3;
  localparam int ARRIVAL [M] = '{3, 2, 1};   // k of the j-th result from the array

  logic clk = 1'b0, rst_n = 1'b0;
  logic t_first_i = 1'b0;
  logic signed [TW-1:0] tc_i, ts_i, tcv_o, tsv_o;
  logic signed [XW-1:0] x0_i, x0_o;
  logic signed [SW-1:0] hc0_i, hs0_i, hc0_o, hs0_o;
  logic o_valid, o_first, o_last;

  gdht_perm #(.N(N), .G(G), .TW(TW), .XW(XW), .SW(SW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint expc [$], exps [$], ex0 [$], ehc [$], ehs [$];
  int kpos = 0, n_frames_in = 0, n_frames_out = 0, n_b2b = 0;

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && o_valid) begin
      chk("o_first", o_first, kpos == 0);
      chk("o_last", o_last, kpos == M - 1);
      chk("tcv", tcv_o, expc.pop_front());
      chk("tsv", tsv_o, exps.pop_front());
      chk("x0", x0_o, ex0[0]);
      chk("hc0", hc0_o, ehc[0]);
      chk("hs0", hs0_o, ehs[0]);
      if (kpos == M - 1) begin
        void'(ex0.pop_front()); void'(ehc.pop_front()); void'(ehs.pop_front());
        kpos = 0;
        n_frames_out++;
      end else kpos++;
    end else if (rst_n && kpos != 0) begin
      failures++; checks++;
      $display("FAIL: output stream of a frame interrupted");
      kpos = 0;
    end
  end

  initial begin
    longint tcs [M+1], tss [M+1];
    tc_i = '0; ts_i = '0; x0_i = '0; hc0_i = '0; hs0_i = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 60; f++) begin
      for (int k = 1; k <= M; k++) begin
        tcs[k] = longint'($signed(TW'({$urandom, $urandom})));
        tss[k] = longint'($signed(TW'({$urandom, $urandom})));
        expc.push_back(tcs[k]);
        exps.push_back(tss[k]);
      end
      x0_i = XW'($urandom); hc0_i = SW'($urandom); hs0_i = SW'($urandom);
      ex0.push_back(x0_i); ehc.push_back(hc0_i); ehs.push_back(hs0_i);
      for (int j = 0; j < M; j++) begin
        t_first_i = (j == 0);
        tc_i = TW'(tcs[ARRIVAL[j]]);
        ts_i = TW'(tss[ARRIVAL[j]]);
        @(posedge clk);
        #1;
        if (j == 0) begin x0_i = XW'($urandom); hc0_i = SW'($urandom); hs0_i = SW'($urandom); end
      end
      t_first_i = 1'b0;
      tc_i = TW'($urandom); ts_i = TW'($urandom);
      n_frames_in++;
      if (f > 20 && $urandom_range(1) == 0) begin
        repeat ($urandom_range(7, 1)) @(posedge clk);
        #1;
      end else n_b2b++;
    end
    repeat (3 * M) @(posedge clk);
    chk("frames out", n_frames_out, n_frames_in);
    checks++;
    if (n_b2b == 0) begin failures++; $display("FAIL: no back-to-back frames"); end
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
