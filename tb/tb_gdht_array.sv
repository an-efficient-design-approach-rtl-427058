// tb_gdht_array: self-checking test of the systolic array (M = 3 PEs, the
// N = 7 configuration). A fixed random coefficient period cs[0..M-1] is fed
// continuously; frames of random words u1(1..M), u2(1..M) are fed with the
// tag on their last word, partly back to back and partly separated by idle
// periods that carry random garbage words and no tag. From the tag-marked
// output on, the M results of each frame must equal the circular correlation
//     y(j) = sum_{i=1..M} u(i) * cs[(i + j - 1) mod M],  j = 0..M-1,
// computed here directly. The first result must appear M-1 clocks after the
// tag entered PE1.
module tb_gdht_array;
  localparam int M = 3, DW = 19, CW = 16, YW = 38;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [DW-1:0] xe1_i, xe2_i;
  logic signed [CW-1:0] c_i;
  logic tc_i;
  logic signed [YW-1:0] y1_o, y2_o;
  logic tc_o;

  gdht_array #(.M(M), .DW(DW), .CW(CW), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  longint cs [M];
  longint expq1 [$], expq2 [$];      // M expected results per frame
  int     tagq [$];                  // cycle at which each frame's tag entered
  int     n_frames_out = 0, n_gaps = 0;
  int     remaining = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // checker: sample the combinational outputs just before each edge
  always @(posedge clk) begin
    if (rst_n) begin
      if (tc_o) begin
        checks++;
        if (remaining != 0) begin
          failures++;
          $display("FAIL: tag out while %0d results still due", remaining);
        end
        if (tagq.size() == 0) begin
          failures++;
          $display("FAIL: tag out with no frame in flight");
        end else begin
          int t0;
          t0 = tagq.pop_front();
          if (cycle - t0 != M - 1) begin
            failures++;
            $display("FAIL: first result %0d clocks after the tag, expected %0d", cycle - t0, M - 1);
          end
        end
        remaining = M;
        n_frames_out++;
      end
      if (remaining > 0) begin
        longint e1, e2;
        e1 = expq1.pop_front();
        e2 = expq2.pop_front();
        checks += 2;
        if (longint'(y1_o) != e1 || longint'(y2_o) != e2) begin
          failures++;
          $display("FAIL: result %0d: y1 %0d/%0d y2 %0d/%0d", M - remaining, y1_o, e1, y2_o, e2);
        end
        remaining--;
      end
    end
  end

  initial begin
    longint u1 [M], u2 [M];
    int nf = 0;
    xe1_i = '0; xe2_i = '0; c_i = '0; tc_i = 1'b0;
    for (int s = 0; s < M; s++) cs[s] = longint'($signed(CW'($urandom)));
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int period = 0; period < 60; period++) begin
      bit frame;
      frame = (period < 8) || ($urandom_range(2) != 0);
      if (frame) begin
        nf++;
        for (int i = 0; i < M; i++) begin
          u1[i] = longint'($signed(DW'($urandom)));
          u2[i] = longint'($signed(DW'($urandom)));
        end
        for (int j = 0; j < M; j++) begin
          longint a1, a2;
          a1 = 0; a2 = 0;
          for (int i = 1; i <= M; i++) begin
            a1 += u1[i-1] * cs[(i + j - 1) % M];
            a2 += u2[i-1] * cs[(i + j - 1) % M];
          end
          expq1.push_back(a1);
          expq2.push_back(a2);
        end
      end else n_gaps++;
      for (int s = 0; s < M; s++) begin
        c_i   = CW'(cs[s]);
        xe1_i = frame ? DW'(u1[s]) : DW'($urandom);
        xe2_i = frame ? DW'(u2[s]) : DW'($urandom);
        tc_i  = frame && (s == M - 1);
        if (tc_i) tagq.push_back(cycle);
        @(posedge clk);
        #1;
      end
    end
    // keep the coefficient period going while the last results drain
    for (int p = 0; p < 2; p++)
      for (int s = 0; s < M; s++) begin
        c_i = CW'(cs[s]); tc_i = 1'b0; xe1_i = DW'($urandom); xe2_i = DW'($urandom);
        @(posedge clk);
        #1;
      end
    checks++;
    if (n_frames_out != nf || expq1.size() != 0) begin
      failures++;
      $display("FAIL: %0d frames in, %0d out", nf, n_frames_out);
    end
    checks++;
    if (n_gaps == 0) begin failures++; $display("FAIL: no idle period"); end
    $display("frames %0d, idle periods %0d", nf, n_gaps);
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
