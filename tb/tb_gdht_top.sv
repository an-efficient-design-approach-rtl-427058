// tb_gdht_top: end-to-end test of the GDHT array at its default size
// (N = 7, G = 3). Random and extreme input frames are streamed in, partly
// back to back (one frame every M clocks, with in_ready back-pressure) and
// partly with idle gaps. Every output frame is compared with the type-III
// GDHT evaluated directly from its definition in floating point,
//     Y(k) = sum_i x(i) * (cos((2k+1)*i*pi/N) + sin((2k+1)*i*pi/N)),
// within a tolerance for the fixed-point coefficients. It also checks the
// throughput (results one frame per M clocks during a burst) and counts how
// often each mechanism occurred: back-pressure, back-to-back frames, gaps,
// use of both permutation banks.
module tb_gdht_top;
  localparam int N  = 7;
  localparam int XW = 16;
  localparam int M  = (N - 1) / 2;
  localparam int OW = XW + $clog2(N) + 2;
  localparam int NFRAMES = 60;
  localparam real TOL = 24.0;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid;
  logic signed [XW-1:0] x_i [N];
  logic signed [OW-1:0] y_o [N];

  gdht_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef real frame_r_t [N];
  typedef int  frame_i_t [N];

  // frames sent, waiting for their results
  real expq [$];   // N values per frame
  int  n_backpressure = 0, n_back_to_back = 0, n_gap = 0, n_bank1 = 0;
  int  accept_cycle = 0;
  int  n_out = 0, last_out_cycle = -1, n_rate_ok = 0;
  real max_err = 0.0;

  function automatic frame_r_t gdht_ref(frame_i_t xs);
    frame_r_t y;
    real pi, th, acc;
    pi = 3.14159265358979323846;
    for (int k = 0; k < N; k++) begin
      acc = 0.0;
      for (int i = 0; i < N; i++) begin
        th = real'((2 * k + 1) * i) * pi / real'(N);
        acc = acc + real'(xs[i]) * ($cos(th) + $sin(th));
      end
      y[k] = acc;
    end
    return y;
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      frame_r_t e;
      real err;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output frame at cycle %0d", cycle);
      end else begin
        for (int k = 0; k < N; k++) e[k] = expq.pop_front();
        for (int k = 0; k < N; k++) begin
          err = real'(y_o[k]) - e[k];
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > TOL) begin
            failures++;
            $display("FAIL: frame %0d Y(%0d) = %0d, expected %f", n_out, k, y_o[k], e[k]);
          end
        end
      end
      if (n_out % 2 == 1) n_bank1++;
      n_out++;
      last_out_cycle = cycle;
    end
  end

  // throughput during the back-to-back burst: consecutive results M apart
  int burst_prev = -1;
  bit in_burst = 1'b0;
  always @(posedge clk) begin
    if (rst_n && out_valid && in_burst) begin
      if (burst_prev >= 0) begin
        checks++;
        if (cycle - burst_prev != M) begin
          failures++;
          $display("FAIL: result spacing %0d clocks in a burst, expected %0d",
                   cycle - burst_prev, M);
        end else n_rate_ok++;
      end
      burst_prev = cycle;
    end
  end

  task automatic send(input frame_i_t xs, input bit back_to_back);
    frame_r_t y;
    int waited = 0;
    for (int i = 0; i < N; i++) x_i[i] = XW'(xs[i]);
    in_valid = 1'b1;
    @(posedge clk);
    while (!in_ready) begin
      waited++;
      @(posedge clk);
    end
    #1;
    in_valid = 1'b0;
    accept_cycle = cycle;
    if (waited > 0) n_backpressure++;
    if (back_to_back) n_back_to_back++;
    y = gdht_ref(xs);
    for (int k = 0; k < N; k++) expq.push_back(y[k]);
  endtask

  initial begin
    frame_i_t xs;
    int latency;
    for (int i = 0; i < N; i++) x_i[i] = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (3) @(posedge clk);
    #1;

    // single frame: measure the latency
    for (int i = 0; i < N; i++) xs[i] = (i == 0) ? 1000 : 0;
    xs[3] = -2000;
    send(xs, 1'b0);
    wait (n_out == 1);
    // clocks from the accepting edge to the edge that raises out_valid
    latency = last_out_cycle - accept_cycle;
    checks++;
    if (latency < 4 * M || latency > 5 * M - 1) begin
      failures++;
      $display("FAIL: latency %0d outside %0d..%0d", latency, 4 * M, 5 * M - 1);
    end
    repeat (5) @(posedge clk);
    #1;

    // extreme frames
    for (int i = 0; i < N; i++) xs[i] = 32767;
    send(xs, 1'b0);
    for (int i = 0; i < N; i++) xs[i] = -32768;
    send(xs, 1'b1);
    for (int i = 0; i < N; i++) xs[i] = (i % 2) ? 32767 : -32768;
    send(xs, 1'b1);
    wait (n_out == 4);
    repeat (3) @(posedge clk);
    #1;

    // back-to-back burst
    in_burst = 1'b1;
    for (int f = 0; f < 20; f++) begin
      for (int i = 0; i < N; i++) xs[i] = $signed($urandom_range(65535)) - 32768;
      send(xs, f > 0);
    end
    wait (expq.size() == 0);
    repeat (2) @(posedge clk);
    in_burst = 1'b0;
    #1;

    // frames with random gaps
    for (int f = 0; f < NFRAMES - 24; f++) begin
      for (int i = 0; i < N; i++) xs[i] = $signed($urandom_range(65535)) - 32768;
      send(xs, 1'b0);
      if ($urandom_range(1)) begin
        n_gap++;
        repeat ($urandom_range(3 * M, 1)) @(posedge clk);
        #1;
      end
    end
    wait (expq.size() == 0);
    repeat (10) @(posedge clk);

    // every mechanism must have occurred
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL: no back-pressure"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL: no back-to-back frame"); end
    checks++; if (n_gap == 0)          begin failures++; $display("FAIL: no idle gap"); end
    checks++; if (n_bank1 == 0)        begin failures++; $display("FAIL: second bank unused"); end
    checks++; if (n_rate_ok == 0)      begin failures++; $display("FAIL: rate never checked"); end
    checks++; if (n_out != NFRAMES)    begin failures++; $display("FAIL: %0d frames out", n_out); end
    $display("latency %0d clocks, max error %f, backpressure %0d, back-to-back %0d, gaps %0d, bank-1 frames %0d, rate checks %0d",
             latency, max_err, n_backpressure, n_back_to_back, n_gap, n_bank1, n_rate_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
