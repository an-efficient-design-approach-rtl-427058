// gdht_top_harness: reusable stimulus and checker for gdht_top at a chosen
// transform length. It streams NFRAMES random frames (the first half back
// to back, the rest with random gaps) into a gdht_top #(N, G), compares
// every result with the type-III GDHT evaluated from its definition in
// floating point (tolerance TOL output LSBs), checks that results leave one
// frame per (N-1)/2 clocks during the back-to-back part, and reports its
// counts on done.
module gdht_top_harness #(
  parameter int  N       = 13,
  parameter int  G       = 2,
  parameter int  NFRAMES = 30,
  parameter real TOL     = 64.0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int XW = 16;
  localparam int M  = (N - 1) / 2;
  localparam int OW = XW + $clog2(N) + 2;

  typedef real frame_r_t [N];
  typedef int  frame_i_t [N];

  logic in_valid = 1'b0, in_ready, out_valid;
  logic signed [XW-1:0] x_i [N];
  logic signed [OW-1:0] y_o [N];

  gdht_top #(.N(N), .G(G)) dut (.*);

  int  cycle = 0, n_out = 0, prev_out = -1, n_rate = 0;
  bit  burst = 1'b0;
  real expq [$];
  real max_err = 0.0;

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
  end

  function automatic frame_r_t gdht_ref(frame_i_t xs);
    frame_r_t y;
    real th, acc;
    for (int k = 0; k < N; k++) begin
      acc = 0.0;
      for (int i = 0; i < N; i++) begin
        th = real'((2 * k + 1) * i) * 3.14159265358979323846 / real'(N);
        acc = acc + real'(xs[i]) * ($cos(th) + $sin(th));
      end
      y[k] = acc;
    end
    return y;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && out_valid) begin
      real e, err;
      for (int k = 0; k < N; k++) begin
        e = expq.pop_front();
        err = real'(y_o[k]) - e;
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL) begin
          failures++;
          $display("FAIL: N=%0d frame %0d Y(%0d) = %0d, expected %f", N, n_out, k, y_o[k], e);
        end
      end
      if (burst && prev_out >= 0) begin
        checks++;
        n_rate++;
        if (cycle - prev_out != M) begin
          failures++;
          $display("FAIL: N=%0d results %0d clocks apart, expected %0d", N, cycle - prev_out, M);
        end
      end
      prev_out = cycle;
      n_out++;
    end
  end

  initial begin
    frame_i_t xs;
    frame_r_t y;
    for (int i = 0; i < N; i++) x_i[i] = '0;
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    #1;
    for (int f = 0; f < NFRAMES; f++) begin
      for (int i = 0; i < N; i++) begin
        xs[i] = $signed($urandom_range(65535)) - 32768;
        x_i[i] = XW'(xs[i]);
      end
      y = gdht_ref(xs);
      for (int k = 0; k < N; k++) expq.push_back(y[k]);
      in_valid = 1'b1;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1 in_valid = 1'b0;
      if (f == 2) burst = 1'b1;          // steady back-to-back from here
      if (f >= NFRAMES / 2) begin
        if (burst) begin
          wait (expq.size() == 0);
          @(posedge clk);
          #1 burst = 1'b0;
        end
        repeat ($urandom_range(2 * M)) @(posedge clk);
        #1;
      end
    end
    wait (expq.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != NFRAMES || n_rate == 0) begin
      failures++;
      $display("FAIL: N=%0d: %0d frames out, %0d rate checks", N, n_out, n_rate);
    end
    $display("N=%0d G=%0d: %0d frames, max error %f", N, G, n_out, max_err);
    done = 1'b1;
  end
endmodule
