// gdht_recur: recursion and output stage of the post-processing.
//
// It receives, in natural order k = 1..M, the correlation results T_C(k) and
// T_S(k) of a frame together with x(0) and the start values H_C(0), H_S(0),
// and builds the auxiliary sequences with one add/subtract unit and one
// register ("latch") per sequence:
//     H_C(k) = 2*T_C(k) - H_C(k-1)        H_S(k) = 2*T_S(k) + H_S(k-1)
// Two further add/subtract units form the transform outputs of step k:
//     Y(k)   = x(0) + H_C(k)   + H_S(k)
//     Y(N-k) = x(0) + H_C(k-1) - H_S(k-1)
// and on the first step also Y(0) = x(0) + H_C(0) + H_S(0).
//
// Scaling: T_C/T_S carry FB fraction bits (they are sums of word*coefficient
// products); x(0), H_C(0), H_S(0) are integers and are aligned by a left
// shift of FB. The outputs are rounded to integers (add 2^(FB-1), shift
// right by FB). The whole frame Y(0..N-1) is presented on y_o with a one
// clock out_valid pulse the clock after the step k = M; y_o holds until the
// next frame completes. Precision, rounding and the parallel output frame
// are this design's choices.
module gdht_recur #(
  parameter int N  = 7,
  parameter int XW = 16,
  parameter int TW = 38,
  parameter int SW = 21,
  parameter int FB = 14,
  localparam int M  = (N - 1) / 2,
  localparam int HW = TW + 2,                 // width of H_C / H_S
  localparam int OW = XW + $clog2(N) + 2      // output sample width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 i_valid,
  input  logic                 i_first,
  input  logic                 i_last,
  input  logic signed [TW-1:0] tcv_i,
  input  logic signed [TW-1:0] tsv_i,
  input  logic signed [XW-1:0] x0_i,
  input  logic signed [SW-1:0] hc0_i,
  input  logic signed [SW-1:0] hs0_i,
  output logic                 out_valid,
  output logic signed [OW-1:0] y_o [N]
);

  localparam int KW = $clog2(M + 1);

  logic signed [HW-1:0] hc_q, hs_q;         // the latches
  logic [KW-1:0]        k_q;                // index of the previous step
  logic signed [OW-1:0] ywork [N];

  logic signed [HW-1:0] hc_prev, hs_prev, hc_new, hs_new, x0s;
  logic [KW-1:0]        k;
  logic signed [OW-1:0] y_k, y_nk, y_0;

  function automatic logic signed [OW-1:0] round_out(logic signed [HW-1:0] v);
    return OW'((v + (HW'(1) <<< (FB - 1))) >>> FB);
  endfunction

  always_comb begin
    x0s     = HW'(x0_i) <<< FB;
    hc_prev = i_first ? (HW'(hc0_i) <<< FB) : hc_q;
    hs_prev = i_first ? (HW'(hs0_i) <<< FB) : hs_q;
    k       = i_first ? KW'(1) : k_q + 1'b1;
    hc_new  = (HW'(tcv_i) <<< 1) - hc_prev;
    hs_new  = (HW'(tsv_i) <<< 1) + hs_prev;
    y_k     = round_out(x0s + hc_new + hs_new);
    y_nk    = round_out(x0s + hc_prev - hs_prev);
    y_0     = round_out(x0s + hc_prev + hs_prev);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hc_q      <= '0;
      hs_q      <= '0;
      k_q       <= '0;
      ywork     <= '{default: '0};
      y_o       <= '{default: '0};
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (i_valid) begin
        hc_q <= hc_new;
        hs_q <= hs_new;
        k_q  <= k;
        for (int n = 0; n < N; n++) begin
          if (i_first && n == 0)      ywork[n] <= y_0;
          else if (n == int'(k))      ywork[n] <= y_k;
          else if (n == N - int'(k))  ywork[n] <= y_nk;
        end
        if (i_last) begin
          out_valid <= 1'b1;
          for (int n = 0; n < N; n++) begin
            if (i_first && n == 0)     y_o[n] <= y_0;
            else if (n == int'(k))     y_o[n] <= y_k;
            else if (n == N - int'(k)) y_o[n] <= y_nk;
            else                       y_o[n] <= ywork[n];
          end
        end
      end
    end
  end

endmodule
