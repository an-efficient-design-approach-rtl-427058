// gdht_top: prime-length type-III generalized discrete Hartley transform,
//     Y(k) = sum_{i=0..N-1} x(i) * cas((2k+1)*i*pi/N),  cas = cos + sin,
// computed on one linear systolic array of (N-1)/2 PEs.
//
// The transform is split into two half-length circular correlations of the
// same length and form (a cosine one, T_C, and a sine one, T_S) that share
// one array, plus a short recursion:
//   gdht_preproc  reorders the frame with the primitive-root index map,
//                 weights it with cos/sin and forms the word pairs,
//   gdht_array    the systolic array (PE chain) computing T_C and T_S,
//   gdht_perm     puts the results back into natural order (ping-pong),
//   gdht_recur    builds H_C(k), H_S(k) recursively and forms Y(0..N-1).
// x(0) and the recursion start values leave the pre-processing together
// with the frame's tag and are delayed by the array's latency (M-1 clocks)
// to meet the first result of their frame.
//
// Interface: a frame x_i[0..N-1] is taken when in_valid and in_ready are
// both high; a result frame y_o[0..N-1] appears with a one-clock out_valid
// pulse. One frame is accepted every M = (N-1)/2 clocks, and results leave
// at the same rate. From the clock edge that accepts a frame to the edge
// that raises its out_valid there are 4M to 5M-1 clocks, depending on the
// phase of the pre-processing slot counter. Synchronous active-low reset.
//
// The split of the work, the array and its tag control follow the published
// design for N = 7, G = 3; word lengths (16-bit samples, 16-bit coefficients
// with 14 fraction bits), the frame interface and the buffering are this
// design's choices.
module gdht_top #(
  parameter int N  = 7,      // transform length, an odd prime
  parameter int G  = 3,      // a primitive root modulo N
  parameter int XW = 16,     // input sample width
  parameter int CW = 16,     // coefficient width
  parameter int FB = 14,     // coefficient fraction bits
  localparam int M  = (N - 1) / 2,
  localparam int DW = XW + CW - FB + 1,
  localparam int SW = DW + $clog2(M + 1),
  localparam int YW = DW + CW + $clog2(M + 1) + 1,
  localparam int OW = XW + $clog2(N) + 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] x_i [N],
  output logic                 out_valid,
  output logic signed [OW-1:0] y_o [N]
);

  if (!gdht_pkg::valid_length(N, G)) begin : g_bad_length
    $error("gdht_top: N must be an odd prime and G a primitive root modulo N");
  end

  // pre-processing -> array
  logic signed [DW-1:0] xe1, xe2;
  logic signed [CW-1:0] coef;
  logic                 tag;
  logic signed [XW-1:0] x0;
  logic signed [SW-1:0] hc0, hs0;

  gdht_preproc #(.N(N), .G(G), .XW(XW), .CW(CW), .FB(FB)) u_pre (
    .clk, .rst_n, .in_valid, .in_ready, .x_i,
    .xe1_o (xe1), .xe2_o (xe2), .c_o (coef), .tc_o (tag),
    .x0_o (x0), .hc0_o (hc0), .hs0_o (hs0)
  );

  // array
  logic signed [YW-1:0] t_c, t_s;
  logic                 t_first;

  gdht_array #(.M(M), .DW(DW), .CW(CW), .YW(YW)) u_array (
    .clk, .rst_n,
    .xe1_i (xe1), .xe2_i (xe2), .c_i (coef), .tc_i (tag),
    .y1_o (t_c), .y2_o (t_s), .tc_o (t_first)
  );

  // side values: delay by the array latency (M-1 clocks)
  logic signed [XW-1:0] x0_d;
  logic signed [SW-1:0] hc0_d, hs0_d;

  if (M > 1) begin : g_side_delay
    logic signed [XW-1:0] x0_sr  [M-1];
    logic signed [SW-1:0] hc0_sr [M-1], hs0_sr [M-1];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        x0_sr  <= '{default: '0};
        hc0_sr <= '{default: '0};
        hs0_sr <= '{default: '0};
      end else begin
        x0_sr[0]  <= x0;
        hc0_sr[0] <= hc0;
        hs0_sr[0] <= hs0;
        for (int i = 1; i < M - 1; i++) begin
          x0_sr[i]  <= x0_sr[i-1];
          hc0_sr[i] <= hc0_sr[i-1];
          hs0_sr[i] <= hs0_sr[i-1];
        end
      end
    end
    assign x0_d  = x0_sr[M-2];
    assign hc0_d = hc0_sr[M-2];
    assign hs0_d = hs0_sr[M-2];
  end else begin : g_side_direct
    assign x0_d  = x0;
    assign hc0_d = hc0;
    assign hs0_d = hs0;
  end

  // permutation
  logic                 p_valid, p_first, p_last;
  logic signed [YW-1:0] p_tc, p_ts;
  logic signed [XW-1:0] p_x0;
  logic signed [SW-1:0] p_hc0, p_hs0;

  gdht_perm #(.N(N), .G(G), .TW(YW), .XW(XW), .SW(SW)) u_perm (
    .clk, .rst_n,
    .t_first_i (t_first), .tc_i (t_c), .ts_i (t_s),
    .x0_i (x0_d), .hc0_i (hc0_d), .hs0_i (hs0_d),
    .o_valid (p_valid), .o_first (p_first), .o_last (p_last),
    .tcv_o (p_tc), .tsv_o (p_ts), .x0_o (p_x0), .hc0_o (p_hc0), .hs0_o (p_hs0)
  );

  // recursion and output
  gdht_recur #(.N(N), .XW(XW), .TW(YW), .SW(SW), .FB(FB)) u_recur (
    .clk, .rst_n,
    .i_valid (p_valid), .i_first (p_first), .i_last (p_last),
    .tcv_i (p_tc), .tsv_i (p_ts), .x0_i (p_x0), .hc0_i (p_hc0), .hs0_i (p_hs0),
    .out_valid, .y_o
  );

endmodule
