// gdht_perm: output permutation of the post-processing stage.
//
// The systolic array delivers the correlation results of a frame in the
// order T(psi(1)), T(psi(2)), ..., T(psi(M)), one pair (T_C, T_S) per clock,
// with the tag t_first_i high on the first. The recursion behind it needs
// them in natural order T(1), T(2), ..., T(M). This block writes result j of
// a frame to address psi(j+1)-1 of one of two banks and, once a bank is
// complete, reads it out in address order while the other bank fills
// (ping-pong), so frames may arrive back to back, one every M clocks.
// The side values of a frame (x(0) and the recursion start values hc0/hs0),
// presented together with t_first_i, travel with their bank.
//
// Output stream: o_valid for M consecutive clocks per frame, o_first on the
// first (k = 1) and o_last on the last (k = M); tcv/tsv = T_C(k)/T_S(k);
// the side values are held for the whole frame. Reading starts the clock
// after the bank's last write, so a frame leaves 1 clock after its last
// result entered and its first output appears M+1 clocks after t_first_i.
// The banks, the handshake-free streaming and this timing are this design's
// choice; the permutation itself is the index map of the transform.
module gdht_perm
  import gdht_pkg::*;
#(
  parameter int N  = 7,
  parameter int G  = 3,
  parameter int TW = 38,                 // width of T_C / T_S
  parameter int XW = 16,
  parameter int SW = 21,                 // width of hc0 / hs0
  localparam int M = (N - 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the array
  input  logic                 t_first_i,
  input  logic signed [TW-1:0] tc_i,
  input  logic signed [TW-1:0] ts_i,
  input  logic signed [XW-1:0] x0_i,
  input  logic signed [SW-1:0] hc0_i,
  input  logic signed [SW-1:0] hs0_i,
  // to the recursion
  output logic                 o_valid,
  output logic                 o_first,
  output logic                 o_last,
  output logic signed [TW-1:0] tcv_o,
  output logic signed [TW-1:0] tsv_o,
  output logic signed [XW-1:0] x0_o,
  output logic signed [SW-1:0] hc0_o,
  output logic signed [SW-1:0] hs0_o
);

  localparam int AW = (M > 1) ? $clog2(M) : 1;
  typedef logic [AW-1:0] addr_tab_t [M];

  function automatic addr_tab_t waddr_tab();
    addr_tab_t t;
    for (int j = 0; j < M; j++) t[j] = AW'(psi_map(j + 1, N, G) - 1);
    return t;
  endfunction
  localparam addr_tab_t WADDR = waddr_tab();

  logic signed [TW-1:0] mem_c [2][M];
  logic signed [TW-1:0] mem_s [2][M];
  logic signed [XW-1:0] side_x0  [2];
  logic signed [SW-1:0] side_hc0 [2], side_hs0 [2];
  logic [1:0]           full;

  // ---- write side ---------------------------------------------------------
  logic          wbank, wact;
  logic [AW-1:0] wcnt;          // index j of the result being written
  logic          wen;
  logic [AW-1:0] wj;
  logic [AW-1:0] wa;

  always_comb begin
    wen = t_first_i || wact;
    wj  = t_first_i ? '0 : wcnt;
    wa  = WADDR[0];
    for (int j = 0; j < M; j++) if (wj == AW'(j)) wa = WADDR[j];
  end

  // ---- read side ----------------------------------------------------------
  logic          rbank, ract;
  logic [AW-1:0] rcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank   <= 1'b0;
      wact    <= 1'b0;
      wcnt    <= '0;
      rbank   <= 1'b0;
      ract    <= 1'b0;
      rcnt    <= '0;
      full    <= '0;
      o_valid <= 1'b0;
      o_first <= 1'b0;
      o_last  <= 1'b0;
      tcv_o   <= '0;
      tsv_o   <= '0;
      x0_o    <= '0;
      hc0_o   <= '0;
      hs0_o   <= '0;
      side_x0  <= '{default: '0};
      side_hc0 <= '{default: '0};
      side_hs0 <= '{default: '0};
    end else begin
      // write
      if (wen) begin
        mem_c[wbank][wa] <= tc_i;
        mem_s[wbank][wa] <= ts_i;
        if (t_first_i) begin
          side_x0[wbank]  <= x0_i;
          side_hc0[wbank] <= hc0_i;
          side_hs0[wbank] <= hs0_i;
        end
        if (wj == AW'(M - 1)) begin
          wact        <= 1'b0;
          wcnt        <= '0;
          full[wbank] <= 1'b1;
          wbank       <= !wbank;
        end else begin
          wact <= 1'b1;
          wcnt <= wj + 1'b1;
        end
      end
      // read
      o_valid <= 1'b0;
      o_first <= 1'b0;
      o_last  <= 1'b0;
      if (ract || full[rbank]) begin
        o_valid <= 1'b1;
        o_first <= !ract;
        o_last  <= (rcnt == AW'(M - 1));
        tcv_o   <= mem_c[rbank][rcnt];
        tsv_o   <= mem_s[rbank][rcnt];
        x0_o    <= side_x0[rbank];
        hc0_o   <= side_hc0[rbank];
        hs0_o   <= side_hs0[rbank];
        if (rcnt == AW'(M - 1)) begin
          ract        <= 1'b0;
          rcnt        <= '0;
          full[rbank] <= 1'b0;
          rbank       <= !rbank;
        end else begin
          ract <= 1'b1;
          rcnt <= rcnt + 1'b1;
        end
      end
    end
  end

  // A new frame must not start while the previous one is still being
  // written, and must not overwrite a bank that has not been read out.
  always_ff @(posedge clk) begin
    if (rst_n && t_first_i) begin
      a_no_overlap: assert (!wact)
        else $error("gdht_perm: frame started while the previous one is still arriving");
      a_no_overrun: assert (!full[wbank])
        else $error("gdht_perm: frame arrived for a bank that has not been read out");
    end
  end

endmodule
