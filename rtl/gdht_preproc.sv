// gdht_preproc: pre-processing stage. It turns a frame of N input samples
// into the word stream that the systolic array expects.
//
// For slot s = 0..M-1 of a frame (i = s+1, M = (N-1)/2) it emits
//   xe1 = x(zeta(psi(i)))*cos(2*psi(i)*pi/N) - x(zeta(phib(i)))*cos(2*phib(i)*pi/N)
//   xe2 = x(zeta(psi(i)))*sin(2*psi(i)*pi/N) - x(zeta(phib(i)))*sin(2*phib(i)*pi/N)
// (the reordered and pre-weighted input of the two correlations), the
// coefficient cs[s] = cos(4*psi(((s+1) mod M)+1)*pi/N) and the tag tc = 1 on
// slot M-1. With N = 7, G = 3 this is the stream xc61/xs61, xc43/xs43,
// xc25/xs25 with c(4a), c(2a), c(6a) and tags 0, 0, 1. Together with the tag
// it hands on x(0) and the two start values of the recursion,
//   hc0 = sum of the xe1 words of the frame,  hs0 = sum of the xe2 words.
//
// Implementation: a slot counter runs modulo M from reset on, so the
// coefficient stream keeps its period even when no frame is present. A frame
// is accepted into a holding register (in_valid/in_ready handshake) and moves
// to the working register at the end of a period; it is then emitted during
// the next M slots; a new frame can enter the holding register on the same
// clock. Slots without a frame carry zero words and no tag. One frame can be
// accepted every M clocks. All outputs are registered (one
// clock from slot counter to output). Products are exact; each word is the
// difference of two products shifted right by FB (truncation). Word lengths,
// rounding, the handshake and the buffering are choices of this design.
module gdht_preproc
  import gdht_pkg::*;
#(
  parameter int N  = 7,                  // transform length (odd prime)
  parameter int G  = 3,                  // primitive root of N
  parameter int XW = 16,                 // input sample width
  parameter int CW = 16,                 // coefficient width
  parameter int FB = 14,                 // coefficient fraction bits
  localparam int M  = (N - 1) / 2,
  localparam int DW = XW + CW - FB + 1,  // word width
  localparam int SW = DW + $clog2(M + 1) // width of hc0/hs0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] x_i [N],
  output logic signed [DW-1:0] xe1_o,
  output logic signed [DW-1:0] xe2_o,
  output logic signed [CW-1:0] c_o,
  output logic                 tc_o,
  output logic signed [XW-1:0] x0_o,     // valid with tc_o
  output logic signed [SW-1:0] hc0_o,    // valid with tc_o
  output logic signed [SW-1:0] hs0_o     // valid with tc_o
);

  // ---- constant tables ---------------------------------------------------
  typedef int tab_t [M];

  function automatic tab_t idx_a();   // sample index of the psi member
    tab_t t;
    for (int s = 0; s < M; s++) t[s] = int'(zeta_map(psi_map(s + 1, N, G), N));
    return t;
  endfunction
  function automatic tab_t idx_b();   // sample index of the phi member
    tab_t t;
    for (int s = 0; s < M; s++) t[s] = int'(zeta_map(phib_map(s + 1, N, G), N));
    return t;
  endfunction
  function automatic tab_t wtab(bit use_sin, bit member_b);
    tab_t t;
    int unsigned j;
    for (int s = 0; s < M; s++) begin
      j = member_b ? phib_map(s + 1, N, G) : psi_map(s + 1, N, G);
      t[s] = use_sin ? sin_q(2 * j, N, FB) : cos_q(2 * j, N, FB);
    end
    return t;
  endfunction
  function automatic tab_t ctab();
    tab_t t;
    for (int s = 0; s < M; s++) t[s] = cos_q(4 * psi_map(((s + 1) % M) + 1, N, G), N, FB);
    return t;
  endfunction

  localparam tab_t IA  = idx_a();
  localparam tab_t IB  = idx_b();
  localparam tab_t CA  = wtab(1'b0, 1'b0);
  localparam tab_t CB  = wtab(1'b0, 1'b1);
  localparam tab_t SA  = wtab(1'b1, 1'b0);
  localparam tab_t SB  = wtab(1'b1, 1'b1);
  localparam tab_t CS  = ctab();

  // ---- frame buffering ---------------------------------------------------
  localparam int CNTW = (M > 1) ? $clog2(M) : 1;
  logic [CNTW-1:0] slot;
  logic            last_slot;
  logic signed [XW-1:0] hold [N];
  logic signed [XW-1:0] cur  [N];
  logic            hold_v, cur_v;

  assign last_slot = (slot == CNTW'(M - 1));
  assign in_ready  = !hold_v || last_slot;   // the holding register empties this clock

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      slot   <= '0;
      hold_v <= 1'b0;
      cur_v  <= 1'b0;
      hold   <= '{default: '0};
      cur    <= '{default: '0};
    end else begin
      slot <= last_slot ? '0 : slot + 1'b1;
      if (last_slot) begin
        cur    <= hold;
        cur_v  <= hold_v;
        hold_v <= 1'b0;
      end
      if (in_valid && in_ready) begin   // may refill the register just emptied
        hold   <= x_i;
        hold_v <= 1'b1;
      end
    end
  end

  // ---- weighting and pairing ---------------------------------------------
  logic signed [XW-1:0]    xa, xb;
  logic signed [CW-1:0]    ca, cb, sa, sb, cs;
  logic signed [XW+CW:0]   dc, ds;
  logic signed [DW-1:0]    uc, us;

  always_comb begin
    xa = '0; xb = '0; ca = '0; cb = '0; sa = '0; sb = '0; cs = '0;
    for (int s = 0; s < M; s++) begin
      if (slot == CNTW'(s)) begin
        xa = cur[IA[s]];
        xb = cur[IB[s]];
        ca = CW'(CA[s]);
        cb = CW'(CB[s]);
        sa = CW'(SA[s]);
        sb = CW'(SB[s]);
        cs = CW'(CS[s]);
      end
    end
    dc = (XW+CW+1)'(xa * ca) - (XW+CW+1)'(xb * cb);
    ds = (XW+CW+1)'(xa * sa) - (XW+CW+1)'(xb * sb);
    uc = cur_v ? DW'(dc >>> FB) : '0;
    us = cur_v ? DW'(ds >>> FB) : '0;
  end

  // ---- registered outputs and start values of the recursion -------------
  logic signed [SW-1:0] acc_c, acc_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xe1_o <= '0;
      xe2_o <= '0;
      c_o   <= '0;
      tc_o  <= 1'b0;
      x0_o  <= '0;
      acc_c <= '0;
      acc_s <= '0;
    end else begin
      xe1_o <= uc;
      xe2_o <= us;
      c_o   <= cs;
      tc_o  <= cur_v && last_slot;
      if (last_slot) x0_o <= cur[0];
      acc_c <= (slot == '0) ? SW'(uc) : acc_c + SW'(uc);
      acc_s <= (slot == '0) ? SW'(us) : acc_s + SW'(us);
    end
  end

  assign hc0_o = acc_c;
  assign hs0_o = acc_s;

endmodule
