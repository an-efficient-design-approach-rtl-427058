// gdht_array: linear systolic array of M = (N-1)/2 processing elements that
// computes the cosine and the sine half-length circular correlations of the
// GDHT at the same time.
//
// Data words (xe1 = cosine channel, xe2 = sine channel) and the coefficient c
// enter at PE1 and move one PE every two clocks: each link carries two
// register stages for xe1, xe2 and c. The partial sums y1, y2 and the tag tc
// move one PE per clock: one register stage per link. The partial sums
// entering PE1 are zero. Because the tag moves twice as fast as the data, a
// single tc = 1 placed on the last word of a frame meets a different word at
// every PE: PE1 keeps word M, PE2 word M-1, ..., PEM word 1. That is the
// tag control of the array; no other control signal exists.
//
// With a periodic coefficient stream cs[0..M-1] fed at frame slots 0..M-1 and
// the tag on slot M-1 of a frame entering PE1 at cycle t0, the outputs of PEM
// at cycle t0 + (M-1) + j (j = 0..M-1) are
//     y1 = sum_{i=1..M} u1(i) * cs[(i + j - 1) mod M]     (and y2 from u2)
// where u(i) is the word fed at slot i-1: a circular correlation. tc_o is
// high together with the j = 0 result and marks the start of each result
// frame. Frames may follow each other back to back (one every M clocks) or
// with gaps, as long as the coefficient stream keeps its period.
//
// The structure (link delays 2/2/2 on xe1, xe2, c and 1/1/1 on y1, y2, tc,
// zero partial sums at PE1, results at the far end) follows the published
// array. Outputs are combinational from the last PE; the stage behind the
// array registers them. Reset (active low, synchronous) clears all link
// registers.
module gdht_array #(
  parameter int M  = 3,    // number of PEs, (N-1)/2
  parameter int DW = 19,
  parameter int CW = 16,
  parameter int YW = 38
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] xe1_i,   // cosine-channel word
  input  logic signed [DW-1:0] xe2_i,   // sine-channel word
  input  logic signed [CW-1:0] c_i,     // coefficient
  input  logic                 tc_i,    // tag: last word of a frame
  output logic signed [YW-1:0] y1_o,    // cosine correlation result (T_C)
  output logic signed [YW-1:0] y2_o,    // sine correlation result (T_S)
  output logic                 tc_o     // first result of a frame
);

  // Signals at the input (suffix _i) and output (suffix _o) of each PE.
  logic signed [DW-1:0] pe_xe1_i [M], pe_xe2_i [M], pe_xe1_o [M], pe_xe2_o [M];
  logic signed [CW-1:0] pe_c_i   [M], pe_c_o   [M];
  logic signed [YW-1:0] pe_y1_i  [M], pe_y2_i  [M], pe_y1_o  [M], pe_y2_o  [M];
  logic                 pe_tc_i  [M], pe_tc_o  [M];

  assign pe_xe1_i[0] = xe1_i;
  assign pe_xe2_i[0] = xe2_i;
  assign pe_c_i[0]   = c_i;
  assign pe_tc_i[0]  = tc_i;
  assign pe_y1_i[0]  = '0;
  assign pe_y2_i[0]  = '0;

  for (genvar p = 0; p < M; p++) begin : g_pe
    gdht_pe #(.DW(DW), .CW(CW), .YW(YW)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .xe1_i (pe_xe1_i[p]), .xe2_i (pe_xe2_i[p]), .c_i (pe_c_i[p]),
      .y1_i  (pe_y1_i[p]),  .y2_i  (pe_y2_i[p]),  .tc_i (pe_tc_i[p]),
      .xe1_o (pe_xe1_o[p]), .xe2_o (pe_xe2_o[p]), .c_o (pe_c_o[p]),
      .y1_o  (pe_y1_o[p]),  .y2_o  (pe_y2_o[p]),  .tc_o (pe_tc_o[p])
    );
  end

  // Links PE(p) -> PE(p+1): two stages on data/coefficient, one on sums/tag.
  for (genvar p = 0; p < M - 1; p++) begin : g_link
    logic signed [DW-1:0] xe1_d [2], xe2_d [2];
    logic signed [CW-1:0] c_d   [2];
    logic signed [YW-1:0] y1_d, y2_d;
    logic                 tc_d;

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        xe1_d <= '{default: '0};
        xe2_d <= '{default: '0};
        c_d   <= '{default: '0};
        y1_d  <= '0;
        y2_d  <= '0;
        tc_d  <= 1'b0;
      end else begin
        xe1_d <= '{pe_xe1_o[p], xe1_d[0]};
        xe2_d <= '{pe_xe2_o[p], xe2_d[0]};
        c_d   <= '{pe_c_o[p],   c_d[0]};
        y1_d  <= pe_y1_o[p];
        y2_d  <= pe_y2_o[p];
        tc_d  <= pe_tc_o[p];
      end
    end

    assign pe_xe1_i[p+1] = xe1_d[1];
    assign pe_xe2_i[p+1] = xe2_d[1];
    assign pe_c_i[p+1]   = c_d[1];
    assign pe_y1_i[p+1]  = y1_d;
    assign pe_y2_i[p+1]  = y2_d;
    assign pe_tc_i[p+1]  = tc_d;
  end

  assign y1_o = pe_y1_o[M-1];
  assign y2_o = pe_y2_o[M-1];
  assign tc_o = pe_tc_o[M-1];

endmodule
