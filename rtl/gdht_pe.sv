// gdht_pe: processing element of the linear systolic array.
//
// One PE serves the cosine correlation and the sine correlation at once (the
// hardware sharing that merges the two equal-length correlations into one
// array): both channels share the coefficient c and the tag tc, and each has
// its own data word xe1/xe2, partial sum y1/y2 and stationary operand xi1/xi2.
//
//   tc = 1 : xi1 <= xe1, xi2 <= xe2 (capture the operand this PE keeps)
//            y1o = y1i + xe1*c,  y2o = y2i + xe2*c
//   tc = 0 : xi1, xi2 hold
//            y1o = y1i + xi1*c,  y2o = y2i + xi2*c
//   xe1, xe2, c and tc are passed on unchanged.
//
// This follows the PE of the published array. As there, the PE itself is
// combinational apart from the two stationary registers xi1/xi2 (the
// feedback loops of the PE); the delays between PEs belong to the array
// (gdht_array). Timing: outputs respond combinationally; xi1/xi2 load on the
// rising clk edge of a cycle with tc = 1. Reset (active low, synchronous)
// clears xi1/xi2, which the published PE leaves unspecified.
module gdht_pe #(
  parameter int DW = 19,   // width of the data words xe1/xe2/xi1/xi2
  parameter int CW = 16,   // width of the coefficient c
  parameter int YW = 38    // width of the partial sums y1/y2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [DW-1:0] xe1_i,
  input  logic signed [DW-1:0] xe2_i,
  input  logic signed [CW-1:0] c_i,
  input  logic signed [YW-1:0] y1_i,
  input  logic signed [YW-1:0] y2_i,
  input  logic                 tc_i,
  output logic signed [DW-1:0] xe1_o,
  output logic signed [DW-1:0] xe2_o,
  output logic signed [CW-1:0] c_o,
  output logic signed [YW-1:0] y1_o,
  output logic signed [YW-1:0] y2_o,
  output logic                 tc_o
);

  logic signed [DW-1:0] xi1, xi2;      // stationary operands
  logic signed [DW-1:0] op1, op2;      // operand used this cycle
  logic signed [DW+CW-1:0] p1, p2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xi1 <= '0;
      xi2 <= '0;
    end else if (tc_i) begin
      xi1 <= xe1_i;
      xi2 <= xe2_i;
    end
  end

  always_comb begin
    op1  = tc_i ? xe1_i : xi1;
    op2  = tc_i ? xe2_i : xi2;
    p1   = op1 * c_i;
    p2   = op2 * c_i;
    y1_o = y1_i + YW'(p1);
    y2_o = y2_i + YW'(p2);
  end

  assign xe1_o = xe1_i;
  assign xe2_o = xe2_i;
  assign c_o   = c_i;
  assign tc_o  = tc_i;

endmodule
