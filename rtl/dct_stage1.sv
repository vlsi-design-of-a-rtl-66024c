// dct_stage1: first half of the 8-point DCT data flow graph (combinational).
//
// Takes the eight input words ind[0..7] and computes the first three levels
// of adders/subtractors of the ISO/IEC 23002-2 forward DCT:
//   * the input butterflies  x0/x1 = ind0 +/- ind7, x4/x5 = ind1 +/- ind6,
//     x2/x3 = ind2 +/- ind5, x6/x7 = ind3 +/- ind4;
//   * the even butterflies xa/x6 = x0 +/- x6, xb/x2 = x4 +/- x2 and the
//     final even outputs x0 = xa + xb, x4 = xa - xb;
//   * the PMUL_1 products of x3 and x5 and the PMUL_2 products of x1 and
//     x7 (the rotation sums that combine them are in stage 2).
// The twelve results, including the PMUL_3 inputs x2 and x6, form the bundle
// cut[], indexed by dct_pkg::cut_idx_e. No path here is longer than three
// adders/subtractors. The operations are those of the standard's algorithm;
// where the graph is cut is this design's choice. All arithmetic wraps at W
// bits.
module dct_stage1
  import dct_pkg::*;
#(
  parameter int unsigned W = DCT_W
) (
  input  logic signed [W-1:0] ind [DCT_N],
  output logic signed [W-1:0] cut [CUT_N]
);

  // Input butterflies.
  logic signed [W-1:0] b0, b1, b2, b3, b4, b5, b6, b7;
  // Even part.
  logic signed [W-1:0] ea, eb;
  // PMUL products.
  logic signed [W-1:0] p11_3, p12_3, p11_5, p12_5;
  logic signed [W-1:0] p21_1, p22_1, p21_7, p22_7;

  always_comb begin
    b0 = ind[0] + ind[7];
    b1 = ind[0] - ind[7];
    b4 = ind[1] + ind[6];
    b5 = ind[1] - ind[6];
    b2 = ind[2] + ind[5];
    b3 = ind[2] - ind[5];
    b6 = ind[3] + ind[4];
    b7 = ind[3] - ind[4];

    ea = b0 + b6;
    eb = b4 + b2;
  end

  dct_pmul #(.W(W), .KIND(PMUL_1)) u_pmul1_x3 (.x(b3), .p1(p11_3), .p2(p12_3));
  dct_pmul #(.W(W), .KIND(PMUL_1)) u_pmul1_x5 (.x(b5), .p1(p11_5), .p2(p12_5));
  dct_pmul #(.W(W), .KIND(PMUL_2)) u_pmul2_x1 (.x(b1), .p1(p21_1), .p2(p22_1));
  dct_pmul #(.W(W), .KIND(PMUL_2)) u_pmul2_x7 (.x(b7), .p1(p21_7), .p2(p22_7));

  always_comb begin
    cut[CUT_X0]    = ea + eb;
    cut[CUT_X4]    = ea - eb;
    cut[CUT_X2]    = b4 - b2;
    cut[CUT_X6]    = b0 - b6;
    cut[CUT_P11_3] = p11_3;
    cut[CUT_P12_3] = p12_3;
    cut[CUT_P11_5] = p11_5;
    cut[CUT_P12_5] = p12_5;
    cut[CUT_P21_1] = p21_1;
    cut[CUT_P22_1] = p22_1;
    cut[CUT_P21_7] = p21_7;
    cut[CUT_P22_7] = p22_7;
  end

endmodule
