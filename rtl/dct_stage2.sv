// dct_stage2: second half of the 8-point DCT data flow graph (combinational).
//
// Takes the twelve-word bundle cut[] produced by dct_stage1 (indexed by
// dct_pkg::cut_idx_e) and finishes the transform:
//   * odd rotations:   x3 = pmul_1_1(x3) + pmul_1_2(x5),
//                      x5 = pmul_1_1(x5) - pmul_1_2(x3),
//                      x1 = pmul_2_1(x1) - pmul_2_2(x7),
//                      x7 = pmul_2_1(x7) + pmul_2_2(x1);
//   * odd butterflies: xa = x1 + x3, x3 = x1 - x3,
//                      xb = x7 + x5, x5 = x7 - x5,
//                      x1 = xa + xb, x7 = xa - xb;
//   * even rotation:   the PMUL_3 products of x2 and x6, then
//                      x2 = pmul_3_2(x6) + pmul_3_1(x2),
//                      x6 = pmul_3_1(x6) - pmul_3_2(x2).
// outd[k] is DCT output k in natural order. The longest path is three
// adders/subtractors. The equations are the standard's algorithm; the split
// between the two stages is this design's choice. All arithmetic wraps at W
// bits.
module dct_stage2
  import dct_pkg::*;
#(
  parameter int unsigned W = DCT_W
) (
  input  logic signed [W-1:0] cut  [CUT_N],
  output logic signed [W-1:0] outd [DCT_N]
);

  logic signed [W-1:0] r1, r3, r5, r7, xa, xb;
  logic signed [W-1:0] p31_2, p32_2, p31_6, p32_6;

  dct_pmul #(.W(W), .KIND(PMUL_3)) u_pmul3_x2 (.x(cut[CUT_X2]), .p1(p31_2), .p2(p32_2));
  dct_pmul #(.W(W), .KIND(PMUL_3)) u_pmul3_x6 (.x(cut[CUT_X6]), .p1(p31_6), .p2(p32_6));

  always_comb begin
    r3 = cut[CUT_P11_3] + cut[CUT_P12_5];
    r5 = cut[CUT_P11_5] - cut[CUT_P12_3];
    r1 = cut[CUT_P21_1] - cut[CUT_P22_7];
    r7 = cut[CUT_P21_7] + cut[CUT_P22_1];

    xa = r1 + r3;
    xb = r7 + r5;

    outd[0] = cut[CUT_X0];
    outd[1] = xa + xb;
    outd[2] = p32_6 + p31_2;
    outd[3] = r1 - r3;
    outd[4] = cut[CUT_X4];
    outd[5] = r7 - r5;
    outd[6] = p31_6 - p32_2;
    outd[7] = xa - xb;
  end

endmodule
