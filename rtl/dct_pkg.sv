// dct_pkg: constants and types shared by the pipelined 8-point DCT.
//
// The transform works on vectors of eight 32-bit two's-complement words
// (DCT_W = 32, the word width used throughout the datapath). The data flow
// graph is cut once, after the third of its six levels of adders and
// subtractors; the twelve words that cross that cut are named by cut_idx_e,
// which both halves of the datapath and the pipeline register use to index
// the bundle. The place of the cut and the names of the twelve words are
// this design's own choice.
package dct_pkg;

  // Points per 1-D transform and datapath word width.
  localparam int unsigned DCT_N = 8;
  localparam int unsigned DCT_W = 32;

  // Words crossing the stage-1 / stage-2 boundary.
  typedef enum int unsigned {
    CUT_X0    = 0,   // even output 0, final
    CUT_X4    = 1,   // even output 4, final
    CUT_X2    = 2,   // x2 = x4 - x2 of the even half, PMUL_3 input
    CUT_X6    = 3,   // x6 = x0 - x6 of the even half, PMUL_3 input
    CUT_P11_3 = 4,   // pmul_1_1(x3)
    CUT_P12_3 = 5,   // pmul_1_2(x3)
    CUT_P11_5 = 6,   // pmul_1_1(x5)
    CUT_P12_5 = 7,   // pmul_1_2(x5)
    CUT_P21_1 = 8,   // pmul_2_1(x1)
    CUT_P22_1 = 9,   // pmul_2_2(x1)
    CUT_P21_7 = 10,  // pmul_2_1(x7)
    CUT_P22_7 = 11   // pmul_2_2(x7)
  } cut_idx_e;

  localparam int unsigned CUT_N = 12;

  // Which constant pair a PMUL unit implements.
  typedef enum int unsigned {
    PMUL_1 = 1,
    PMUL_2 = 2,
    PMUL_3 = 3
  } pmul_kind_e;

endpackage
