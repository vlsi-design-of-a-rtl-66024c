// dct_pmul: multiplierless constant multiplier pair (PMUL).
//
// For one signed input X the unit returns two products, p1 = pmul_k_1(X) and
// p2 = pmul_k_2(X), that approximate multiplication by a cosine/sine pair of
// the 8-point DCT. Every product is built from arithmetic right shifts (free
// wiring), adders and subtractors, following the published ISO/IEC 23002-2
// fixed-point DCT:
//
//   k = 1:  p1 = X - (X>>>3) - (X>>>7)                     (about 0.867 X)
//           p2 = t + (t>>>1),  t = (X>>>3) - (X>>>7)        (about 0.176 X)
//   k = 2:  p1 = (u>>>2) - u,  u = (X>>>9) - X              (about 0.749 X)
//           p2 = X >>> 1                                    (0.5 X)
//   k = 3:  p1 = (s>>>2) + (X>>>4), s = X + (X>>>5)         (about 0.320 X)
//           p2 = s - (s>>>2)                                (about 0.773 X)
//
// Each pair is the cosine and sine of one rotation angle times a common gain:
// p2/p1 = 0.2027 (tan(pi/16) = 0.1989), 0.6680 (tan(3pi/16) = 0.6682) and
// 2.4146 (1/tan(pi/8) = 2.4142) for k = 1, 2, 3.
// All arithmetic wraps at W bits, as a W-bit adder does. The shared partial
// results (t, u, s) are computed once. The unit is purely combinational; it
// has no clock. The formulas are the published algorithm's; reading the
// k = 2 product with u subtracted as a whole, and the sharing of partial
// terms, are this design's choices.
module dct_pmul
  import dct_pkg::*;
#(
  parameter int unsigned W    = DCT_W,
  parameter pmul_kind_e  KIND = PMUL_1
) (
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] p1,
  output logic signed [W-1:0] p2
);

  logic signed [W-1:0] t;   // k = 1: (X>>>3) - (X>>>7)
  logic signed [W-1:0] s;   // k = 3: X + (X>>>5)
  logic signed [W-1:0] u;   // k = 2: (X>>>9) - X

  always_comb begin
    t  = '0;
    s  = '0;
    u  = '0;
    p1 = '0;
    p2 = '0;
    unique case (KIND)
      PMUL_1: begin
        t  = (x >>> 3) - (x >>> 7);
        p1 = x - (x >>> 3) - (x >>> 7);
        p2 = t + (t >>> 1);
      end
      PMUL_2: begin
        u  = (x >>> 9) - x;
        p1 = (u >>> 2) - u;
        p2 = x >>> 1;
      end
      PMUL_3: begin
        s  = x + (x >>> 5);
        p1 = (s >>> 2) + (x >>> 4);
        p2 = s - (s >>> 2);
      end
      default: ;
    endcase
  end

endmodule
