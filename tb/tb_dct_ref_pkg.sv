// tb_dct_ref_pkg: reference models used by the DCT testbenches.
//
// dct_ref() runs the ISO/IEC 23002-2 forward 8-point DCT the way the
// algorithm is usually written in software: eight working variables that are
// overwritten step by step, on 32-bit two's-complement integers with
// arithmetic right shifts. It shares no code with the RTL, which is built as
// a data flow graph of named wires. pmul_ref() gives one PMUL product the
// same way. Widths other than 32 are handled by sign-extending the low W bits
// after every step (wrap-around at W bits).
package tb_dct_ref_pkg;

  typedef int vec8_t [8];

  function automatic int wrap(input int v, input int unsigned w);
    longint x;
    if (w >= 32) return v;
    x = longint'(v) & ((64'sd1 <<< w) - 1);
    if (x[w-1]) x = x - (64'sd1 <<< w);
    return int'(x);
  endfunction

  // kind = 1, 2, 3; sel = 1 or 2 selects pmul_kind_sel.
  function automatic int pmul_ref(input int unsigned kind, input int unsigned sel,
                                  input int x, input int unsigned w = 32);
    int a, b;
    case ({kind[1:0], sel[1:0]})
      4'b01_01: begin a = wrap(x - (x >>> 3), w); return wrap(a - (x >>> 7), w); end
      4'b01_10: begin a = wrap((x >>> 3) - (x >>> 7), w); return wrap(a + (a >>> 1), w); end
      4'b10_01: begin
        a = wrap((x >>> 9) - x, w);
        b = a >>> 2;
        return wrap(b - a, w);
      end
      4'b10_10: return x >>> 1;
      4'b11_01: begin a = wrap(x + (x >>> 5), w); return wrap((a >>> 2) + (x >>> 4), w); end
      4'b11_10: begin a = wrap(x + (x >>> 5), w); return wrap(a - (a >>> 2), w); end
      default:  return 0;
    endcase
  endfunction

  function automatic vec8_t dct_ref(input vec8_t ind, input int unsigned w = 32);
    int x0, x1, x2, x3, x4, x5, x6, x7, xa, xb;
    vec8_t o;
    x0 = wrap(ind[0] + ind[7], w);  x1 = wrap(ind[0] - ind[7], w);
    x4 = wrap(ind[1] + ind[6], w);  x5 = wrap(ind[1] - ind[6], w);
    x2 = wrap(ind[2] + ind[5], w);  x3 = wrap(ind[2] - ind[5], w);
    x6 = wrap(ind[3] + ind[4], w);  x7 = wrap(ind[3] - ind[4], w);

    xa = pmul_ref(1, 2, x3, w);  x3 = pmul_ref(1, 1, x3, w);
    xb = pmul_ref(1, 2, x5, w);  x5 = pmul_ref(1, 1, x5, w);
    x3 = wrap(x3 + xb, w);       x5 = wrap(x5 - xa, w);

    xa = pmul_ref(2, 2, x1, w);  x1 = pmul_ref(2, 1, x1, w);
    xb = pmul_ref(2, 2, x7, w);  x7 = pmul_ref(2, 1, x7, w);
    x1 = wrap(x1 - xb, w);       x7 = wrap(x7 + xa, w);

    xa = wrap(x1 + x3, w);  x3 = wrap(x1 - x3, w);
    xb = wrap(x7 + x5, w);  x5 = wrap(x7 - x5, w);
    x1 = wrap(xa + xb, w);  x7 = wrap(xa - xb, w);

    xa = wrap(x0 + x6, w);  x6 = wrap(x0 - x6, w);
    xb = wrap(x4 + x2, w);  x2 = wrap(x4 - x2, w);
    x0 = wrap(xa + xb, w);  x4 = wrap(xa - xb, w);

    xa = pmul_ref(3, 2, x2, w);  x2 = pmul_ref(3, 1, x2, w);
    xb = pmul_ref(3, 2, x6, w);  x6 = pmul_ref(3, 1, x6, w);
    x2 = wrap(xb + x2, w);       x6 = wrap(x6 - xa, w);

    o[0] = x0; o[1] = x1; o[2] = x2; o[3] = x3;
    o[4] = x4; o[5] = x5; o[6] = x6; o[7] = x7;
    return o;
  endfunction

  typedef int cut_t [12];

  // The twelve words the pipelined datapath holds between its two halves,
  // in the order of dct_pkg::cut_idx_e, worked out from the inputs.
  function automatic cut_t cut_ref(input vec8_t ind, input int unsigned w = 32);
    int x0, x1, x2, x3, x4, x5, x6, x7, xa, xb, e2, e6;
    cut_t c;
    x0 = wrap(ind[0] + ind[7], w);  x1 = wrap(ind[0] - ind[7], w);
    x4 = wrap(ind[1] + ind[6], w);  x5 = wrap(ind[1] - ind[6], w);
    x2 = wrap(ind[2] + ind[5], w);  x3 = wrap(ind[2] - ind[5], w);
    x6 = wrap(ind[3] + ind[4], w);  x7 = wrap(ind[3] - ind[4], w);
    xa = wrap(x0 + x6, w);  e6 = wrap(x0 - x6, w);
    xb = wrap(x4 + x2, w);  e2 = wrap(x4 - x2, w);
    c[0]  = wrap(xa + xb, w);
    c[1]  = wrap(xa - xb, w);
    c[2]  = e2;
    c[3]  = e6;
    c[4]  = pmul_ref(1, 1, x3, w);
    c[5]  = pmul_ref(1, 2, x3, w);
    c[6]  = pmul_ref(1, 1, x5, w);
    c[7]  = pmul_ref(1, 2, x5, w);
    c[8]  = pmul_ref(2, 1, x1, w);
    c[9]  = pmul_ref(2, 2, x1, w);
    c[10] = pmul_ref(2, 1, x7, w);
    c[11] = pmul_ref(2, 2, x7, w);
    return c;
  endfunction

  // Random sample: pixel-like values most of the time, full-range words
  // sometimes (to exercise wrap-around).
  function automatic int rand_sample();
    int unsigned r;
    r = $urandom_range(0, 3);
    if (r == 0) return int'($urandom());
    if (r == 1) return int'($urandom_range(0, 511)) - 256;
    return int'($urandom_range(0, 255));
  endfunction

endpackage
