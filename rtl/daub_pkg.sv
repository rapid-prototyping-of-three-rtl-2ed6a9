// daub_pkg: number format and filter taps shared by the Daubechies transform.
//
// Samples and coefficients are two's-complement fixed point with FRAC
// fraction bits. The filter taps are the Daub4 and Daub6 scaling filters h_k,
// rounded to FRAC fraction bits:
//   Daub4: h_k = {1+sqrt3, 3+sqrt3, 3-sqrt3, 1-sqrt3} / (4*sqrt2)
//   Daub6: z1 = sqrt10, z2 = sqrt(5 + 2*z1),
//          h_k = {1+z1+z2, 5+z1+3*z2, 10-2*z1+2*z2, 10-2*z1-2*z2,
//                 5+z1-3*z2, 1+z1-z2} / (16*sqrt2)
// and the wavelet filter is g_k = (-1)^k * h_(TAPS-1-k), i.e. for Daub4
// g = {h3, -h2, h1, -h0}. The filter formulas are the standard Daubechies
// definitions; the 8-bit fraction and the tap width CW are choices of this
// design (the stored integers are round(h_k * 2^FRAC)).
package daub_pkg;

  localparam int FRAC = 8;   // fraction bits of samples and taps
  localparam int CW   = 10;  // tap width, signed

  typedef logic signed [CW-1:0] coef_t;

  // Scaling (low-pass) tap k of a TAPS-tap Daubechies filter.
  function automatic coef_t hcoef(input int taps, input int k);
    coef_t c;
    c = '0;
    if (taps == 4) begin
      case (k)
        0: c = 10'sd124;   // 0.48296
        1: c = 10'sd214;   // 0.83652
        2: c = 10'sd57;    // 0.22414
        3: c = -10'sd33;   // -0.12941
        default: c = '0;
      endcase
    end else begin
      case (k)
        0: c = 10'sd85;    // 0.33267
        1: c = 10'sd207;   // 0.80689
        2: c = 10'sd118;   // 0.45988
        3: c = -10'sd35;   // -0.13501
        4: c = -10'sd22;   // -0.08544
        5: c = 10'sd9;     // 0.03523
        default: c = '0;
      endcase
    end
    return c;
  endfunction

  // Wavelet (high-pass) tap k: g_k = (-1)^k * h_(TAPS-1-k).
  function automatic coef_t gcoef(input int taps, input int k);
    coef_t h;
    h = hcoef(taps, taps - 1 - k);
    return (k % 2 == 0) ? h : -h;
  endfunction

endpackage
