// dwt_pkg: word format, lifting constants and shared types of the line-based
// 2-D (9,7) DWT.
//
// All coefficients travel as signed fixed-point words of W bits with FRAC
// fractional bits. The four (9,7) lifting constants and the two output
// normalisation constants S^2 and 1/S^2 are held with CF fractional bits.
// A lifting product is rounded on its own: P(x) = (x*C + 2^(CF-1)) >>> CF.
// The lifting constants are the standard JPEG2000 (9,7) values; the word
// widths, the rounding and S = 1.230174104914001 are this design's choices.
package dwt_pkg;

  localparam int unsigned IN_W = 8;   // input pixel bits (unsigned)
  localparam int unsigned W    = 20;  // coefficient word bits
  localparam int unsigned FRAC = 4;   // fractional bits of a coefficient word
  localparam int unsigned CF   = 12;  // fractional bits of the constants
  localparam int unsigned CW   = 16;  // constant width

  typedef logic signed [W-1:0]  word_t;
  typedef logic signed [CW-1:0] coef_t;

  // (9,7) lifting constants alpha, beta, gamma, delta, and S^2, 1/S^2, at CF bits
  localparam coef_t C_ALPHA = -16'sd6497;  // -1.586134342
  localparam coef_t C_BETA  = -16'sd217;   // -0.052980119
  localparam coef_t C_GAMMA =  16'sd3616;  //  0.882911076
  localparam coef_t C_DELTA =  16'sd1817;  //  0.443506852
  localparam coef_t C_S2    =  16'sd6199;  //  S^2   = 1.513328328
  localparam coef_t C_INV_S2 = 16'sd2707;  //  1/S^2 = 0.660795137

  // State of one 1-D lifting datapath: the four registers of Fig. 3(a).
  //   t = o[n] + P_a(e[n])          (partial d1[n], or whole d1[n] after a line end)
  //   u = e[n] + P_b(d1[n-1])       (partial s1[n])
  //   v = d1[n-1] + P_c(s1[n-1])    (partial d2[n-1])
  //   w = s1[n-1] + P_d(d2[n-2])    (partial s2[n-1])
  typedef struct packed {
    word_t t;
    word_t u;
    word_t v;
    word_t w;
  } lift_state_t;

  localparam int unsigned K0 = 4;  // registers per 1-D module = temporal buffer lines

  // Position flags of the samples in the lifting pipeline at one step.
  //   cur_* : the pair entering now
  //   p1_*  : the pair that entered one step ago (now leaving the predict/update 1 stage)
  //   p2_*  : the pair that entered two steps ago (its outputs L/H leave now)
  typedef struct packed {
    logic cur_valid, cur_first, cur_last;
    logic p1_valid,  p1_first,  p1_last;
    logic p2_valid,  p2_first,  p2_last;
  } lift_flags_t;

  // Rounded fixed-point product of a coefficient word and a constant.
  function automatic word_t cmul(input word_t x, input coef_t c);
    logic signed [W+CW-1:0] p;
    p = (W+CW)'(x) * (W+CW)'(c);
    p = p + (W+CW)'(1 << (CF-1));
    return word_t'(p >>> CF);
  endfunction

endpackage
