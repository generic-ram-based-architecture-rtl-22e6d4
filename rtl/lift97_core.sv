// lift97_core: one step of the (9,7) lifting 1-D DWT, purely combinational.
//
// This is the "combinational circuits" block between the registers of a 1-D
// DWT module. Each step takes one even/odd input pair (e, o) and the four
// state words {t,u,v,w} (see dwt_pkg), and returns the lowpass/highpass pair
// of the sample that entered two steps earlier together with the next state:
//
//   pa = P_a(e)      d1 = t + pa          (d1 = t when the previous pair ended its line)
//   pb = P_b(d1)     s1 = u + pb          (u + 2*pb when the previous pair began its line)
//   pc = P_c(s1)     d2 = v + pc          (d2 = v when the pair two steps back ended its line)
//   pd = P_d(d2)     s2 = w + pd          (w + 2*pd when the pair two steps back began its line)
//   t' = o + pa (o + 2*pa at a line end)   u' = e + pb (u' = e at a line start)
//   v' = d1 + pc (d1 + 2*pc at a line end) w' = s1 + pd (w' = s1 at a line start)
//
// The doubled terms implement whole-sample symmetric extension at both ends of
// every line, so consecutive lines stream through with no idle step between
// them. One multiplier per lifting constant (four in all) serves both the
// finishing and the starting term. Outputs lo = s2 and hi = d2 are unscaled:
// normalisation is done once, after the column transform (dwt_normalize).
// Latency two steps; hi/lo are meaningful when flags.p2_valid is set.
// The (9,7) lifting follows the document's choice of filter; the 4-register
// split of the state and the boundary handling are this design's own.
module lift97_core
  import dwt_pkg::*;
(
  input  word_t       e,
  input  word_t       o,
  input  lift_state_t st,
  input  lift_flags_t fl,
  output lift_state_t st_nxt,
  output word_t       lo,
  output word_t       hi
);

  word_t pa, pb, pc, pd;
  word_t d1, s1, d2;

  always_comb begin
    pa = cmul(e, C_ALPHA);
    d1 = fl.p1_last ? st.t : st.t + pa;
    pb = cmul(d1, C_BETA);
    s1 = fl.p1_first ? st.u + (pb <<< 1) : st.u + pb;
    pc = cmul(s1, C_GAMMA);
    d2 = fl.p2_last ? st.v : st.v + pc;
    pd = cmul(d2, C_DELTA);
    lo = fl.p2_first ? st.w + (pd <<< 1) : st.w + pd;
    hi = d2;

    st_nxt.t = fl.cur_last  ? o + (pa <<< 1) : o + pa;
    st_nxt.u = fl.cur_first ? e : e + pb;
    st_nxt.v = fl.p1_last   ? d1 + (pc <<< 1) : d1 + pc;
    st_nxt.w = fl.p1_first  ? s1 : s1 + pd;
  end

endmodule
