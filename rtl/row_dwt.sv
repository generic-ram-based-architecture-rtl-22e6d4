// row_dwt: row (horizontal) 1-D (9,7) lifting DWT, one even/odd pair in and
// one lowpass/highpass pair out per step, shared by J decomposition levels.
//
// Each advancing cycle (adv = 1) performs one step of level lvl: it takes one
// even/odd pair of that level's current row (pixels for level 1, LL
// coefficients for the levels above) and produces one lowpass/highpass pair of
// the same level. The lifting state is four registers per level (Fig. 3(a)
// registers, made J-fold as the multi-level architecture requires), and the
// line-position flags of the pairs in flight are a small shift register per
// level, so rows follow each other with no gap and the symmetric extension at
// each row end costs no step. The lifting datapath (lift97_core) is one,
// shared by all levels.
//
// Outputs are registered per level: out_lo/out_hi show level lvl's register,
// i.e. the pair produced by that level's previous step; the pair that entered
// at a level's step n is shown during its step n+3 (two steps of lifting
// latency plus the register). Registers hold while adv = 0 (stall).
// The 2-in/2-out rate and the J-fold registers follow the document; the
// flags and the output register are this design's choices.
module row_dwt
  import dwt_pkg::*;
#(
  parameter int unsigned J = 3  // decomposition levels sharing the module
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        adv,       // take one step of level lvl
  input  logic [$clog2(J+1)-1:0]      lvl,       // level of this step, 0 = first
  input  logic                        in_valid,  // a pair enters this step
  input  logic                        in_first,  // it is the first pair of its row
  input  logic                        in_last,   // it is the last pair of its row
  input  word_t                       in_even,   // x[2n]
  input  word_t                       in_odd,    // x[2n+1]
  output logic                        out_valid,
  output word_t                       out_lo,    // row lowpass L[n-2] of level lvl
  output word_t                       out_hi     // row highpass H[n-2] of level lvl
);

  lift_state_t st [J];
  logic [2:0]  p1 [J];  // {valid, first, last} of the pairs one and two steps back
  logic [2:0]  p2 [J];
  logic        ov [J];
  word_t       olo [J], ohi [J];

  lift_state_t cur_st, st_nxt;
  lift_flags_t fl;
  word_t       lo, hi;

  assign cur_st = st[lvl];
  assign fl = '{cur_valid: in_valid, cur_first: in_first, cur_last: in_last,
                p1_valid: p1[lvl][2], p1_first: p1[lvl][1], p1_last: p1[lvl][0],
                p2_valid: p2[lvl][2], p2_first: p2[lvl][1], p2_last: p2[lvl][0]};

  lift97_core u_core (.e(in_even), .o(in_odd), .st(cur_st), .fl, .st_nxt, .lo, .hi);

  assign out_valid = ov[lvl];
  assign out_lo    = olo[lvl];
  assign out_hi    = ohi[lvl];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < J; j++) begin
        st[j]  <= '0;
        p1[j]  <= '0;
        p2[j]  <= '0;
        ov[j]  <= 1'b0;
        olo[j] <= '0;
        ohi[j] <= '0;
      end
    end else if (adv) begin
      st[lvl]  <= st_nxt;
      p1[lvl]  <= {in_valid, in_first, in_last};
      p2[lvl]  <= p1[lvl];
      ov[lvl]  <= p2[lvl][2];
      olo[lvl] <= lo;
      ohi[lvl] <= hi;
    end
  end

endmodule
