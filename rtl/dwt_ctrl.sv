// dwt_ctrl: schedule of the 1-level line-based 2-D DWT.
//
// One step counter g runs through an image: it advances in every cycle in
// which the level owns the slot (en) and either the input offers a pair
// (in_valid) or no input is needed any more; otherwise it holds (stall).
// want_in / want_drain tell the slot scheduler that a step could be taken.
// In the multi-level design there is one dwt_ctrl per level, with N the
// width of that level's input. From g everything else follows, because
// every unit moves in lock step with one pair per step:
//   step g      row module takes pixel pair g (row g/M, pair g mod M), M = N/2
//   q = g-3     the row module's registered output (row q/M, position q mod M)
//               is written to the data buffer: RAM_A for an even row, RAM_B
//               for an odd one
//   k = q-M     column step: pass p = k/N, column j = k mod N, visited in the
//               order L0,H0,L1,H1,..; pass p combines rows 2p and 2p+1 and
//               begins in the cycle the first pair of row 2p+1 is written
// Passes M and M+1 receive no new rows: they drain the column lifting
// pipeline (symmetric extension at the bottom edge). After two more steps for
// the output registers the counter returns to 0 and the next image may
// enter. The image thus takes N*N/2 input steps plus 2.5N+4 drain steps.
// The lock-step data flow follows the document's Fig. 4; the counter, the
// drain and the stall policy are this design's choices. N must be a power of
// two, at least 8.
module dwt_ctrl
  import dwt_pkg::*;
#(
  parameter int unsigned N = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,        // this level owns the current slot
  input  logic                     in_valid,
  output logic                     in_ready,
  output logic                     want_in,   // an input pair is offered and needed
  output logic                     want_drain,// a drain step is pending
  output logic                     adv,
  // row module
  output logic                     row_first,
  output logic                     row_last,
  // data buffer write
  output logic                     buf_we,
  output logic                     buf_wsel,
  output logic [$clog2(N/2)-1:0]   buf_widx,
  // data buffer read and column module
  output logic                     col_act,
  output logic [$clog2(N)-1:0]     col_idx,
  output logic [$clog2(N/2)-1:0]   buf_ridx,
  output logic                     buf_rd_hi,
  output lift_flags_t              col_fl,
  // position of the column step's output (vertical index p-2)
  output logic [$clog2(N/2)-1:0]   out_row,
  output logic [$clog2(N/2)-1:0]   out_col,
  output logic                     out_hband,
  output logic                     frame_end    // last step of the image
);

  localparam int unsigned M    = N / 2;
  localparam int unsigned LM   = $clog2(M);
  localparam int unsigned LN   = $clog2(N);
  localparam int unsigned NIN  = N * M;                    // input steps per image
  localparam int unsigned G    = 3 + M + (M + 2) * N + 1;  // steps per image
  localparam int unsigned GB   = $clog2(G + 1) + 1;

  logic [GB-1:0] g, q, k;
  logic [GB-1:0] p;
  logic          q_ok, k_ok;

  assign in_ready  = (g < GB'(NIN));
  assign want_in    = in_ready && in_valid;
  assign want_drain = !in_ready;
  assign adv        = en && (want_in || want_drain);
  assign frame_end = (g == GB'(G - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   g <= '0;
    else if (adv) g <= frame_end ? '0 : g + 1'b1;
  end

  // row module input position
  assign row_first = (g[LM-1:0] == '0);
  assign row_last  = (g[LM-1:0] == LM'(M - 1));

  // data buffer write position
  assign q        = g - GB'(3);
  assign q_ok     = (g >= GB'(3)) && (q < GB'(NIN));
  assign buf_we   = adv && q_ok;
  assign buf_wsel = q[LM];           // row parity
  assign buf_widx = q[LM-1:0];

  // column step
  assign k        = g - GB'(3 + M);
  assign k_ok     = (g >= GB'(3 + M)) && (k < GB'((M + 2) * N));
  assign p        = k >> LN;
  assign col_act  = k_ok;
  assign col_idx  = k[LN-1:0];
  assign buf_ridx = k[LN-1:1];
  assign buf_rd_hi = k[0];

  always_comb begin
    col_fl.cur_valid = k_ok && (p <= GB'(M - 1));
    col_fl.cur_first = (p == GB'(0));
    col_fl.cur_last  = (p == GB'(M - 1));
    col_fl.p1_valid  = k_ok && (p >= GB'(1)) && (p <= GB'(M));
    col_fl.p1_first  = (p == GB'(1));
    col_fl.p1_last   = (p == GB'(M));
    col_fl.p2_valid  = k_ok && (p >= GB'(2)) && (p <= GB'(M + 1));
    col_fl.p2_first  = (p == GB'(2));
    col_fl.p2_last   = (p == GB'(M + 1));
  end

  assign out_row   = LM'(p - GB'(2));
  assign out_col   = k[LN-1:1];
  assign out_hband = k[0];

endmodule
