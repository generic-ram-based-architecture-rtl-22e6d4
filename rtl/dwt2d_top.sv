// dwt2d_top: J-level two-dimensional (9,7) discrete wavelet transform of an
// N x N image with the line-based method, one row 1-D module and one column
// 1-D module shared by all levels.
//
// Datapath (Fig. 2 / Fig. 7 arrangement): the row 1-D DWT module transforms
// image rows, or rows of the previous level's LL subband, as they stream in;
// its lowpass/highpass pairs go to the data buffer (RAM_A for even rows,
// RAM_B for odd rows, 1.5 row widths per level); the column 1-D DWT module
// reads one column of a row pair per step and keeps the lifting state of every
// column of every level in the temporal buffer; dwt_normalize applies 1/S^2
// to LL and S^2 to HH. One dwt_ctrl per level sequences that level from its
// own step counter, and rpa_sched gives each cycle (slot) to one level. The
// LL output of every level but the last is paired and queued (ll_fifo) as the
// next level's input, which is the multiplexer in front of the row module.
//
// With J = 1 this is the 1-level architecture: two pixels in and two
// coefficients out per cycle. With J > 1 the first level takes the even slots
// (one pixel per cycle) and the higher levels the odd ones.
//
// Input: pixels in raster order as pairs (x[r][2n], x[r][2n+1]), taken when
// in_valid && in_ready. in_ready is low in odd slots when J > 1, while the
// first level drains at the end of an image (2.5N+4 steps), and from then
// until the last level has finished. A missing input pair stalls the first
// level only. Output: one coefficient pair per out_valid cycle, of level
// out_level (0 = first) at position (out_row, out_col) of that level's
// subbands: out_hband = 0 gives LL on out_lo and LH on out_hi, out_hband = 1
// gives HL and HH. The LL words of levels below the last are shown too,
// though they are also consumed as the next level's input. Subband letters:
// first horizontal, then vertical. Coefficient words are signed W-bit with
// FRAC fractional bits (dwt_pkg). Within a level, the outputs of row pair m
// leave in the order L0,H0,L1,H1,... With J = 1 the first output of an image
// leaves 2N + N/2 + 5 cycles after its first input.
// The structure follows the document; the word format, the schedule details,
// the feedback FIFO and the image framing are this design's.
// Lint notes: the data buffer's write-through flag (fwd) is not used
// here (it is observed by the testbenches), fb_push[0] is never set because
// the first level reads the image input, and rst_n also feeds the assertion's
// disable condition.
module dwt2d_top
  import dwt_pkg::*;
#(
  parameter int unsigned N = 512,  // image width and height, a power of two
  parameter int unsigned J = 3     // levels; N >> (J-1) must be at least 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [IN_W-1:0]         in_even,
  input  logic [IN_W-1:0]         in_odd,
  output logic                    out_valid,
  output logic [$clog2(J+1)-1:0]  out_level,
  output logic                    out_hband,
  output logic [$clog2(N/2)-1:0]  out_row,
  output logic [$clog2(N/2)-1:0]  out_col,
  output word_t                   out_lo,
  output word_t                   out_hi
);

  localparam int unsigned LW = $clog2(J + 1);
  localparam int unsigned PW = $clog2(N / 2);   // position width of level 1
  localparam int unsigned CW1 = $clog2(N);      // column index width of level 1
  localparam int unsigned DT = 2 * (N - (N >> J));  // temporal buffer words per line
  localparam int unsigned TW = $clog2(DT);

  // ---------------------------------------------------------------- control
  logic [J-1:0]  want_in, want_drain, lv_adv, lv_ready, lv_first, lv_last, lv_end;
  logic [J-1:0]  lv_we, lv_wsel, lv_act, lv_rdhi, lv_hband, lv_inv;
  logic [PW-1:0] lv_widx [J], lv_ridx [J], lv_row [J], lv_col [J];
  logic [CW1-1:0] lv_cidx [J];
  lift_flags_t   lv_fl [J];
  logic          slot0, grant, blocked;
  logic [LW-1:0] lvl;

  // feedback queues: fifo l feeds level l (l >= 1)
  logic [J-1:0]  fb_push, fb_ne;
  word_t         fb_pe [J], fb_po [J], fb_he [J], fb_ho [J];

  assign in_ready = lv_ready[0] && slot0 && !blocked;

  for (genvar l = 0; l < J; l++) begin : g_lvl
    localparam int unsigned NL = N >> l;
    logic [$clog2(NL/2)-1:0] widx, ridx, orow, ocol;
    logic [$clog2(NL)-1:0]   cidx;

    assign lv_inv[l] = (l == 0) ? (in_valid && slot0 && !blocked) : fb_ne[l];

    dwt_ctrl #(.N(NL)) u_ctrl (
      .clk, .rst_n, .en(grant && (lvl == LW'(l))), .in_valid(lv_inv[l]), .in_ready(lv_ready[l]),
      .want_in(want_in[l]), .want_drain(want_drain[l]), .adv(lv_adv[l]),
      .row_first(lv_first[l]), .row_last(lv_last[l]),
      .buf_we(lv_we[l]), .buf_wsel(lv_wsel[l]), .buf_widx(widx),
      .col_act(lv_act[l]), .col_idx(cidx), .buf_ridx(ridx), .buf_rd_hi(lv_rdhi[l]),
      .col_fl(lv_fl[l]), .out_row(orow), .out_col(ocol), .out_hband(lv_hband[l]),
      .frame_end(lv_end[l])
    );

    assign lv_widx[l] = PW'(widx);
    assign lv_ridx[l] = PW'(ridx);
    assign lv_row[l]  = PW'(orow);
    assign lv_col[l]  = PW'(ocol);
    // column address of this level's region of the temporal buffer
    assign lv_cidx[l] = CW1'(cidx);

    if (l > 0) begin : g_fifo
      ll_fifo u_fifo (
        .clk, .rst_n, .push(fb_push[l]), .push_even(fb_pe[l]), .push_odd(fb_po[l]),
        .pop(lv_adv[l] && lv_ready[l]), .not_empty(fb_ne[l]),
        .head_even(fb_he[l]), .head_odd(fb_ho[l])
      );
    end else begin : g_nofifo
      assign fb_ne[l] = 1'b0;
      assign fb_he[l] = '0;
      assign fb_ho[l] = '0;
    end
  end

  rpa_sched #(.J(J)) u_sched (
    .clk, .rst_n, .want_in, .want_drain, .slot0, .grant, .lvl
  );

  // one image at a time: after the first level has finished an image, new
  // input waits until the last level has finished it too
  logic lvl0_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        lvl0_done <= 1'b0;
    else if (lv_adv[J-1] && lv_end[J-1]) lvl0_done <= 1'b0;
    else if (lv_adv[0] && lv_end[0])   lvl0_done <= 1'b1;
  end
  assign blocked = (J > 1) && lvl0_done;

  // ---------------------------------------------------------------- datapath
  word_t  row_e, row_o, row_lo, row_hi, col_e, col_o, col_lo, col_hi;
  logic   row_v, col_v, fwd;
  logic [TW-1:0] col_addr;

  assign row_e = (lvl == '0) ? (word_t'({1'b0, in_even}) <<< FRAC) : fb_he[lvl];
  assign row_o = (lvl == '0) ? (word_t'({1'b0, in_odd})  <<< FRAC) : fb_ho[lvl];

  row_dwt #(.J(J)) u_row (
    .clk, .rst_n, .adv(grant), .lvl,
    .in_valid(want_in[lvl]), .in_first(lv_first[lvl]), .in_last(lv_last[lvl]),
    .in_even(row_e), .in_odd(row_o),
    .out_valid(row_v), .out_lo(row_lo), .out_hi(row_hi)
  );

  data_buffer #(.N(N), .J(J)) u_dbuf (
    .clk, .lvl, .we(lv_we[lvl]), .wsel(lv_wsel[lvl]), .widx(lv_widx[lvl]),
    .wlo(row_lo), .whi(row_hi),
    .ridx(lv_ridx[lvl]), .rd_hi(lv_rdhi[lvl]), .rd_even(col_e), .rd_odd(col_o), .fwd
  );

  // level l's columns start at 2*(N - (N >> l)) in the temporal buffer
  assign col_addr = TW'(2 * (N - (N >> lvl))) + TW'(lv_cidx[lvl]);

  col_dwt #(.N(DT)) u_col (
    .clk, .rst_n, .adv(grant), .act(lv_act[lvl]), .col(col_addr), .fl(lv_fl[lvl]),
    .e(col_e), .o(col_o),
    .out_valid(col_v), .out_lo(col_lo), .out_hi(col_hi)
  );

  // position of the pair in the column module's output register (r1) and in
  // the normaliser's output register (r2)
  logic [PW-1:0] r1_row, r1_col, r2_row, r2_col;
  logic [LW-1:0] r1_lvl, r2_lvl;
  logic          r1_hband, grant_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_row <= '0; r1_col <= '0; r1_hband <= 1'b0; r1_lvl <= '0; grant_q <= 1'b0;
      r2_row <= '0; r2_col <= '0; r2_lvl <= '0;
    end else begin
      grant_q <= grant;
      if (grant) begin
        r1_row <= lv_row[lvl]; r1_col <= lv_col[lvl]; r1_hband <= lv_hband[lvl]; r1_lvl <= lvl;
      end
      r2_row <= r1_row; r2_col <= r1_col; r2_lvl <= r1_lvl;
    end
  end

  dwt_normalize u_norm (
    .clk, .rst_n, .adv(1'b1), .in_valid(col_v && grant_q), .hband(r1_hband),
    .in_lo(col_lo), .in_hi(col_hi),
    .out_valid, .out_hband, .out_lo, .out_hi
  );

  assign out_row   = r2_row;
  assign out_col   = r2_col;
  assign out_level = r2_lvl;

  // ---------------------------------------------------------------- LL feedback
  word_t ll_even [J];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < J; l++) ll_even[l] <= '0;
    end else if (out_valid && !out_hband && !out_col[0]) begin
      ll_even[out_level] <= out_lo;
    end
  end

  always_comb begin
    for (int l = 0; l < J; l++) begin
      fb_push[l] = 1'b0;
      fb_pe[l]   = ll_even[(l > 0) ? l - 1 : 0];
      fb_po[l]   = out_lo;
    end
    if (out_valid && !out_hband && out_col[0] && (int'(out_level) < J - 1))
      fb_push[out_level + 1'b1] = 1'b1;
  end

  // the row module's output and the controller's write schedule agree
  a_row_sched: assert property (@(posedge clk) disable iff (!rst_n)
                                grant |-> (row_v == lv_we[lvl]));

endmodule
