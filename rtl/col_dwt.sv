// col_dwt: column (vertical) 1-D (9,7) lifting DWT built on the temporal
// buffer.
//
// The same lifting step as the row module (lift97_core), but the four state
// registers are replaced by four lines of the temporal buffer, one word per
// image column (Fig. 3(b) arrangement). Each advancing cycle with act = 1
// processes one column col: it reads that column's state, takes the column's
// even-row word e (from RAM_A) and odd-row word o (from RAM_B), and writes the
// new state back to the same address. A full pass over the N columns thus
// moves every column one row pair further. The flags, common to all columns of
// a pass, tell where the row pairs in flight sit in the column (first, last,
// valid). The vertical lowpass (out_lo) and highpass (out_hi) of the row pair
// two passes back leave registered after the edge, with out_valid. No
// normalisation is applied here (see dwt_normalize). adv = 0 holds the module,
// output register and out_valid included.
module col_dwt
  import dwt_pkg::*;
#(
  parameter int unsigned N = 512  // image width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adv,
  input  logic                  act,    // a column step happens this cycle
  input  logic [$clog2(N)-1:0]  col,
  input  lift_flags_t           fl,
  input  word_t                 e,      // even-row word of the column
  input  word_t                 o,      // odd-row word of the column
  output logic                  out_valid,
  output word_t                 out_lo, // vertical lowpass
  output word_t                 out_hi  // vertical highpass
);

  lift_state_t st, st_nxt;
  word_t       lo, hi;

  temporal_buffer #(.N(N)) u_tbuf (
    .clk, .we(adv && act), .waddr(col), .wdata(st_nxt), .raddr(col), .rdata(st)
  );

  lift97_core u_core (.e, .o, .st, .fl, .st_nxt, .lo, .hi);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_lo    <= '0;
      out_hi    <= '0;
    end else if (adv) begin
      out_valid <= act && fl.p2_valid;
      out_lo    <= lo;
      out_hi    <= hi;
    end
  end

endmodule
