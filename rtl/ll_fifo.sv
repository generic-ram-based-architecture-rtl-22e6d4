// ll_fifo: small FIFO of LL coefficient pairs fed back from one level's output
// to the next level's row input.
//
// The column module emits a level's LL coefficients one at a time in raster
// order; the top pairs them (even, odd column) and pushes each pair here. The
// next level pops one pair per input step. DEPTH pairs, first-word
// fall-through: head_even/head_odd are valid while not_empty. A push into a
// full FIFO is a scheduling error and is flagged by an assertion. The FIFO and
// its depth are this design's way of joining the feedback path of the
// multi-level architecture to the slot schedule. rst_n also appears in the
// assertion's disable condition, which is why lint sees it used both as an
// asynchronous reset and as a synchronous signal.
module ll_fifo
  import dwt_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  word_t push_even,
  input  word_t push_odd,
  input  logic  pop,
  output logic  not_empty,
  output word_t head_even,
  output word_t head_odd
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t          me [DEPTH];
  word_t          mo [DEPTH];
  logic [AW-1:0]  rp, wp;
  logic [AW:0]    cnt;

  assign not_empty = (cnt != '0);
  assign head_even = me[rp];
  assign head_odd  = mo[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) begin me[i] <= '0; mo[i] <= '0; end
    end else begin
      if (push) begin
        me[wp] <= push_even;
        mo[wp] <= push_odd;
        wp     <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop && not_empty) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop && not_empty);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (cnt < (AW+1)'(DEPTH)) || pop);

endmodule
