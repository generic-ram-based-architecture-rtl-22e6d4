// data_buffer: the 1.5N line buffer between the row and the column 1-D DWT
// modules, with one region per decomposition level.
//
// RAM_A holds one even row of row-transform output, RAM_B part of the
// following odd row; each is two two-port RAMs, one for the lowpass half and
// one for the highpass half of the row. For a level of width Nl (N, N/2, ...)
// RAM_A holds Nl words and RAM_B Nl/2, so level l occupies 1.5*Nl words and
// J levels together 1.5*(N + N/2 + ...) words, each level in a region of its
// own. The row module writes one lowpass/highpass pair per step (position widx
// of the row, 0..Nl/2-1) into RAM_A for an even row, or into RAM_B at
// widx mod Nl/4 for an odd row. The column module reads one column per step:
// position ridx of band rd_hi (0 = lowpass half, 1 = highpass half), getting
// the even-row word from RAM_A and the odd-row word from RAM_B. Write and read
// of one step are always of the same level, lvl.
//
// The controller visits the columns of a row pair in the order L0,H0,L1,H1,...
// starting in the step the odd row's first pair is written. The odd row is
// written twice as fast as it is read, so RAM_B never holds more than Nl/2
// words, and the next even row overwrites RAM_A only behind the reads. Two
// kinds of same-step collision arise: the very first read of an odd row takes
// the word being written (RAM_B write-through, only when read and write
// positions are equal), and every other same-slot read sees the old word while
// the new one is written (read-before-write of tp_ram): RAM_A's last read of a
// row pair, and RAM_B's read of slot Nl/4-1 as the odd row's last pair lands
// there. Reads are combinational.
// Sizes and the data flow follow the document's 1.5N scheme; the visiting
// order, the modulo addressing of RAM_B, the collision rules and the region
// layout are this design's way of making that data flow conflict-free.
module data_buffer
  import dwt_pkg::*;
#(
  parameter int unsigned N = 512,  // width of level 1; a power of two, N >> (J-1) >= 8
  parameter int unsigned J = 3     // levels
) (
  input  logic                     clk,
  input  logic [$clog2(J+1)-1:0]   lvl,
  input  logic                     we,
  input  logic                     wsel,   // 0: even row -> RAM_A, 1: odd row -> RAM_B
  input  logic [$clog2(N/2)-1:0]   widx,
  input  word_t                    wlo,
  input  word_t                    whi,
  input  logic [$clog2(N/2)-1:0]   ridx,
  input  logic                     rd_hi,
  output word_t                    rd_even,
  output word_t                    rd_odd,
  output logic                     fwd     // write-through taken this step
);

  localparam int unsigned DA = N - (N >> J);        // RAM_A words per half
  localparam int unsigned DB = DA / 2;              // RAM_B words per half

  logic [$clog2(DA)-1:0] wa, ra;
  logic [$clog2(DB)-1:0] wb, rb;
  word_t a_lo, a_hi, b_lo, b_hi;

  // region of level lvl: RAM_A from N - (N >> lvl), RAM_B from half that;
  // RAM_B position is taken modulo Nl/4 = N >> (lvl+2)
  always_comb begin
    logic [$clog2(N/2)-1:0] bmask;
    bmask = $clog2(N/2)'((N >> (lvl + 2)) - 1);
    wa = $clog2(DA)'(N - (N >> lvl)) + $clog2(DA)'(widx);
    ra = $clog2(DA)'(N - (N >> lvl)) + $clog2(DA)'(ridx);
    wb = $clog2(DB)'((N - (N >> lvl)) / 2) + $clog2(DB)'(widx & bmask);
    rb = $clog2(DB)'((N - (N >> lvl)) / 2) + $clog2(DB)'(ridx & bmask);
  end

  tp_ram #(.DEPTH(DA), .WIDTH(W)) u_ram_a_lo (.clk, .we(we && !wsel), .waddr(wa), .wdata(wlo),
                                              .raddr(ra), .rdata(a_lo));
  tp_ram #(.DEPTH(DA), .WIDTH(W)) u_ram_a_hi (.clk, .we(we && !wsel), .waddr(wa), .wdata(whi),
                                              .raddr(ra), .rdata(a_hi));
  tp_ram #(.DEPTH(DB), .WIDTH(W)) u_ram_b_lo (.clk, .we(we && wsel), .waddr(wb), .wdata(wlo),
                                              .raddr(rb), .rdata(b_lo));
  tp_ram #(.DEPTH(DB), .WIDTH(W)) u_ram_b_hi (.clk, .we(we && wsel), .waddr(wb), .wdata(whi),
                                              .raddr(rb), .rdata(b_hi));

  assign fwd     = we && wsel && (widx == ridx);
  assign rd_even = rd_hi ? a_hi : a_lo;
  always_comb begin
    if (fwd) rd_odd = rd_hi ? whi : wlo;
    else     rd_odd = rd_hi ? b_hi : b_lo;
  end

endmodule
