// tb_row_dwt: self-checking test of the row 1-D lifting module.
//
// Feeds NROW back-to-back random rows of N pixels (plus rows of extreme
// values), two pixels per cycle with random stalls, and compares every
// lowpass/highpass output with the line reference model (dwt_ref_pkg). Checks
// the rate (one output pair per advancing cycle) and the two-step latency:
// output pair n of the stream leaves after the edge of step n+2.
module tb_row_dwt;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 16;
  localparam int M = N / 2;
  localparam int NROW = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adv, in_valid, in_first, in_last, out_valid;
  logic [1:0] lvl;
  word_t in_even, in_odd;
  word_t out_lo, out_hi;

  int checks = 0, failures = 0;
  longint exp_lo [NROW*M], exp_hi [NROW*M];
  int nout = 0, step = 0, stalls = 0;

  row_dwt #(.J(1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // outputs: pair n must appear in the cycle after the edge of advancing step n+2
  logic adv_q = 1'b0;  // the last edge advanced the module
  always @(posedge clk) adv_q <= adv;
  always @(negedge clk) if (rst_n && out_valid && adv_q) begin
    check($sformatf("L[%0d]", nout), out_lo, exp_lo[nout]);
    check($sformatf("H[%0d]", nout), out_hi, exp_hi[nout]);
    check($sformatf("latency of pair %0d", nout), step, nout + 3);
    nout++;
  end

  initial begin
    line_t x, lo, hi;
    longint pix [NROW][N];
    x = new[N];
    for (int r = 0; r < NROW; r++) begin
      for (int c = 0; c < N; c++) begin
        case (r)
          1: pix[r][c] = (c % 2) ? 255 : 0;
          2: pix[r][c] = 255;
          default: pix[r][c] = $urandom_range(0, 255);
        endcase
        x[c] = pix[r][c] * 16;
      end
      lift1d(x, lo, hi);
      for (int i = 0; i < M; i++) begin exp_lo[r*M + i] = lo[i]; exp_hi[r*M + i] = hi[i]; end
    end
    lvl = '0; adv = 1'b0; in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0; in_even = '0; in_odd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int s = 0; s < NROW*M + 2; ) begin
      adv = ($urandom_range(0, 4) != 0);
      in_valid = (s < NROW*M);
      in_first = (s % M == 0);
      in_last  = (s % M == M - 1);
      in_even  = word_t'(pix[(s / M) % NROW][2*(s % M)] * 16);
      in_odd   = word_t'(pix[(s / M) % NROW][2*(s % M) + 1] * 16);
      @(posedge clk);
      if (adv) begin s++; step++; end else stalls++;
      #1;
    end
    adv = 1'b0;
    repeat (3) @(posedge clk);
    check("all pairs out", nout, NROW*M);
    check("stalls exercised", stalls > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
