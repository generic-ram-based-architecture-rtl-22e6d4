// tb_col_dwt: self-checking test of the column lifting module and its
// temporal buffer.
//
// Treats an N x N array of random coefficient words as row-transform output
// and runs the column passes a 1-level 2-D DWT would: pass p (0..N/2+1) visits
// every column once, offering rows 2p and 2p+1 of that column, with the pass
// flags of dwt_ctrl; passes N/2 and N/2+1 only drain. Random stall cycles are
// inserted. The vertical lowpass/highpass leaving for pass p, column j must
// equal the line model (dwt_ref_pkg) of column j at index p-2. Also checks
// that exactly N*N/2 pairs leave and that each leaves one advancing step after
// its column step.
module tb_col_dwt;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 8;
  localparam int M = N / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adv, act, out_valid;
  logic [$clog2(N)-1:0] col;
  lift_flags_t fl;
  word_t e, o, out_lo, out_hi;

  int checks = 0, failures = 0, nout = 0, stalls = 0;
  longint a [N][N];         // a[row][col]
  longint elo [N][M], ehi [N][M];
  int exp_p, exp_j;         // column step of the pair now in the output register
  logic adv_q = 1'b0;

  col_dwt #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) adv_q <= adv;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && adv_q && out_valid) begin
    check($sformatf("lo col %0d row %0d", exp_j, exp_p - 2), out_lo, elo[exp_j][exp_p - 2]);
    check($sformatf("hi col %0d row %0d", exp_j, exp_p - 2), out_hi, ehi[exp_j][exp_p - 2]);
    nout++;
  end

  initial begin
    line_t x, l, h;
    x = new[N];
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++)
      a[r][c] = longint'($urandom_range(0, 32767)) - 16384;
    for (int c = 0; c < N; c++) begin
      for (int r = 0; r < N; r++) x[r] = a[r][c];
      lift1d(x, l, h);
      for (int m = 0; m < M; m++) begin elo[c][m] = l[m]; ehi[c][m] = h[m]; end
    end
    adv = 1'b0; act = 1'b0; col = '0; fl = '0; e = '0; o = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int p = 0; p < M + 2; p++) begin
      for (int j = 0; j < N; ) begin
        adv = ($urandom_range(0, 3) != 0);
        act = 1'b1;
        col = j[$clog2(N)-1:0];
        fl  = '{cur_valid: p < M, cur_first: p == 0, cur_last: p == M - 1,
                p1_valid: p >= 1 && p <= M, p1_first: p == 1, p1_last: p == M,
                p2_valid: p >= 2, p2_first: p == 2, p2_last: p == M + 1};
        e = (p < M) ? word_t'(a[2*p][j]) : word_t'($urandom);
        o = (p < M) ? word_t'(a[2*p+1][j]) : word_t'($urandom);
        @(posedge clk);
        if (adv) begin exp_p = p; exp_j = j; j++; end else stalls++;
        #1;
      end
    end
    adv = 1'b0; act = 1'b0;
    repeat (3) @(posedge clk);
    check("pairs out", nout, N * M);
    check("stalls exercised", stalls > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
