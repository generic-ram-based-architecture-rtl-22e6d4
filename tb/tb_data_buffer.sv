// tb_data_buffer: self-checking test of the 1.5N data buffer.
//
// Plays the lock-step data flow of a 1-level transform on NR rows of random
// words: from step q, row q/M position q mod M (M = N/2) is written (even rows
// to RAM_A, odd rows to RAM_B), and from step M on one column per step is
// read, pass p = (q-M)/N combining rows 2p and 2p+1 in the order
// L0,H0,L1,H1,... Every even-row and odd-row word read must be the word
// written for that row and column. Also counts the write-through and the
// same-slot read-before-write cases, which must both occur.
module tb_data_buffer;
  import dwt_pkg::*;

  localparam int N  = 16;
  localparam int M  = N / 2;
  localparam int NR = 6;   // rows, even

  logic clk = 1'b0;
  logic we, wsel, rd_hi, fwd;
  logic lvl = 1'b0;
  logic [$clog2(M)-1:0] widx, ridx;
  word_t wlo, whi, rd_even, rd_odd;

  int checks = 0, failures = 0, n_fwd = 0, n_old = 0;
  longint lo [NR][M], hi [NR][M];

  data_buffer #(.N(N), .J(1)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    for (int r = 0; r < NR; r++) for (int i = 0; i < M; i++) begin
      lo[r][i] = longint'($urandom_range(0, 65535)) - 32768;
      hi[r][i] = longint'($urandom_range(0, 65535)) - 32768;
    end
    we = 1'b0; wsel = 1'b0; widx = '0; wlo = '0; whi = '0; ridx = '0; rd_hi = 1'b0;
    @(posedge clk); #1;
    for (int q = 0; q < NR * M + M; q++) begin
      int k, p, j, r, i;
      r = q / M; i = q % M;
      we   = (r < NR);
      wsel = r[0];
      widx = i[$clog2(M)-1:0];
      wlo  = (r < NR) ? word_t'(lo[r][i]) : '0;
      whi  = (r < NR) ? word_t'(hi[r][i]) : '0;
      k = q - M; p = k / N; j = k % N;
      ridx  = (k >= 0) ? (j / 2) : 0;
      rd_hi = (k >= 0) ? j[0] : 1'b0;
      #1;
      if (k >= 0) begin
        check($sformatf("even row %0d col %0d", 2*p, j), rd_even,
              j[0] ? hi[2*p][j/2] : lo[2*p][j/2]);
        check($sformatf("odd row %0d col %0d", 2*p+1, j), rd_odd,
              j[0] ? hi[2*p+1][j/2] : lo[2*p+1][j/2]);
        if (fwd) n_fwd++;
        if (we && (widx % (M/2)) == (ridx % (M/2)) && widx != ridx) n_old++;
      end
      @(posedge clk); #1;
    end
    $display("write-through %0d, same-slot old reads %0d", n_fwd, n_old);
    check("write-through exercised", n_fwd > 0, 1);
    check("same-slot read-before-write exercised", n_old > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
