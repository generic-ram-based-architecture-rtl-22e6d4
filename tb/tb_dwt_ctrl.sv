// tb_dwt_ctrl: self-checking test of the 1-level schedule.
//
// Runs the controller through NIMG images with random input stalls and random
// withdrawal of the slot (en), and checks,
// at every advancing step, against counters kept by the testbench:
//  - in_ready is high for exactly N*N/2 advancing steps per image, then low for
//    the 2.5N+4 drain steps; adv equals en && in_valid while in_ready, en
//    otherwise
//  - row_first/row_last mark pair 0 and pair N/2-1 of each row
//  - data buffer writes: N*N/2 per image, in raster order, row parity on
//    buf_wsel, the first one three steps after the first input
//  - column steps: (N/2+2)*N per image, pass by pass and column by column, the
//    first in the same step as the write of row 1, pair 0; read position j/2
//    of half j mod 2; pass flags first/last/valid for the pair entering and the
//    two before it; output position (p-2, j/2)
//  - frame_end on the last step only.
module tb_dwt_ctrl;
  import dwt_pkg::*;

  localparam int N = 8;
  localparam int M = N / 2;
  localparam int NIMG = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, in_valid, in_ready, adv, row_first, row_last, want_in, want_drain;
  logic buf_we, buf_wsel, col_act, buf_rd_hi, out_hband, frame_end;
  logic [$clog2(M)-1:0] buf_widx, buf_ridx, out_row, out_col;
  logic [$clog2(N)-1:0] col_idx;
  lift_flags_t col_fl;

  int checks = 0, failures = 0, stalls = 0;

  dwt_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nin, nw, nk, step;
    lift_flags_t ef;
    in_valid = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int img = 0; img < NIMG; img++) begin
      nin = 0; nw = 0; nk = 0; step = 0;
      while (1) begin
        in_valid = ($urandom_range(0, 3) != 0);
        en = ($urandom_range(0, 4) != 0);
        #1;
        check("in_ready", in_ready, nin < N*M);
        check("want_in", want_in, in_ready && in_valid);
        check("want_drain", want_drain, !in_ready);
        check("adv", adv, en && (in_ready ? in_valid : 1'b1));
        if (!adv) stalls++;
        if (adv) begin
          if (in_ready) begin
            check("row_first", row_first, (nin % M) == 0);
            check("row_last", row_last, (nin % M) == M - 1);
          end
          check("buf_we", buf_we, step >= 3 && nw < N*M);
          if (buf_we) begin
            check("buf_wsel", buf_wsel, (nw / M) % 2);
            check("buf_widx", buf_widx, nw % M);
          end
          check("col_act", col_act, step >= 3 + M && nk < (M+2)*N);
          if (col_act) begin
            int p, j;
            p = nk / N; j = nk % N;
            if (nk == 0) check("first column step with row 1 pair 0", nw, M);
            check("col_idx", col_idx, j);
            check("buf_ridx", buf_ridx, j / 2);
            check("buf_rd_hi", buf_rd_hi, j % 2);
            ef = '{cur_valid: p < M, cur_first: p == 0, cur_last: p == M-1,
                   p1_valid: p >= 1 && p <= M, p1_first: p == 1, p1_last: p == M,
                   p2_valid: p >= 2, p2_first: p == 2, p2_last: p == M+1};
            check("col_fl", col_fl, ef);
            if (p >= 2) begin
              check("out_row", out_row, p - 2);
              check("out_col", out_col, j / 2);
              check("out_hband", out_hband, j % 2);
            end
          end
          check("frame_end", frame_end, step == N*M + 5*M + 3);
        end
        @(posedge clk);
        if (adv) begin
          if (in_ready && in_valid) nin++;
          if (buf_we) nw++;
          if (col_act) nk++;
          step++;
          if (frame_end) break;
        end
        #1;
      end
      #1;
      check("steps per image", step, N*M + 5*M + 4);
      check("writes per image", nw, N*M);
      check("column steps per image", nk, (M+2)*N);
    end
    check("stalls exercised", stalls > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
