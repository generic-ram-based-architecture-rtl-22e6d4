// tb_dwt2d_1level: end-to-end test of the line-based 2-D DWT configured for one
// level (J = 1), the 1-level architecture.
//
// Streams NIMG random images of N x N pixels through dwt2d_top with random
// input stalls and compares every LL, LH, HL and HH coefficient with the
// array-based reference model (dwt_ref_pkg). Also checks that every output
// position appears exactly once per image, the length of an image without
// stalls (N*N/2 input cycles plus 2.5N+4 drain cycles) and the latency of the
// first output (2N + N/2 + 5 cycles), and counts how often the design's
// mechanisms were exercised: input stall, drain, RAM_B write-through,
// same-cycle read-before-write in RAM_A and RAM_B, row and column boundary
// extension, both normalisation multipliers, back-to-back images.
module tb_dwt2d_1level;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N    = 16;
  localparam int M    = N / 2;
  localparam int NIMG = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_hband;
  logic [IN_W-1:0] in_even, in_odd;
  logic [$clog2(M)-1:0] out_row, out_col;
  logic out_level;
  word_t out_lo, out_hi;

  int checks = 0, failures = 0;
  int n_stall = 0, n_drain = 0, n_fwd = 0, n_rbw_a = 0, n_rbw_b = 0;
  int n_row_edge = 0, n_col_edge = 0, n_ll = 0, n_hh = 0, n_img = 0;

  dwt2d_top #(.N(N), .J(1)) dut (.*);

  always #5 clk = ~clk;

  line_t img [NIMG];
  line_t ll [NIMG], lh [NIMG], hl [NIMG], hh [NIMG];
  int    seen [NIMG][M*M*2];
  int    out_img = 0, out_cnt = 0;
  int    cyc = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_ready && !in_valid) n_stall++;
    if (!in_ready) n_drain++;
    if (dut.u_dbuf.fwd && dut.grant) n_fwd++;
    if (dut.grant && dut.lv_we[0] && !dut.lv_wsel[0] && dut.lv_act[0] && dut.lv_widx[0] == dut.lv_ridx[0]) n_rbw_a++;
    if (dut.grant && dut.lv_we[0] && dut.lv_wsel[0] && dut.lv_act[0] && dut.lv_widx[0] != dut.lv_ridx[0] &&
        dut.lv_widx[0][$clog2(M/2)-1:0] == dut.lv_ridx[0][$clog2(M/2)-1:0]) n_rbw_b++;
    if (dut.grant && in_ready && in_valid && dut.lv_last[0]) n_row_edge++;
    if (dut.grant && dut.lv_act[0] && dut.lv_fl[0].p1_last && dut.lv_cidx[0] == 0) n_col_edge++;
  end

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    int idx;
    idx = int'(out_row) * M + int'(out_col);
    if (out_img < NIMG) begin
      if (!out_hband) begin
        check($sformatf("img%0d LL[%0d][%0d]", out_img, out_row, out_col), out_lo, ll[out_img][idx]);
        check($sformatf("img%0d LH[%0d][%0d]", out_img, out_row, out_col), out_hi, lh[out_img][idx]);
        n_ll++;
      end else begin
        check($sformatf("img%0d HL[%0d][%0d]", out_img, out_row, out_col), out_lo, hl[out_img][idx]);
        check($sformatf("img%0d HH[%0d][%0d]", out_img, out_row, out_col), out_hi, hh[out_img][idx]);
        n_hh++;
      end
      seen[out_img][idx*2 + int'(out_hband)]++;
      out_cnt++;
      if (out_cnt == M*M*2) begin out_cnt = 0; out_img++; end
    end else begin
      failures++;
      $display("FAIL output beyond the last image");
    end
  end

  int t_first_in, t_first_out, t_ready_back;

  initial begin
    for (int k = 0; k < NIMG; k++) begin
      img[k] = new[N*N];
      for (int i = 0; i < N*N; i++) begin
        case (k)
          0: img[k][i] = $urandom_range(0, 255);
          1: img[k][i] = (i % 2) ? 255 : 0;                 // extreme checkerboard columns
          default: img[k][i] = ((i / N) * 13 + (i % N) * 7) % 256;
        endcase
      end
      dwt2d(N, img[k], 16, ll[k], lh[k], hl[k], hh[k]);
      foreach (seen[k][i]) seen[k][i] = 0;
    end
    in_valid = 1'b0; in_even = '0; in_odd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int k = 0; k < NIMG; k++) begin
      int pix;
      pix = 0;
      while (pix < N*N) begin
        // image 0 runs without stalls to check its length and latency
        in_valid = (k == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        in_even  = IN_W'(img[k][pix]);
        in_odd   = IN_W'(img[k][pix+1]);
        @(posedge clk);
        if (in_valid && in_ready) begin
          if (k == 0 && pix == 0) t_first_in = cyc;
          pix += 2;
        end
        #1;
      end
      in_valid = 1'b0;
      if (k == 0) begin
        wait (in_ready == 1'b1);
        t_ready_back = cyc;
      end
    end
    wait (out_img == NIMG);
    repeat (5) @(posedge clk);

    check("image length in cycles", t_ready_back - t_first_in, N*N/2 + 5*M + 4);
    for (int k = 0; k < NIMG; k++)
      foreach (seen[k][i]) check($sformatf("img%0d position %0d seen once", k, i), seen[k][i], 1);

    $display("mechanisms: stall=%0d drain=%0d ramb_fwd=%0d rbw_a=%0d rbw_b=%0d row_edge=%0d col_edge=%0d ll_norm=%0d hh_norm=%0d images=%0d",
             n_stall, n_drain, n_fwd, n_rbw_a, n_rbw_b, n_row_edge, n_col_edge, n_ll, n_hh, out_img);
    check("stall happened", n_stall > 0, 1);
    check("drain happened", n_drain > 0, 1);
    check("RAM_B write-through happened", n_fwd > 0, 1);
    check("RAM_A read-before-write happened", n_rbw_a > 0, 1);
    check("RAM_B read-before-write happened", n_rbw_b > 0, 1);
    check("row boundary happened", n_row_edge > 0, 1);
    check("column boundary happened", n_col_edge > 0, 1);
    check("LL normalisation happened", n_ll > 0, 1);
    check("HH normalisation happened", n_hh > 0, 1);
    check("back-to-back images", out_img, NIMG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latency of the first output of image 0
  initial begin
    wait (rst_n && out_valid);
    t_first_out = cyc;
    check("first output latency", t_first_out - t_first_in, 2*N + M + 5);
  end

endmodule
