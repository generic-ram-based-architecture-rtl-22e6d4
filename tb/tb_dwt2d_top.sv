// tb_dwt2d_top: end-to-end test of the multi-level line-based 2-D DWT (J = 3)
// with the RPA slot schedule.
//
// Streams NIMG random images of N x N pixels through dwt2d_top, with random
// input stalls in the second image, and compares every output coefficient of
// every level with the reference model applied level by level (each level
// transforms the normalised LL subband of the one below). Checks that every
// subband position of every level appears exactly once per image, that the
// first level takes one pixel pair every other cycle (N*N cycles for an
// image's input without stalls), and counts the mechanisms: input stalls,
// odd slots refused to the input, slots of each level, feedback pushes and
// pops, slots given away by their owner, waiting for the last level before a
// new image, RAM_B write-through, same-cycle read-before-write in RAM_A and
// RAM_B, row and column boundary extension, both normalisation multipliers,
// drains.
module tb_dwt2d_top;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 32;
  localparam int J = 3;
  localparam int NIMG = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_hband;
  logic [IN_W-1:0] in_even, in_odd;
  logic [1:0] out_level;
  logic [$clog2(N/2)-1:0] out_row, out_col;
  word_t out_lo, out_hi;

  int checks = 0, failures = 0;

  dwt2d_top #(.N(N), .J(J)) dut (.*);

  always #5 clk = ~clk;

  line_t img [NIMG];
  line_t ll [NIMG][J], lh [NIMG][J], hl [NIMG][J], hh [NIMG][J];
  int    seen [NIMG][J][];
  int    nout [NIMG][J];
  int    cur_img [J];
  int    n_stall = 0, n_odd_refused = 0, n_slot [J], n_push = 0, n_pop = 0;
  int    n_given = 0, n_blocked = 0, n_fwd = 0, n_drain [J];
  int    n_rbw_a = 0, n_rbw_b = 0, n_row_edge = 0, n_col_edge = 0, n_ll = 0, n_hh = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (in_ready && !in_valid) n_stall++;
    if (!in_ready && dut.lv_ready[0] && !dut.slot0) n_odd_refused++;
    if (dut.blocked) n_blocked++;
    if (dut.grant) begin
      n_slot[dut.lvl]++;
      if (dut.want_drain[dut.lvl]) n_drain[dut.lvl]++;
      if (dut.u_dbuf.fwd) n_fwd++;
      if (dut.lv_we[dut.lvl] && dut.lv_act[dut.lvl] &&
          !dut.lv_wsel[dut.lvl] && dut.u_dbuf.wa == dut.u_dbuf.ra) n_rbw_a++;
      if (dut.lv_we[dut.lvl] && dut.lv_act[dut.lvl] && dut.lv_widx[dut.lvl] != dut.lv_ridx[dut.lvl] &&
          dut.lv_wsel[dut.lvl] && dut.u_dbuf.wb == dut.u_dbuf.rb) n_rbw_b++;
      if (dut.want_in[dut.lvl] && dut.lv_last[dut.lvl]) n_row_edge++;
      if (dut.lv_act[dut.lvl] && dut.lv_fl[dut.lvl].p1_last) n_col_edge++;
      if ((dut.slot0 && dut.lvl != 0) || (!dut.slot0 && dut.lvl == 0)) n_given++;
    end
    for (int l = 1; l < J; l++) begin
      if (dut.fb_push[l]) n_push++;
      if (dut.lv_adv[l] && dut.lv_ready[l]) n_pop++;
    end
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int l, k, idx;
    if (out_hband) n_hh++; else n_ll++;
    l = int'(out_level);
    k = cur_img[l];
    idx = int'(out_row) * ((N >> l) / 2) + int'(out_col);
    if (k < NIMG) begin
      if (!out_hband) begin
        check($sformatf("img%0d L%0d LL[%0d][%0d]", k, l, out_row, out_col), out_lo, ll[k][l][idx]);
        check($sformatf("img%0d L%0d LH[%0d][%0d]", k, l, out_row, out_col), out_hi, lh[k][l][idx]);
      end else begin
        check($sformatf("img%0d L%0d HL[%0d][%0d]", k, l, out_row, out_col), out_lo, hl[k][l][idx]);
        check($sformatf("img%0d L%0d HH[%0d][%0d]", k, l, out_row, out_col), out_hi, hh[k][l][idx]);
      end
      idx = idx * 2 + int'(out_hband);
      seen[k][l][idx] = seen[k][l][idx] + 1;
      nout[k][l]++;
      if (nout[k][l] == ((N >> l) / 2) * ((N >> l) / 2) * 2) cur_img[l]++;
    end else begin
      failures++;
      $display("FAIL output beyond the last image");
    end
  end

  int t_first, t_last;

  initial begin
    for (int l = 0; l < J; l++) begin n_slot[l] = 0; n_drain[l] = 0; cur_img[l] = 0; end
    for (int k = 0; k < NIMG; k++) begin
      line_t src;
      img[k] = new[N*N];
      foreach (img[k][i]) img[k][i] = (k == 0) ? $urandom_range(0, 255) : ((i % 3 == 0) ? 255 : $urandom_range(0, 40));
      src = img[k];
      for (int l = 0; l < J; l++) begin
        dwt2d(N >> l, src, (l == 0) ? 16 : 1, ll[k][l], lh[k][l], hl[k][l], hh[k][l]);
        src = ll[k][l];
        seen[k][l] = new[((N >> l) / 2) * ((N >> l) / 2) * 2];
        foreach (seen[k][l][i]) seen[k][l][i] = 0;
        nout[k][l] = 0;
      end
    end
    in_valid = 1'b0; in_even = '0; in_odd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int k = 0; k < NIMG; k++) begin
      int pix, cyc;
      pix = 0; cyc = 0;
      while (pix < N*N) begin
        in_valid = (k == 0) ? 1'b1 : ($urandom_range(0, 3) != 0);
        in_even  = IN_W'(img[k][pix]);
        in_odd   = IN_W'(img[k][pix+1]);
        #1;
        if (in_valid && in_ready) begin
          if (pix == 0) cyc = 0;
          pix += 2;
        end
        @(posedge clk); #1;
        cyc++;
      end
      in_valid = 1'b0;
      if (k == 0) check("cycles for one image's input, no stalls", cyc, N*N - 1);
    end
    wait (cur_img[J-1] == NIMG);
    repeat (5) @(posedge clk);
    for (int k = 0; k < NIMG; k++) for (int l = 0; l < J; l++) begin
      int bad;
      bad = 0;
      foreach (seen[k][l][i]) if (seen[k][l][i] != 1) bad++;
      check($sformatf("img%0d level %0d positions not seen exactly once", k, l), bad, 0);
    end
    $display("more mechanisms: rbw_a=%0d rbw_b=%0d row_edge=%0d col_edge=%0d ll_norm=%0d hh_norm=%0d",
             n_rbw_a, n_rbw_b, n_row_edge, n_col_edge, n_ll, n_hh);
    check("RAM_A read-before-write", n_rbw_a > 0, 1);
    check("RAM_B read-before-write", n_rbw_b > 0, 1);
    check("row boundary extension", n_row_edge > 0, 1);
    check("column boundary extension", n_col_edge > 0, 1);
    check("LL/LH normalisation", n_ll > 0, 1);
    check("HL/HH normalisation", n_hh > 0, 1);
    $display("mechanisms: stall=%0d odd_refused=%0d slots=%0d/%0d/%0d drains=%0d/%0d/%0d push=%0d pop=%0d given=%0d blocked=%0d fwd=%0d",
             n_stall, n_odd_refused, n_slot[0], n_slot[1], n_slot[2], n_drain[0], n_drain[1], n_drain[2],
             n_push, n_pop, n_given, n_blocked, n_fwd);
    check("input stall happened", n_stall > 0, 1);
    check("odd slot refused to input", n_odd_refused > 0, 1);
    for (int l = 0; l < J; l++) begin
      check($sformatf("level %0d got slots", l), n_slot[l] > 0, 1);
      check($sformatf("level %0d drained", l), n_drain[l] > 0, 1);
    end
    check("feedback pushes = pops", n_push, n_pop);
    check("feedback pairs", n_push, NIMG * ((N/2)*(N/2) + (N/4)*(N/4)) / 2);
    check("slot given away", n_given > 0, 1);
    check("new image waited for the last level", n_blocked > 0, 1);
    check("RAM_B write-through", n_fwd > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
