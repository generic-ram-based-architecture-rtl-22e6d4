// tb_dwt_normalize: self-checking test of the two-multiplier normalisation.
//
// Random vertical-lowpass/highpass pairs of both column kinds, with random
// stalls. For hband = 0 the lowpass (LL) must come out multiplied by 1/S^2 and
// the highpass (LH) unchanged; for hband = 1 the lowpass (HL) unchanged and
// the highpass (HH) multiplied by S^2. Expected values are worked out in real
// arithmetic with S = 1.230174104914001 and must lie within half a unit plus the
// error of holding the constants at 12 fractional bits.
// The result appears one advancing cycle after the input.
module tb_dwt_normalize;
  import dwt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adv, in_valid, hband, out_valid, out_hband;
  word_t in_lo, in_hi, out_lo, out_hi;

  int checks = 0, failures = 0, n_ll = 0, n_hh = 0;
  real S = 1.230174104914001;

  dwt_normalize dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(string what, longint got, real exp, real tol);
    checks++;
    if ((real'(got) - exp) > tol || (exp - real'(got)) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %f", what, got, exp);
    end
  endtask

  task automatic exact(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint lo, hi;
    logic hb, v;
    adv = 1'b0; in_valid = 1'b0; hband = 1'b0; in_lo = '0; in_hi = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int s = 0; s < 1000; s++) begin
      lo = longint'($urandom_range(0, 40000)) - 20000;
      hi = longint'($urandom_range(0, 40000)) - 20000;
      hb = $urandom_range(0, 1);
      v  = ($urandom_range(0, 7) != 0);
      adv = ($urandom_range(0, 3) != 0);
      in_valid = v; hband = hb; in_lo = word_t'(lo); in_hi = word_t'(hi);
      @(posedge clk); #1;
      exact("out_valid", out_valid, adv && v);
      if (adv && v) begin
        exact("out_hband", out_hband, hb);
        if (!hb) begin
          near("LL * 1/S^2", out_lo, real'(lo) / (S * S), 0.51 + 20000.0 * 0.5 / 4096.0);
          exact("LH unscaled", out_hi, hi);
          n_ll++;
        end else begin
          exact("HL unscaled", out_lo, lo);
          near("HH * S^2", out_hi, real'(hi) * S * S, 0.51 + 20000.0 * 0.5 / 4096.0);
          n_hh++;
        end
      end
    end
    exact("both kinds seen", (n_ll > 0) && (n_hh > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
