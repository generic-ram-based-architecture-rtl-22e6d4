// tb_lift97_core: self-checking test of the combinational (9,7) lifting step.
//
// Keeps the four state words in testbench registers and streams lines of
// several lengths (2, 3, 5, 8 and 16 pairs) back to back through the core,
// then two empty steps to drain. Every lowpass/highpass output is compared
// with the array-based line model (dwt_ref_pkg), which applies the symmetric
// extension explicitly. Line lengths of two pairs exercise a step that is at
// once the second and the last of its line.
module tb_lift97_core;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int NL = 6;
  localparam int LEN [NL] = '{2, 3, 5, 8, 16, 2};  // pairs per line

  word_t e, o, lo, hi;
  lift_state_t st, st_nxt;
  lift_flags_t fl;
  int checks = 0, failures = 0;

  lift97_core dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ev [$], ov [$], elo [$], ehi [$];
    logic   ff [$], fla [$];
    line_t  x, l, h;
    int     total, nout;
    logic [2:0] p1, p2;
    for (int n = 0; n < NL; n++) begin
      x = new[2*LEN[n]];
      foreach (x[i]) x[i] = longint'($urandom_range(0, 8191)) - 4096;
      lift1d(x, l, h);
      for (int i = 0; i < LEN[n]; i++) begin
        ev.push_back(x[2*i]); ov.push_back(x[2*i+1]);
        ff.push_back(i == 0); fla.push_back(i == LEN[n] - 1);
        elo.push_back(l[i]); ehi.push_back(h[i]);
      end
    end
    total = ev.size();
    st = '0; p1 = '0; p2 = '0; nout = 0;
    for (int s = 0; s < total + 2; s++) begin
      e  = (s < total) ? word_t'(ev[s]) : '0;
      o  = (s < total) ? word_t'(ov[s]) : '0;
      fl = '{cur_valid: s < total, cur_first: (s < total) ? ff[s] : 1'b0,
             cur_last: (s < total) ? fla[s] : 1'b0,
             p1_valid: p1[2], p1_first: p1[1], p1_last: p1[0],
             p2_valid: p2[2], p2_first: p2[1], p2_last: p2[0]};
      #1;
      if (p2[2]) begin
        check($sformatf("lo[%0d]", nout), lo, elo[nout]);
        check($sformatf("hi[%0d]", nout), hi, ehi[nout]);
        nout++;
      end
      st = st_nxt;
      p2 = p1;
      p1 = {fl.cur_valid, fl.cur_first, fl.cur_last};
      #1;
    end
    check("outputs after two drain steps", nout, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
