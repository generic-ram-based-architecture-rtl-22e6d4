// tb_rpa_sched: self-checking test of the RPA slot scheduler.
//
// Drives random want_in/want_drain patterns into a three-level scheduler and a
// one-level scheduler and checks every slot against the rules worked out in
// the testbench: slot parity alternates; with one level that level gets every
// slot it wants; with three levels the first level gets every even slot it
// wants, never takes input in an odd slot, the lowest higher level with input
// waiting goes before any drain step, and a slot is granted whenever some
// level can use it.
module tb_rpa_sched;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [2:0] want_in, want_drain;
  logic       slot0, grant;
  logic [1:0] lvl;
  logic       w1_in, w1_dr, s1_slot0, s1_grant;
  logic       s1_lvl;

  int checks = 0, failures = 0;

  rpa_sched #(.J(3)) dut (.clk, .rst_n, .want_in, .want_drain, .slot0, .grant, .lvl);
  rpa_sched #(.J(1)) dut1 (.clk, .rst_n, .want_in(w1_in), .want_drain(w1_dr),
                           .slot0(s1_slot0), .grant(s1_grant), .lvl(s1_lvl));

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

  initial begin
    logic eg;
    int   el;
    logic prev_slot0;
    want_in = '0; want_drain = '0; w1_in = 1'b0; w1_dr = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    prev_slot0 = ~slot0;
    for (int s = 0; s < 2000; s++) begin
      want_in    = 3'($urandom);
      want_drain = 3'($urandom) & ~want_in;
      if (!slot0) want_in[0] = 1'b0;   // the top offers input only in even slots
      w1_in = $urandom_range(0, 1);
      w1_dr = !w1_in && ($urandom_range(0, 1) == 1);
      #1;
      check("slot parity alternates", slot0, !prev_slot0);
      prev_slot0 = slot0;
      // expected grant for three levels
      eg = 1'b0; el = 0;
      if (slot0 && (want_in[0] || want_drain[0])) begin eg = 1'b1; el = 0; end
      else if (want_in[1])    begin eg = 1'b1; el = 1; end
      else if (want_in[2])    begin eg = 1'b1; el = 2; end
      else if (want_drain[1]) begin eg = 1'b1; el = 1; end
      else if (want_drain[2]) begin eg = 1'b1; el = 2; end
      else if (want_drain[0]) begin eg = 1'b1; el = 0; end
      check("grant", grant, eg);
      if (eg) check("granted level", lvl, el);
      check("one level: slot0", s1_slot0, 1);
      check("one level: grant", s1_grant, w1_in || w1_dr);
      check("one level: level", s1_lvl, 0);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
