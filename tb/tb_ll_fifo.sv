// tb_ll_fifo: self-checking test of the LL feedback FIFO.
//
// Random pushes and pops (never into a full FIFO) against a testbench queue:
// not_empty and the head pair must match the queue in every cycle, and the
// FIFO must reach its full depth at least once.
module tb_ll_fifo;
  import dwt_pkg::*;

  localparam int DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, not_empty;
  word_t push_even, push_odd, head_even, head_odd;

  int checks = 0, failures = 0, full_seen = 0;
  word_t qe [$], qo [$];

  ll_fifo #(.DEPTH(DEPTH)) dut (.*);

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
    push = 1'b0; pop = 1'b0; push_even = '0; push_odd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int s = 0; s < 2000; s++) begin
      pop  = ($urandom_range(0, 2) == 0);
      push = ($urandom_range(0, 1) == 1) && (qe.size() < DEPTH || (pop && qe.size() > 0));
      push_even = word_t'($urandom);
      push_odd  = word_t'($urandom);
      #1;
      check("not_empty", not_empty, qe.size() > 0);
      if (qe.size() > 0) begin
        check("head_even", head_even, qe[0]);
        check("head_odd", head_odd, qo[0]);
      end
      if (qe.size() == DEPTH) full_seen++;
      @(posedge clk);
      if (pop && qe.size() > 0) begin void'(qe.pop_front()); void'(qo.pop_front()); end
      if (push) begin qe.push_back(push_even); qo.push_back(push_odd); end
      #1;
    end
    check("FIFO filled to its depth", full_seen > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
