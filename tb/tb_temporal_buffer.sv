// tb_temporal_buffer: self-checking test of the K0-line temporal buffer.
//
// Writes random lifting states to random columns and reads random columns,
// comparing every read with a testbench copy of the contents. Reads of the
// column being written in the same cycle must return the old state.
module tb_temporal_buffer;
  import dwt_pkg::*;

  localparam int N = 32;

  logic clk = 1'b0, we;
  logic [$clog2(N)-1:0] waddr, raddr;
  lift_state_t wdata, rdata;

  int checks = 0, failures = 0, same = 0;
  lift_state_t model [N];
  logic        known [N];

  temporal_buffer #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (known[i]) known[i] = 1'b0;
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int s = 0; s < 2000; s++) begin
      we    = ($urandom_range(0, 1) == 1);
      waddr = $clog2(N)'($urandom_range(0, N - 1));
      raddr = (s % 7 == 0) ? waddr : $clog2(N)'($urandom_range(0, N - 1));
      wdata = {$urandom, $urandom, $urandom};
      #1;
      if (known[raddr]) begin
        checks++;
        if (rdata !== model[raddr]) begin
          failures++;
          if (failures < 10) $display("FAIL column %0d: got %h expected %h", raddr, rdata, model[raddr]);
        end
        if (we && raddr == waddr) same++;
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; known[waddr] = 1'b1; end
      #1;
    end
    checks++;
    if (same == 0) begin failures++; $display("FAIL no same-cycle read and write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
