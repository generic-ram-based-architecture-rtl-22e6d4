// rpa_sched: slot scheduler of the recursive pyramid algorithm (RPA) for the
// shared row/column 1-D modules.
//
// Every cycle is one slot in which at most one level takes one step. With a
// single level (J = 1) that level owns every slot, so the 1-level transform
// runs at two pixels per cycle. With J > 1 the first level owns the even
// slots, which brings the input rate down to one pixel per cycle, and the
// levels above share the odd slots, the lowest level with an input pair
// waiting going first. A slot its owner cannot use is given to another
// level, input steps before drain steps; the first level never takes input
// in an odd slot. Inputs: want_in[l] (level l has an input pair and needs
// one), want_drain[l] (level l has a drain step pending). Outputs: grant and
// the granted level lvl (combinational), and slot0, high when the first level
// may take input in this slot. The slot interleaving follows the RPA schedule
// the document shows; the tie-break rules are this design's.
module rpa_sched #(
  parameter int unsigned J = 3
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [J-1:0]              want_in,
  input  logic [J-1:0]              want_drain,
  output logic                      slot0,
  output logic                      grant,
  output logic [$clog2(J+1)-1:0]    lvl
);

  localparam int unsigned LW = $clog2(J + 1);

  logic ph;  // slot parity

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= 1'b0;
    else        ph <= ~ph;
  end

  assign slot0 = (J == 1) || !ph;

  always_comb begin
    grant = 1'b0;
    lvl   = '0;
    if (slot0 && (want_in[0] || want_drain[0])) begin
      grant = 1'b1;
    end else begin
      for (int l = J - 1; l >= 1; l--) if (want_drain[l]) begin grant = 1'b1; lvl = LW'(l); end
      for (int l = J - 1; l >= 1; l--) if (want_in[l])    begin grant = 1'b1; lvl = LW'(l); end
      if (!grant && want_drain[0]) grant = 1'b1;
    end
  end

endmodule
