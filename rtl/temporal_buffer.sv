// temporal_buffer: the column module's register data, one set per image
// column.
//
// K0 = 4 two-port RAMs of N words, one per lifting-state word {t,u,v,w} of the
// column 1-D DWT module. The column module reads the state of column raddr,
// advances it by one lifting step and writes it back; each RAM therefore takes
// one read and one write per cycle. Write at the clock edge, asynchronous read
// of the word as it stands before this cycle's write. K0 RAMs of N words
// follow the document; the word layout is this design's.
module temporal_buffer
  import dwt_pkg::*;
#(
  parameter int unsigned N = 512  // image width
) (
  input  logic                  clk,
  input  logic                  we,
  input  logic [$clog2(N)-1:0]  waddr,
  input  lift_state_t           wdata,
  input  logic [$clog2(N)-1:0]  raddr,
  output lift_state_t           rdata
);

  word_t wd [K0];
  word_t rd [K0];

  assign wd = '{wdata.t, wdata.u, wdata.v, wdata.w};
  assign rdata = '{t: rd[0], u: rd[1], v: rd[2], w: rd[3]};

  for (genvar k = 0; k < K0; k++) begin : g_line
    tp_ram #(.DEPTH(N), .WIDTH(W)) u_line (
      .clk, .we, .waddr, .wdata(wd[k]), .raddr, .rdata(rd[k])
    );
  end

endmodule
