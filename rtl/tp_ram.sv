// tp_ram: two-port RAM, one write port and one read port, DEPTH words of
// WIDTH bits.
//
// The write happens at the rising clock edge when we = 1. The read is
// asynchronous: rdata shows the word at raddr as it stands before this
// cycle's write, so a read and a write of the same address in one cycle
// return the old word. Contents are not reset. This is the storage element
// of both line buffers; its read timing is this design's choice.
module tp_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 20
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
