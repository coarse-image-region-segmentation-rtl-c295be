// rf_frame_mem: one image frame of pixel data, raster-scan addressed.
//
// Used as the source memory (input image I, written once per frame) and as
// the destination memory (result O, initialised with I and rewritten every
// pass) of the pixel-serial processor. One write port and one read port, both
// synchronous to clk: read data appears the cycle after `re` with `raddr`.
// A read and a write to the same address in the same cycle return the old
// content. The memory itself is not reset; every location is written before
// it is read. Port arrangement and read latency are this design's choices.
module rf_frame_mem #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
