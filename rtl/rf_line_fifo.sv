// rf_line_fifo: one-line memory, a FIFO that delays a pixel stream by exactly
// one image row (DEPTH pixels).
//
// Implemented as a circular buffer with one pointer: on every `shift` the
// word under the pointer is replaced by `din` and the pointer advances.
// `dout` shows the word under the pointer, i.e. the `din` of DEPTH shifts
// earlier, combinationally (asynchronous read, as a distributed RAM). Only the
// pointer is reset; until DEPTH shifts have happened `dout` is stale data,
// which the processor masks as lying outside the image. The circular-buffer
// construction is this design's choice.
module rf_line_fifo #(
  parameter int unsigned WIDTH = 10,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned PW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (shift) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ptr <= '0;
    else if (shift) ptr <= (32'(ptr) == DEPTH - 1) ? '0 : ptr + 1'b1;
  end

endmodule
