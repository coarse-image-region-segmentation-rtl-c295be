// rf_window3x3: the memory units a - i of the pixel-serial processor, i.e. the
// 3 x 3 neighbourhood of the target pixel e in a raster-scanned stream.
//
//      a b c        row above
//      d e f        current row
//      g h i        row below
//
// Built from nine registers and two one-line memories (rf_line_fifo, LINE_W
// pixels each). On every `shift` the newest pixel p enters at i; after that
// shift the window holds the neighbourhood of pixel p - LINE_W - 1 (at e).
// All nine taps change every shift, so the update logic sees a new target
// pixel each clock. Output `win` is indexed 0 = a ... 8 = i. Taps that fall
// outside the image (row/column wrap, start of stream) carry stale data and
// must be masked by the user. Registers are not reset.
module rf_window3x3 #(
  parameter int unsigned WIDTH  = 10,
  parameter int unsigned LINE_W = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift,
  input  logic [WIDTH-1:0]      din,
  output logic [8:0][WIDTH-1:0] win
);

  logic [WIDTH-1:0] l1_out, l2_out;
  logic [2:0][WIDTH-1:0] row0, row1, row2;   // [0] newest (right-most)

  rf_line_fifo #(.WIDTH(WIDTH), .DEPTH(LINE_W)) u_line1 (
    .clk, .rst_n, .shift, .din(din), .dout(l1_out)
  );
  rf_line_fifo #(.WIDTH(WIDTH), .DEPTH(LINE_W)) u_line2 (
    .clk, .rst_n, .shift, .din(l1_out), .dout(l2_out)
  );

  always_ff @(posedge clk) begin
    if (shift) begin
      row2 <= {row2[1:0], din};
      row1 <= {row1[1:0], l1_out};
      row0 <= {row0[1:0], l2_out};
    end
  end

  assign win = {row2[0], row2[1], row2[2],    // i h g
                row1[0], row1[1], row1[2],    // f e d
                row0[0], row0[1], row0[2]};   // c b a

endmodule
