// rf_parallel_array: pixel-parallel resistive-fuse network, a W x H grid of
// rf_pixel_cell updated all at once under one rf_parallel_ctrl.
//
// Interface: while idle, `load` with `addr` (raster index row*W + col) and
// `load_data` writes one cell's I and initial O. `start` runs the 3 x R
// iteration schedule (6R clock cycles); `busy` is high meanwhile and `done`
// pulses at the end. `rd_data` always shows O of the cell at `addr`
// (combinational read), `rd_edge` whether the fuse between that cell and its
// right or lower neighbour is blown in the current table. Each cell is wired
// to its four nearest neighbours; the border cells lack the missing ones.
//
// The array size is not published (only that it is limited by chip area);
// 8 x 8 is this design's default. The load/read port is also this design's
// choice.
module rf_parallel_array
  import rf_pkg::*;
#(
  parameter int unsigned W = PAR_W,
  parameter int unsigned H = PAR_H,
  parameter int unsigned R = R_ITER,
  parameter int unsigned N = PAR_N,
  parameter int unsigned K = PAR_K,
  localparam int unsigned NCELL = W * H,
  localparam int unsigned AW    = (NCELL > 1) ? $clog2(NCELL) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] addr,
  input  logic [N-1:0]  load_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  rd_data,
  output logic          rd_edge
);

  logic en, step, clka, clkb, clkc;

  rf_parallel_ctrl #(.R(R)) u_ctrl (
    .clk, .rst_n, .start, .en, .step, .clka, .clkb, .clkc, .busy, .done
  );

  logic [N-1:0] o [H][W];
  logic [3:0]   blown [H][W];

  for (genvar y = 0; y < H; y++) begin : g_row
    for (genvar x = 0; x < W; x++) begin : g_col
      logic [3:0][N-1:0] nbr;
      logic [3:0]        nbr_en;
      // N, E, S, W
      assign nbr[0]    = (y > 0)     ? o[(y > 0) ? y - 1 : 0][x] : '0;
      assign nbr[1]    = (x < W - 1) ? o[y][(x < W - 1) ? x + 1 : x] : '0;
      assign nbr[2]    = (y < H - 1) ? o[(y < H - 1) ? y + 1 : y][x] : '0;
      assign nbr[3]    = (x > 0)     ? o[y][(x > 0) ? x - 1 : 0] : '0;
      assign nbr_en    = {x > 0, y < H - 1, x < W - 1, y > 0};

      rf_pixel_cell #(.N(N), .K(K)) u_cell (
        .clk, .rst_n,
        .load(load && !busy && (32'(addr) == y * W + x)),
        .load_data,
        .en, .step, .clka, .clkb, .clkc,
        .nbr, .nbr_en,
        .o(o[y][x]), .blown(blown[y][x])
      );
    end
  end

  always_comb begin
    rd_data = '0;
    rd_edge = 1'b0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        if (32'(addr) == y * W + x) begin
          rd_data = o[y][x];
          rd_edge = (blown[y][x][1] && x < W - 1) || (blown[y][x][2] && y < H - 1);
        end
  end

endmodule
