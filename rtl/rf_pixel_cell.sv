// rf_pixel_cell: one pixel of the pixel-parallel resistive-fuse network.
//
// REG1 holds the input I and REG2 the output O, both N bits. Every update
// of the network takes two steps, chosen by `step` (the two phases of the
// published circuit's CLK):
//   step 0 (CLK high): O <= O + sign(I - O) * LUT1(|I - O|)
//                      where LUT1 holds sigma * x;
//   step 1 (CLK low) : O <= O + sum over the four neighbours j of
//                      sign(O_j - O) * LUT2(|O_j - O|)
//                      where LUT2 is LUT2A, LUT2B or LUT2C as chosen by the
//                      one-hot clka / clkb / clkc.
// A step is carried out on a clock edge with `en` high. `load` writes I into
// REG1 and, as the initial value, into REG2. Neighbours with nbr_en low (the
// array border) contribute nothing. The result is clamped to 0 .. 2**N - 1.
//
// The register, LUT and step structure follow the published pixel circuit.
// Evaluating the four neighbour terms in one step with one LUT2 copy per
// neighbour, the 4-neighbour grid, one system clock per step and the
// clamping are this design's choices.
module rf_pixel_cell
  import rf_pkg::*;
#(
  parameter int unsigned N       = PAR_N,
  parameter int unsigned K       = PAR_K,
  parameter int unsigned G_NUM   = PAR_G_NUM,
  parameter int unsigned G_SHIFT = PAR_G_SHIFT,
  parameter int unsigned S_NUM   = PAR_S_NUM,
  parameter int unsigned S_SHIFT = PAR_S_SHIFT,
  parameter int unsigned DELTA_A = PAR_DELTA_A,
  parameter int unsigned DELTA_B = PAR_DELTA_B,
  parameter int unsigned DELTA_C = PAR_DELTA_C
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [N-1:0]      load_data,
  input  logic              en,
  input  logic              step,
  input  logic              clka,
  input  logic              clkb,
  input  logic              clkc,
  input  logic [3:0][N-1:0] nbr,       // N, E, S, W neighbour outputs
  input  logic [3:0]        nbr_en,
  output logic [N-1:0]      o,
  output logic [3:0]        blown      // fuse towards each neighbour blown
);

  localparam int unsigned SW = N + K + 4;

  logic [N-1:0] reg1, reg2;
  assign o = reg2;

  // table select from the one-hot phase lines
  logic [1:0] sel;
  always_comb begin
    if (clka)      sel = 2'd0;
    else if (clkb) sel = 2'd1;
    else if (clkc) sel = 2'd2;
    else           sel = 2'd0;
  end

  function automatic logic [N-1:0] absdiff(input logic [N-1:0] p, input logic [N-1:0] q);
    return (p >= q) ? p - q : q - p;
  endfunction

  // LUT1: sigma * |I - O|
  logic [K-1:0] y1;
  logic         unused_b1;
  rf_lut #(.NIN(N), .KOUT(K), .NTAB(1), .SLOPE_NUM(S_NUM), .SLOPE_SHIFT(S_SHIFT),
           .DELTA0(2 ** N)) u_lut1 (
    .sel(1'b0), .x(absdiff(reg1, reg2)), .y(y1), .blown(unused_b1)
  );

  // LUT2A-C: G(|O_j - O|), one copy per neighbour
  logic [3:0][K-1:0] y2;
  for (genvar j = 0; j < 4; j++) begin : g_lut2
    rf_lut #(.NIN(N), .KOUT(K), .NTAB(3), .SLOPE_NUM(G_NUM), .SLOPE_SHIFT(G_SHIFT),
             .DELTA0(DELTA_A), .DELTA1(DELTA_B), .DELTA2(DELTA_C)) u_lut2 (
      .sel(sel), .x(absdiff(nbr[j], reg2)), .y(y2[j]), .blown(blown[j])
    );
  end

  logic signed [SW-1:0] next;
  always_comb begin
    next = $signed(SW'({1'b0, reg2}));
    if (!step) begin
      if (reg1 >= reg2) next += $signed(SW'({1'b0, y1}));
      else              next -= $signed(SW'({1'b0, y1}));
    end else begin
      for (int j = 0; j < 4; j++) begin
        if (nbr_en[j]) begin
          if (nbr[j] >= reg2) next += $signed(SW'({1'b0, y2[j]}));
          else                next -= $signed(SW'({1'b0, y2[j]}));
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg1 <= '0;
      reg2 <= '0;
    end else if (load) begin
      reg1 <= load_data;
      reg2 <= load_data;
    end else if (en) begin
      if (next < 0)                              reg2 <= '0;
      else if (next > $signed(SW'({N{1'b1}})))   reg2 <= '1;
      else                                       reg2 <= N'(next);
    end
  end

endmodule
