// rf_serial_update: the arithmetic of the pixel-serial resistive-fuse
// processor. Given the 3 x 3 window a - i around the target pixel e and the
// input pixel s (from the source memory), it computes one step of
//     e' = e + sum_{j in a-d, f-i} sign(j - e) * G(|j - e|)
//            + sign(s - e) * sigma(|s - e|)
// with all nine differences formed at the same time.
//
// Bit-shift operation: O values (window, e, result) carry FRAC = M extra
// fraction bits below the N-bit grey level, and the input pixel s is shifted
// left by M before the subtraction. The LUTs are addressed by the integer
// part of each difference magnitude and return K-bit currents in units of
// 2^-M grey levels, so small updates accumulate instead of being lost. The
// result is clamped to the O range.
//
// `mask` enables each neighbour (bit order a b c d f g h i = 0..7); masked
// neighbours lie outside the image and contribute no current. `sel` chooses
// LUT2A/B/C. `edge_o` flags a blown fuse towards the right (f) or lower (h)
// neighbour in the selected table. `tag` is carried along unchanged.
//
// Timing: two register stages. Stage 1 registers the nine signed currents,
// stage 2 the clamped sum; a result leaves two cycles after its inputs.
// The split into two stages and the clamping are this design's choices.
module rf_serial_update
  import rf_pkg::*;
#(
  parameter int unsigned N       = SER_N,
  parameter int unsigned FRAC    = SER_M,
  parameter int unsigned K       = SER_K,
  parameter int unsigned G_NUM   = SER_G_NUM,
  parameter int unsigned G_SHIFT = SER_G_SHIFT,
  parameter int unsigned S_NUM   = SER_S_NUM,
  parameter int unsigned S_SHIFT = SER_S_SHIFT,
  parameter int unsigned DELTA_A = SER_DELTA_A,
  parameter int unsigned DELTA_B = SER_DELTA_B,
  parameter int unsigned DELTA_C = SER_DELTA_C,
  parameter int unsigned TAGW    = 16,
  localparam int unsigned OW     = N + FRAC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                valid_i,
  input  logic [TAGW-1:0]     tag_i,
  input  logic [8:0][OW-1:0]  win,
  input  logic [N-1:0]        s,
  input  logic [7:0]          mask,
  input  phase_e              sel,
  output logic                valid_o,
  output logic [TAGW-1:0]     tag_o,
  output logic [OW-1:0]       o_new,
  output logic                edge_o
);

  localparam int unsigned DW = OW + 1;        // signed difference width
  localparam int unsigned CW = K + 1;         // signed current width
  localparam int unsigned SW = OW + K + 5;    // signed sum width

  logic [OW-1:0] e;
  assign e = win[4];

  // ---- stage 1: nine differences -> LUT currents ----
  logic [8:0][OW-1:0]   other;   // a b c d f g h i, then s<<M
  logic [8:0]           en;
  logic [8:0]           neg;
  logic [8:0][N-1:0]    mag;
  logic [8:0][K-1:0]    cur;
  logic [8:0]           blown;

  always_comb begin
    for (int j = 0; j < 4; j++) other[j] = win[j];
    for (int j = 4; j < 8; j++) other[j] = win[j+1];
    other[8] = {s, {FRAC{1'b0}}};
    en = {1'b1, mask};
    for (int j = 0; j < 9; j++) begin
      logic signed [DW-1:0] d;
      logic        [OW-1:0] ad;
      d      = $signed({1'b0, other[j]}) - $signed({1'b0, e});
      neg[j] = d[DW-1];
      ad     = neg[j] ? OW'(-d) : OW'(d);
      mag[j] = ad[OW-1:FRAC];
    end
  end

  for (genvar j = 0; j < 8; j++) begin : g_lut2
    rf_lut #(
      .NIN(N), .KOUT(K), .NTAB(3), .SLOPE_NUM(G_NUM), .SLOPE_SHIFT(G_SHIFT),
      .DELTA0(DELTA_A), .DELTA1(DELTA_B), .DELTA2(DELTA_C)
    ) u_lut2 (
      .sel(sel), .x(mag[j]), .y(cur[j]), .blown(blown[j])
    );
  end

  rf_lut #(
    .NIN(N), .KOUT(K), .NTAB(1), .SLOPE_NUM(S_NUM), .SLOPE_SHIFT(S_SHIFT),
    .DELTA0(2 ** N)
  ) u_lut1 (
    .sel(1'b0), .x(mag[8]), .y(cur[8]), .blown(blown[8])
  );

  logic                       s1_valid;
  logic [TAGW-1:0]            s1_tag;
  logic [OW-1:0]              s1_e;
  logic [8:0][CW-1:0]         s1_cur;
  logic                       s1_edge;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= valid_i;
  end

  always_ff @(posedge clk) begin
    s1_tag  <= tag_i;
    s1_e    <= e;
    s1_edge <= (blown[4] & mask[4]) | (blown[6] & mask[6]);   // f, h
    for (int j = 0; j < 9; j++) begin
      logic signed [CW-1:0] c;
      c = $signed({1'b0, cur[j]});
      if (!en[j])      s1_cur[j] <= '0;
      else if (neg[j]) s1_cur[j] <= CW'(-c);
      else             s1_cur[j] <= CW'(c);
    end
  end

  // ---- stage 2: accumulate and clamp ----
  logic signed [SW-1:0] sum;
  always_comb begin
    sum = $signed(SW'({1'b0, s1_e}));
    for (int j = 0; j < 9; j++) sum += SW'($signed(s1_cur[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= s1_valid;
  end

  always_ff @(posedge clk) begin
    tag_o  <= s1_tag;
    edge_o <= s1_edge;
    if (sum < 0)                                 o_new <= '0;
    else if (sum > $signed(SW'({OW{1'b1}})))     o_new <= '1;
    else                                         o_new <= OW'(sum);
  end

endmodule
