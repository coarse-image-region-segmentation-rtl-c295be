// rf_serial_seg: pixel-serial resistive-fuse network for coarse region
// segmentation. One processing circuit updates every pixel of the image in
// turn, in raster order, one pixel per clock.
//
// Data flow: an input frame (N-bit pixels, raster order, in_valid/in_ready)
// is written to the source memory Smem (I) and, shifted left by M bits, to
// the destination memory (initial O = I). Each pass streams the destination
// memory through the 3 x 3 window (registers plus one-line memories), and the
// update unit computes the new value of the window centre e from a - d,
// f - i and Smem at once; the result is written back to the destination
// memory at e's address. Because a pixel's write-back happens after all of
// its neighbours' updates of the same pass have read it, each pass is an
// exact Jacobi step of the network equation. The passes run 3 annealing
// phases (LUT2A linear, LUT2B, LUT2C resistive fuse) of R passes each.
//
// Output: during the final pass every result pixel is also sent out in
// raster order (out_valid, one per clock, no back-pressure), rounded to N
// bits, with out_edge set where the fuse to the right or lower neighbour is
// blown; out_last marks the last pixel of the frame. The next frame can be
// loaded after out_last. At 64 x 64 pixels and R = 30 one frame takes
// 4096 + 368640 + 65 + 4 cycles, 9.3 ms at 40 MHz.
//
// Image size, R, N, M, K and the memory organisation follow the published
// design; the handshake, write-back schedule, border masking, rounding and
// the edge output format are this design's choices.
module rf_serial_seg
  import rf_pkg::*;
#(
  parameter int unsigned IMG_W   = SER_IMG_W,
  parameter int unsigned IMG_H   = SER_IMG_H,
  parameter int unsigned R       = R_ITER,
  parameter int unsigned N       = SER_N,
  parameter int unsigned M       = SER_M,
  parameter int unsigned K       = SER_K,
  parameter int unsigned G_NUM   = SER_G_NUM,
  parameter int unsigned G_SHIFT = SER_G_SHIFT,
  parameter int unsigned S_NUM   = SER_S_NUM,
  parameter int unsigned S_SHIFT = SER_S_SHIFT,
  parameter int unsigned DELTA_A = SER_DELTA_A,
  parameter int unsigned DELTA_B = SER_DELTA_B,
  parameter int unsigned DELTA_C = SER_DELTA_C
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [N-1:0] in_pixel,
  output logic         out_valid,
  output logic [N-1:0] out_pixel,
  output logic         out_edge,
  output logic         out_last,
  output logic         busy
);

  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned AW   = $clog2(NPIX);
  localparam int unsigned XW   = (IMG_W > 1) ? $clog2(IMG_W) : 1;
  localparam int unsigned YW   = (IMG_H > 1) ? $clog2(IMG_H) : 1;
  localparam int unsigned OW   = N + M;
  localparam int unsigned TAGW = AW + 1;

  // ---------------- controller ----------------
  logic          load_we, dmem_re, win_shift;
  logic [AW-1:0] load_addr, dmem_raddr;
  logic          c_valid, c_last_pass;
  logic [AW-1:0] c_addr;
  logic [XW-1:0] c_col;
  logic [YW-1:0] c_row;
  phase_e        c_phase;
  logic          wb_valid, wb_last;
  logic [TAGW-1:0] wb_tag;

  rf_serial_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H), .R(R)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready, .load_we, .load_addr,
    .dmem_re, .dmem_raddr, .win_shift,
    .c_valid, .c_addr, .c_col, .c_row, .c_phase, .c_last_pass,
    .wb_last, .busy
  );

  // ---------------- memories ----------------
  logic [N-1:0]  smem_rdata;
  logic [OW-1:0] dmem_rdata, o_new;
  logic          dmem_we;
  logic [AW-1:0] dmem_waddr;
  logic [OW-1:0] dmem_wdata;

  rf_frame_mem #(.WIDTH(N), .DEPTH(NPIX)) u_smem (
    .clk,
    .we(load_we), .waddr(load_addr), .wdata(in_pixel),
    .re(c_valid), .raddr(c_addr), .rdata(smem_rdata)
  );

  assign dmem_we    = load_we || wb_valid;
  assign dmem_waddr = load_we ? load_addr : wb_tag[AW-1:0];
  assign dmem_wdata = load_we ? {in_pixel, {M{1'b0}}} : o_new;

  rf_frame_mem #(.WIDTH(OW), .DEPTH(NPIX)) u_dmem (
    .clk,
    .we(dmem_we), .waddr(dmem_waddr), .wdata(dmem_wdata),
    .re(dmem_re), .raddr(dmem_raddr), .rdata(dmem_rdata)
  );

  // ---------------- window a - i ----------------
  logic [8:0][OW-1:0] win;

  rf_window3x3 #(.WIDTH(OW), .LINE_W(IMG_W)) u_win (
    .clk, .rst_n, .shift(win_shift), .din(dmem_rdata), .win
  );

  // centre descriptor, delayed to line up with the window and Smem data
  logic          d_valid, d_last_pass;
  logic [AW-1:0] d_addr;
  logic [XW-1:0] d_col;
  logic [YW-1:0] d_row;
  phase_e        d_phase;
  logic [7:0]    mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_valid <= 1'b0;
    else        d_valid <= c_valid;
  end

  always_ff @(posedge clk) begin
    d_addr      <= c_addr;
    d_col       <= c_col;
    d_row       <= c_row;
    d_phase     <= c_phase;
    d_last_pass <= c_last_pass;
  end

  // neighbour enables, bit order a b c d f g h i
  always_comb begin
    logic up, dn, lf, rt;
    up = (d_row != '0);
    dn = (32'(d_row) != IMG_H - 1);
    lf = (d_col != '0);
    rt = (32'(d_col) != IMG_W - 1);
    mask = {dn & rt, dn, dn & lf, rt, lf, up & rt, up, up & lf};
  end

  // ---------------- update unit ----------------
  logic wb_edge;

  rf_serial_update #(
    .N(N), .FRAC(M), .K(K), .G_NUM(G_NUM), .G_SHIFT(G_SHIFT),
    .S_NUM(S_NUM), .S_SHIFT(S_SHIFT),
    .DELTA_A(DELTA_A), .DELTA_B(DELTA_B), .DELTA_C(DELTA_C), .TAGW(TAGW)
  ) u_upd (
    .clk, .rst_n,
    .valid_i(d_valid), .tag_i({d_last_pass, d_addr}),
    .win, .s(smem_rdata), .mask, .sel(d_phase),
    .valid_o(wb_valid), .tag_o(wb_tag), .o_new, .edge_o(wb_edge)
  );

  assign wb_last = wb_valid && wb_tag[AW] && (32'(wb_tag[AW-1:0]) == NPIX - 1);

  // ---------------- result stream ----------------
  logic [OW:0] rounded;
  always_comb rounded = {1'b0, o_new} + (OW+1)'(M > 0 ? (1 << (M - 1)) : 0);

  assign out_valid = wb_valid && wb_tag[AW];
  assign out_pixel = rounded[OW] ? '1 : rounded[OW-1:M];
  assign out_edge  = wb_edge;
  assign out_last  = wb_last;

  // write-back and loading never collide
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(load_we && wb_valid))
    else $error("rf_serial_seg: load write collides with write-back");

endmodule
