// tb_rf_serial_seg: two frames through a 10 x 6 pixel-serial processor with
// R = 3 (default bit widths and tables). Each input frame is a bright block
// with a small dark feature and noise on a dark background; every output
// pixel and edge flag is compared with the bit-exact reference model, the
// output must be in raster order, and the time from the last input pixel to
// the last output pixel must be 3*R*W*H + W + 5 cycles.
module tb_rf_serial_seg;
  import rf_pkg::*;
  import tb_rf_model_pkg::*;

  localparam int W = 10, H = 6, R = 3, NP = W * H;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, out_valid, out_edge, out_last, busy;
  logic [SER_N-1:0] in_pixel, out_pixel;

  rf_serial_seg #(.IMG_W(W), .IMG_H(H), .R(R)) dut (.*);

  int img[], res[];
  bit edg[];
  int nout, cyc, t_load, t_last, n_edges;

  always @(posedge clk) cyc++;

  task automatic run_frame(int seed);
    img = new[NP];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v;
        v = (x >= 3 && x <= 7 && y >= 1 && y <= 4) ? 100 : 20;
        if (x == 5 && y == 2) v = 60;
        v += int'(($urandom(seed + y * W + x) % 9)) - 4;
        img[y*W+x] = v;
      end
    serial_model(W, H, R, SER_N, SER_M, SER_K, SER_G_NUM, SER_G_SHIFT, SER_S_NUM, SER_S_SHIFT,
                 SER_DELTA_A, SER_DELTA_B, SER_DELTA_C, img, res, edg);
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      in_valid = 1; in_pixel = 7'(img[p]);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
      t_load = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    nout = 0;
    while (nout < NP) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        checks += 2;
        if (int'(out_pixel) != res[nout] || out_edge != edg[nout]) begin
          failures++;
          if (failures < 10) $display("FAIL pix %0d got %0d/%0d exp %0d/%0d", nout,
                                      out_pixel, out_edge, res[nout], edg[nout]);
        end
        if (out_edge) n_edges++;
        checks++;
        if (out_last != (nout == NP - 1)) failures++;
        if (out_last) t_last = cyc;
        nout++;
      end
    end
    checks++;
    if (t_last - t_load != 3 * R * NP + W + 5) begin
      failures++;
      $display("FAIL latency %0d exp %0d", t_last - t_load, 3 * R * NP + W + 5);
    end
    @(posedge clk);
    #1 checks++;
    if (!in_ready || busy) begin failures++; $display("FAIL not ready for next frame"); end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_pixel = 0; cyc = 0; n_edges = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_frame(1);
    run_frame(77);
    checks++;
    if (n_edges == 0) begin failures++; $display("FAIL no edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
