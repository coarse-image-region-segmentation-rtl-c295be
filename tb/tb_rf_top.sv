// tb_rf_top: end-to-end test of both processors at their default sizes.
//
// Pixel-serial: one 64 x 64 frame, 7-bit, R = 30 (90 passes): a scene with a
// striped shade in the background and a bright figure with small dark facial
// features, plus noise. Every output pixel and edge flag is compared with the
// bit-exact reference model, and the frame must finish within 20 ms at
// 40 MHz (800 000 cycles) - in fact in 3*30*4096 + 64 + 5 cycles after the
// last input pixel. The input is offered again while the processor is busy
// to exercise back-pressure.
// Pixel-parallel: one 8 x 8 frame through the 6R-cycle schedule, every cell
// compared with its reference model.
// Mechanisms counted (each must occur): load back-pressure, serial passes in
// phases A, B and C, border-masked window centres, blown fuses in the
// serial and parallel results, parallel steps in phases A, B and C.
module tb_rf_top;
  import rf_pkg::*;
  import tb_rf_model_pkg::*;

  localparam int W = SER_IMG_W, H = SER_IMG_H, NP = W * H, R = R_ITER;
  localparam int PNC = PAR_W * PAR_H;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic ser_in_valid, ser_in_ready, ser_out_valid, ser_out_edge, ser_out_last, ser_busy;
  logic [SER_N-1:0] ser_in_pixel, ser_out_pixel;
  logic par_load, par_start, par_busy, par_done, par_rd_edge;
  logic [5:0] par_addr;
  logic [PAR_N-1:0] par_load_data, par_rd_data;

  rf_top dut (.*);

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_border = 0, n_ser_edge = 0, n_par_edge = 0;
  int n_ph[3] = '{0, 0, 0};
  int n_par_ph[3] = '{0, 0, 0};
  int cyc = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ser_in_valid && !ser_in_ready) n_stall++;
    if (dut.u_serial.d_valid) begin
      n_ph[int'(dut.u_serial.d_phase)]++;
      if (dut.u_serial.mask != 8'hFF) n_border++;
    end
    if (dut.u_parallel.en) begin
      if (dut.u_parallel.clka) n_par_ph[0]++;
      if (dut.u_parallel.clkb) n_par_ph[1]++;
      if (dut.u_parallel.clkc) n_par_ph[2]++;
    end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  int img[], res[], pimg[], pres[];
  bit edg[];

  task automatic make_scene();
    img = new[NP];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int v, dx, dy;
        v = ((y / 3) % 2) ? 38 : 58;                           // window shade
        dx = x - 32; dy = y - 24;
        if (dx * dx * 4 + dy * dy * 3 < 400) v = 104;          // face
        if (y >= 40 && x >= 14 && x <= 50) v = 96;             // body
        if ((y == 21 || y == 22) && (x == 26 || x == 27 || x == 37 || x == 38)) v = 70; // eyes
        if (y == 31 && x >= 29 && x <= 35) v = 78;             // mouth
        v += int'($urandom % 11) - 5;
        img[y*W+x] = (v < 0) ? 0 : (v > 127) ? 127 : v;
      end
  endtask

  initial begin
    int nout, t_load, t_last, t0;
    rst_n = 0;
    ser_in_valid = 0; ser_in_pixel = 0;
    par_load = 0; par_start = 0; par_addr = 0; par_load_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---------- pixel-parallel frame ----------
    pimg = new[PNC];
    foreach (pimg[p]) pimg[p] = (((p % PAR_W) + (p / PAR_W)) >= 8 ? 190 : 60) + int'($urandom % 21) - 10;
    for (int p = 0; p < PNC; p++) begin
      @(negedge clk); par_load = 1; par_addr = 6'(p); par_load_data = 8'(pimg[p]);
    end
    @(negedge clk); par_load = 0; par_start = 1;
    @(negedge clk); par_start = 0; t0 = 1;
    while (!par_done) begin @(negedge clk); t0++; end
    chk("parallel run cycles", t0, 6 * R + 1);
    parallel_model(PAR_W, PAR_H, R, PAR_N, PAR_K, PAR_G_NUM, PAR_G_SHIFT, PAR_S_NUM, PAR_S_SHIFT,
                   PAR_DELTA_A, PAR_DELTA_B, PAR_DELTA_C, pimg, pres);
    for (int p = 0; p < PNC; p++) begin
      @(negedge clk); par_addr = 6'(p); #1;
      chk($sformatf("parallel cell %0d", p), int'(par_rd_data), pres[p]);
      if (par_rd_edge) n_par_edge++;
    end

    // ---------- pixel-serial frame ----------
    make_scene();
    serial_model(W, H, R, SER_N, SER_M, SER_K, SER_G_NUM, SER_G_SHIFT, SER_S_NUM, SER_S_SHIFT,
                 SER_DELTA_A, SER_DELTA_B, SER_DELTA_C, img, res, edg);
    for (int p = 0; p < NP; p++) begin
      @(negedge clk);
      ser_in_valid = 1; ser_in_pixel = 7'(img[p]);
      @(posedge clk);
      t_load = cyc;
    end
    // keep offering a pixel of the next frame for a while: must be stalled
    @(negedge clk); ser_in_pixel = 7'd0;
    repeat (50) @(negedge clk);
    ser_in_valid = 0;
    nout = 0;
    while (nout < NP) begin
      @(posedge clk);
      #1;
      if (ser_out_valid) begin
        chk($sformatf("serial pixel %0d", nout), int'(ser_out_pixel), res[nout]);
        chk($sformatf("serial edge %0d", nout), int'(ser_out_edge), int'(edg[nout]));
        if (ser_out_edge) n_ser_edge++;
        if (ser_out_last) t_last = cyc;
        nout++;
      end
    end
    chk("serial frame cycles", t_last - t_load, 3 * R * NP + W + 5);
    checks++;
    if (t_last - t_load + NP > 800000) begin failures++; $display("FAIL frame longer than 20 ms"); end

    // ---------- mechanisms ----------
    $display("mechanisms: stall=%0d phaseA=%0d phaseB=%0d phaseC=%0d border=%0d ser_edges=%0d par_edges=%0d parA=%0d parB=%0d parC=%0d",
             n_stall, n_ph[0], n_ph[1], n_ph[2], n_border, n_ser_edge, n_par_edge,
             n_par_ph[0], n_par_ph[1], n_par_ph[2]);
    $display("serial frame: %0d cycles from last input to last output (%0d us at 40 MHz)",
             t_last - t_load, (t_last - t_load) / 40);
    chk("phase A centres", n_ph[0], R * NP);
    chk("phase B centres", n_ph[1], R * NP);
    chk("phase C centres", n_ph[2], R * NP);
    chk("parallel phase A steps", n_par_ph[0], 2 * R);
    chk("parallel phase B steps", n_par_ph[1], 2 * R);
    chk("parallel phase C steps", n_par_ph[2], 2 * R);
    checks += 4;
    if (n_stall == 0)    begin failures++; $display("FAIL no back-pressure"); end
    if (n_border == 0)   begin failures++; $display("FAIL no border masking"); end
    if (n_ser_edge == 0) begin failures++; $display("FAIL no serial edge"); end
    if (n_par_edge == 0) begin failures++; $display("FAIL no parallel edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
