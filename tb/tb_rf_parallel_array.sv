// tb_rf_parallel_array: loads a 5 x 4 array with a noisy two-level image,
// runs R = 6 iterations per phase, and compares every cell's O with the
// bit-exact reference model. Also checks the 6R-cycle run time, that loads
// are ignored while busy, and the edge read-out.
module tb_rf_parallel_array;
  import rf_pkg::*;
  import tb_rf_model_pkg::*;

  localparam int W = 5, H = 4, R = 6, NC = W * H;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, load, start, busy, done, rd_edge;
  logic [4:0] addr;
  logic [PAR_N-1:0] load_data, rd_data;

  rf_parallel_array #(.W(W), .H(H), .R(R)) dut (.*);

  int img[], res[];
  int n_edge = 0;

  initial begin
    int t0;
    rst_n = 0; load = 0; start = 0; addr = 0; load_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    img = new[NC];
    foreach (img[p]) img[p] = ((p % W) >= 2 ? 200 : 40) + int'($urandom % 17) - 8;
    img[7] = 120;
    for (int p = 0; p < NC; p++) begin
      @(negedge clk); load = 1; addr = 5'(p); load_data = 8'(img[p]);
    end
    @(negedge clk); load = 0; start = 1;
    @(negedge clk); start = 0; t0 = 0;
    // a load while busy must not change anything
    load = 1; addr = 0; load_data = 8'd0;
    @(negedge clk); load = 0;
    t0 = 2;
    while (!done) begin @(negedge clk); t0++; end
    checks++;
    if (t0 != 6 * R + 1) begin failures++; $display("FAIL run time %0d", t0); end
    parallel_model(W, H, R, PAR_N, PAR_K, PAR_G_NUM, PAR_G_SHIFT, PAR_S_NUM, PAR_S_SHIFT,
                   PAR_DELTA_A, PAR_DELTA_B, PAR_DELTA_C, img, res);
    for (int p = 0; p < NC; p++) begin
      bit ee;
      int x, y;
      @(negedge clk); addr = 5'(p); #1;
      x = p % W; y = p / W;
      ee = 0;
      if (x + 1 < W && iabs(res[p] - res[p+1]) >= PAR_DELTA_C) ee = 1;
      if (y + 1 < H && iabs(res[p] - res[p+W]) >= PAR_DELTA_C) ee = 1;
      checks += 2;
      if (int'(rd_data) != res[p]) begin
        failures++;
        $display("FAIL cell %0d got %0d exp %0d", p, rd_data, res[p]);
      end
      if (rd_edge != ee) begin failures++; $display("FAIL edge %0d", p); end
      if (ee) n_edge++;
    end
    checks++;
    if (n_edge == 0) begin failures++; $display("FAIL no edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
