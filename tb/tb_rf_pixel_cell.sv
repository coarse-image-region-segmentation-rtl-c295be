// tb_rf_pixel_cell: random single steps of one pixel circuit. Loads I (which
// also sets O), then applies input steps and neighbour steps with random
// neighbour values, enables and LUT2 selections, comparing O after every
// step with the value worked out here; also checks that en = 0 holds O and
// that the blown flags follow the selected table.
module tb_rf_pixel_cell;
  import rf_pkg::*;
  import tb_rf_model_pkg::*;

  localparam int N = 8, K = 5;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, load, en, step, clka, clkb, clkc;
  logic [N-1:0] load_data, o;
  logic [3:0][N-1:0] nbr;
  logic [3:0] nbr_en, blown;

  rf_pixel_cell dut (.*);

  int i_val, o_val, n_blown = 0;

  initial begin
    int dl[3];
    dl = '{PAR_DELTA_A, PAR_DELTA_B, PAR_DELTA_C};
    rst_n = 0; load = 0; en = 0; step = 0; clka = 1; clkb = 0; clkc = 0;
    load_data = 0; nbr = '0; nbr_en = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      int ph, expv;
      @(negedge clk);
      load = 0; en = 0;
      ph = $urandom % 3;
      {clkc, clkb, clka} = 3'b001 << ph;
      if (it % 50 == 0) begin
        load = 1; load_data = N'($urandom);
        i_val = int'(load_data); o_val = i_val;
        @(posedge clk); #1;
        checks++; if (int'(o) != o_val) failures++;
        continue;
      end
      en = 1'($urandom % 8 != 0);
      step = 1'($urandom);
      nbr_en = 4'($urandom);
      for (int j = 0; j < 4; j++) nbr[j] = (it % 5 == 0) ? N'($urandom) : N'(o_val + int'($urandom % 81) - 40);
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (blown[j] != (iabs(int'(nbr[j]) - o_val) >= dl[ph])) failures++;
        if (blown[j]) n_blown++;
      end
      expv = o_val;
      if (en) begin
        if (!step) begin
          int d, c;
          d = i_val - o_val;
          c = lut(iabs(d), PAR_S_NUM, PAR_S_SHIFT, 256, K);
          expv += (d < 0) ? -c : c;
        end else begin
          for (int j = 0; j < 4; j++) if (nbr_en[j]) begin
            int d, c;
            d = int'(nbr[j]) - o_val;
            c = lut(iabs(d), PAR_G_NUM, PAR_G_SHIFT, dl[ph], K);
            expv += (d < 0) ? -c : c;
          end
        end
        if (expv < 0) expv = 0;
        if (expv > 255) expv = 255;
      end
      @(posedge clk); #1;
      o_val = expv;
      checks++;
      if (int'(o) != o_val) begin
        failures++;
        if (failures < 10) $display("FAIL it %0d step %0d got %0d exp %0d", it, step, o, o_val);
      end
    end
    checks++;
    if (n_blown == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
