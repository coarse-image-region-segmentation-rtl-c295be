// tb_rf_window3x3: streams the pixel index as pixel data through a window on
// 6-pixel lines and checks after every shift that taps a - i hold the
// indices of the 3 x 3 neighbourhood of the centre (LINE_W + 1 behind).
module tb_rf_window3x3;
  localparam int WD = 10, LW = 6;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, shift;
  logic [WD-1:0] din;
  logic [8:0][WD-1:0] win;

  rf_window3x3 #(.WIDTH(WD), .LINE_W(LW)) dut (.*);

  initial begin
    int p;
    int off[9];
    off = '{-LW-1, -LW, -LW+1, -1, 0, 1, LW-1, LW, LW+1};
    rst_n = 0; shift = 0; din = 0; p = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (p < 120) begin
      @(negedge clk);
      shift = ($urandom % 4) != 0;
      din = WD'(p);
      @(posedge clk);
      if (shift) begin
        #1;
        if (p >= 2 * LW + 2) begin
          int c;
          c = p - LW - 1;
          for (int t = 0; t < 9; t++) begin
            checks++;
            if (int'(win[t]) != c + off[t]) begin
              failures++;
              $display("FAIL p=%0d tap %0d got %0d exp %0d", p, t, win[t], c + off[t]);
            end
          end
        end
        p++;
      end
    end
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
