// tb_rf_parallel_ctrl: runs the sequencer with R = 4 twice and checks the
// exact schedule: 6R enabled cycles alternating step 0 / step 1, R
// iterations with clka, then clkb, then clkc, a one-cycle done pulse right
// after the last step, and that start is ignored while busy.
module tb_rf_parallel_ctrl;
  localparam int R = 4;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, start, en, step, clka, clkb, clkc, busy, done;

  rf_parallel_ctrl #(.R(R)) dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; start = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int c = 0; c < 6 * R; c++) begin
        int ph;
        ph = c / (2 * R);
        if (c == 3) start = 1;      // must be ignored
        chk("en", int'(en), 1);
        chk("busy", int'(busy), 1);
        chk("step", int'(step), c % 2);
        chk("phase", int'({clkc, clkb, clka}), 1 << ph);
        chk("done early", int'(done), 0);
        @(negedge clk);
        start = 0;
      end
      chk("done", int'(done), 1);
      chk("busy after", int'(busy), 0);
      chk("en after", int'(en), 0);
      chk("phase held at C", int'({clkc, clkb, clka}), 4);
      @(negedge clk);
      chk("done one cycle", int'(done), 0);
    end
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
