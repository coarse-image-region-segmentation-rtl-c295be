// tb_rf_line_fifo: the one-line memory must delay its input by exactly DEPTH
// shifts, whatever the gaps between shifts.
module tb_rf_line_fifo;
  localparam int W = 8, D = 5;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, shift;
  logic [W-1:0] din, dout;
  int hist[$];

  rf_line_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    rst_n = 0; shift = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      shift = ($urandom % 3) != 0;
      din = W'($urandom);
      if (shift) begin
        if (hist.size() >= D) begin
          checks++;
          if (int'(dout) != hist[hist.size() - D]) begin
            failures++;
            $display("FAIL shift %0d got %0d exp %0d", hist.size(), dout, hist[hist.size()-D]);
          end
        end
        hist.push_back(int'(din));
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
