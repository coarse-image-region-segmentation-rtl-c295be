// tb_rf_frame_mem: random writes and reads of a small frame memory against a
// shadow array; checks the one-cycle read latency and that a read of an
// address written in the same cycle returns the old word.
module tb_rf_frame_mem;
  localparam int W = 10, D = 64;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we, re;
  logic [5:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] shadow [D];

  rf_frame_mem #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = W'($urandom); shadow[a] = wdata;
    end
    for (int i = 0; i < 500; i++) begin
      logic [W-1:0] expv;
      @(negedge clk);
      we = 1'($urandom); waddr = 6'($urandom); wdata = W'($urandom);
      re = 1; raddr = ($urandom % 4 == 0) ? waddr : 6'($urandom);
      expv = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        $display("FAIL addr %0d got %0h exp %0h", raddr, rdata, expv);
      end
    end
    // rdata holds while re is low
    @(negedge clk); re = 0; we = 0;
    begin
      logic [W-1:0] held;
      held = rdata;
      repeat (3) @(posedge clk);
      #1 checks++;
      if (rdata !== held) failures++;
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
