// tb_rf_serial_ctrl: one frame through the sequencer of a 4 x 3 image with
// R = 2. Checks back-pressure outside LOAD, the load addresses, the raster
// read sequence of all 3 x R passes, the centre descriptor (address, row,
// column, phase, last-pass flag) of every window shift, and the cycle count
// of the run.
module tb_rf_serial_ctrl;
  import rf_pkg::*;
  localparam int W = 4, H = 3, R = 2, NP = W * H;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, in_valid, in_ready, load_we, dmem_re, win_shift, c_valid, c_last_pass, wb_last, busy;
  logic [3:0] load_addr, dmem_raddr, c_addr;
  logic [1:0] c_col, c_row;
  phase_e c_phase;

  rf_serial_ctrl #(.IMG_W(W), .IMG_H(H), .R(R)) dut (.*);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  int nread = 0, nshift = 0, ncent = 0, cyc = 0, t_last_load = -1, t_last_cent = -1;
  int lastc_d[$];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (load_we) t_last_load = cyc;
    if (dmem_re) begin
      chk("raddr", int'(dmem_raddr), nread % NP);
      nread++;
    end
    if (win_shift) begin
      if (c_valid) begin
        int pass;
        pass = ncent / NP;
        chk("c_addr", int'(c_addr), ncent % NP);
        chk("c_col", int'(c_col), (ncent % NP) % W);
        chk("c_row", int'(c_row), (ncent % NP) / W);
        chk("c_phase", int'(c_phase), pass / R);
        chk("c_last_pass", int'(c_last_pass), int'(pass == 3 * R - 1));
        chk("c lag", nshift - ncent, W + 1);
        ncent++;
        if (ncent == 3 * R * NP) t_last_cent = cyc;
      end
      nshift++;
    end
  end

  // model the write-back of the final pixel three cycles after its descriptor
  always @(posedge clk) lastc_d.push_back(int'(c_valid && c_last_pass && c_addr == 4'(NP - 1)));
  assign wb_last = (lastc_d.size() >= 3) ? lastc_d[lastc_d.size() - 3] != 0 : 1'b0;

  initial begin
    rst_n = 0; in_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NP; i++) begin
      @(negedge clk);
      in_valid = 1;
      chk("in_ready", int'(in_ready), 1);
      chk("load_addr", int'(load_addr), i);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1;           // must be held off while busy
    repeat (3 * R * NP + W + 8) begin
      @(posedge clk);
      if (busy) chk("in_ready while busy", int'(in_ready), 0);
      @(negedge clk);
      in_valid = busy;
    end
    chk("reads", nread, 3 * R * NP);
    chk("shifts", nshift, 3 * R * NP + W + 1);
    chk("centres", ncent, 3 * R * NP);
    chk("run length", t_last_cent - t_last_load, 3 * R * NP + W + 2);
    chk("back to load", int'(in_ready), 1);
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
