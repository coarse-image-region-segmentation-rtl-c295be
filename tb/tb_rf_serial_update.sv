// tb_rf_serial_update: random 3 x 3 windows, input pixels, neighbour masks
// and annealing phases, one per clock, through the update unit. Each result
// is compared with a value computed here from the network equation, and must
// appear exactly two cycles after its inputs with its tag.
module tb_rf_serial_update;
  import rf_pkg::*;
  import tb_rf_model_pkg::*;

  localparam int N = 7, M = 3, K = 6, OW = 10, TAGW = 16, LAT = 2;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, valid_i, valid_o, edge_o;
  logic [TAGW-1:0] tag_i, tag_o;
  logic [8:0][OW-1:0] win;
  logic [N-1:0] s;
  logic [7:0] mask;
  phase_e sel;
  logic [OW-1:0] o_new;

  rf_serial_update dut (.*);

  typedef struct { bit v; int tag; int o; bit e; } exp_t;
  exp_t pipe[$];

  function automatic exp_t model(int w[9], int sv, bit [7:0] mk, int ph, int tag, bit v);
    exp_t r;
    int dl[3], e, sum, idx[8], d, cur;
    dl = '{SER_DELTA_A, SER_DELTA_B, SER_DELTA_C};
    idx = '{0, 1, 2, 3, 5, 6, 7, 8};
    e = w[4];
    sum = e;
    r.e = 0;
    for (int j = 0; j < 8; j++) begin
      if (!mk[j]) continue;
      d = w[idx[j]] - e;
      cur = lut(iabs(d) >> M, SER_G_NUM, SER_G_SHIFT, dl[ph], K);
      sum += (d < 0) ? -cur : cur;
      if ((j == 4 || j == 6) && (iabs(d) >> M) >= dl[ph]) r.e = 1;
    end
    d = (sv << M) - e;
    cur = lut(iabs(d) >> M, SER_S_NUM, SER_S_SHIFT, 128, K);
    sum += (d < 0) ? -cur : cur;
    if (sum < 0) sum = 0;
    if (sum > 1023) sum = 1023;
    r.o = sum; r.v = v; r.tag = tag;
    return r;
  endfunction

  int n_blown = 0, n_clamp = 0;

  initial begin
    rst_n = 0; valid_i = 0; tag_i = 0; win = '0; s = 0; mask = 0; sel = PH_A;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int w[9];
      exp_t ex;
      @(negedge clk);
      // mostly near-uniform windows, sometimes strong edges and extremes
      begin
        int base, spread;
        base = $urandom % 1024;
        spread = (i % 3 == 0) ? 1024 : (i % 3 == 1) ? 200 : 40;
        for (int t = 0; t < 9; t++) begin
          int v;
          v = base + int'($urandom % spread) - spread / 2;
          if (i % 7 == 0) v = (t == 4) ? ((i % 14 == 0) ? 0 : 1023) : v;
          w[t] = (v < 0) ? 0 : (v > 1023) ? 1023 : v;
          win[t] = OW'(w[t]);
        end
      end
      s = N'($urandom);
      mask = 8'($urandom | (i % 2 ? 8'hFF : 8'h00));
      sel = phase_e'($urandom % 3);
      valid_i = 1'($urandom % 8 != 0);
      tag_i = TAGW'(i);
      ex = model(w, int'(s), mask, int'(sel), i, valid_i);
      pipe.push_back(ex);
      @(posedge clk);
      #1;
      if (pipe.size() > LAT - 1) begin
        exp_t x;
        x = pipe.pop_front();
        checks++;
        if (valid_o !== x.v) begin
          failures++;
          $display("FAIL valid at %0d", x.tag);
        end
        if (x.v) begin
          checks += 3;
          if (int'(o_new) != x.o || int'(tag_o) != x.tag || edge_o !== x.e) begin
            failures++;
            if (failures < 10) $display("FAIL tag %0d got o=%0d t=%0d e=%0d exp o=%0d e=%0d",
                                         x.tag, o_new, tag_o, edge_o, x.o, x.e);
          end
          if (x.e) n_blown++;
          if (x.o == 0 || x.o == 1023) n_clamp++;
        end
      end
    end
    checks++;
    if (n_blown == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL coverage blown=%0d clamp=%0d", n_blown, n_clamp);
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
