// tb_rf_lut: exhaustive check of the lookup tables used by both processors:
// the serial 3-table G LUT, the serial sigma LUT and the parallel G LUT,
// every table and every address, output value and blown flag.
module tb_rf_lut;
  import rf_pkg::*;
  import tb_rf_model_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] sel;
  logic [SER_N-1:0] xs;
  logic [PAR_N-1:0] xp;
  logic [SER_K-1:0] yg, ys;
  logic [PAR_K-1:0] yp;
  logic bg, bs, bp;

  rf_lut u_g (.sel(sel), .x(xs), .y(yg), .blown(bg));
  rf_lut #(.NTAB(1), .SLOPE_NUM(SER_S_NUM), .SLOPE_SHIFT(SER_S_SHIFT), .DELTA0(128))
    u_s (.sel(1'b0), .x(xs), .y(ys), .blown(bs));
  rf_lut #(.NIN(PAR_N), .KOUT(PAR_K), .SLOPE_NUM(PAR_G_NUM), .SLOPE_SHIFT(PAR_G_SHIFT),
           .DELTA0(PAR_DELTA_A), .DELTA1(PAR_DELTA_B), .DELTA2(PAR_DELTA_C))
    u_p (.sel(sel), .x(xp), .y(yp), .blown(bp));

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int sd[3], pd[3];
    sd = '{SER_DELTA_A, SER_DELTA_B, SER_DELTA_C};
    pd = '{PAR_DELTA_A, PAR_DELTA_B, PAR_DELTA_C};
    for (int t = 0; t < 3; t++) begin
      for (int a = 0; a < 256; a++) begin
        sel = 2'(t);
        xs  = 7'(a);
        xp  = 8'(a);
        #1;
        if (a < 128) begin
          chk($sformatf("serG t%0d x%0d", t, a), int'(yg), lut(a, SER_G_NUM, SER_G_SHIFT, sd[t], SER_K));
          chk($sformatf("serG blown t%0d x%0d", t, a), int'(bg), int'(a >= sd[t]));
          if (t == 0) chk($sformatf("serS x%0d", a), int'(ys), lut(a, SER_S_NUM, SER_S_SHIFT, 128, SER_K));
        end
        chk($sformatf("parG t%0d x%0d", t, a), int'(yp), lut(a, PAR_G_NUM, PAR_G_SHIFT, pd[t], PAR_K));
        chk($sformatf("parG blown t%0d x%0d", t, a), int'(bp), int'(a >= pd[t]));
      end
    end
    // spot values worked out by hand
    sel = 2'd0; xs = 7'd127; #1; chk("serG sat", int'(yg), 63);
    sel = 2'd2; xs = 7'd7;   #1; chk("serG C below", int'(yg), 3);
    sel = 2'd2; xs = 7'd8;   #1; chk("serG C blown", int'(yg), 0);
    sel = 2'd1; xs = 7'd15;  #1; chk("serG B below", int'(yg), 7);
    xs = 7'd100; #1; chk("serS", int'(ys), 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
