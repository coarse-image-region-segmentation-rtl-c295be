// tb_rf_model_pkg: reference models of the resistive-fuse networks, written
// independently of the RTL, for the self-checking testbenches.
//
//   lut()            K-bit current for a difference magnitude: linear with
//                    slope num/2**shift, saturated, zero at or beyond delta.
//   serial_model()   bit-exact model of the pixel-serial processor: Jacobi
//                    passes over an 8-neighbour grid with M fraction bits,
//                    3 phases of R passes, returns the rounded N-bit result
//                    and the blown-fuse edge flags of the final pass.
//   parallel_model() bit-exact model of the pixel-parallel array: per
//                    iteration one input step and one 4-neighbour step.
package tb_rf_model_pkg;

  function automatic int lut(int x, int num, int shift, int delta, int k);
    int y;
    if (x >= delta) return 0;
    y = (x * num) / (1 << shift);
    if (y > (1 << k) - 1) y = (1 << k) - 1;
    return y;
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic serial_model(input int w, input int h, input int r,
                              input int n, input int m, input int k,
                              input int gnum, input int gsh,
                              input int snum, input int ssh,
                              input int da, input int db, input int dc,
                              input int img[], output int res[], output bit edg[]);
    int o[], nx[];
    int dl[3];
    int omax;
    dl[0] = da; dl[1] = db; dl[2] = dc;
    omax = (1 << (n + m)) - 1;
    o = new[w*h]; nx = new[w*h]; res = new[w*h]; edg = new[w*h];
    foreach (o[p]) o[p] = img[p] << m;
    for (int ph = 0; ph < 3; ph++) begin
      for (int it = 0; it < r; it++) begin
        for (int y = 0; y < h; y++) begin
          for (int x = 0; x < w; x++) begin
            int e, sum, d, cur;
            e = o[y*w+x];
            sum = e;
            for (int dy = -1; dy <= 1; dy++)
              for (int dx = -1; dx <= 1; dx++) begin
                if (dx == 0 && dy == 0) continue;
                if (x+dx < 0 || x+dx >= w || y+dy < 0 || y+dy >= h) continue;
                d = o[(y+dy)*w + x+dx] - e;
                cur = lut(iabs(d) >> m, gnum, gsh, dl[ph], k);
                sum += (d < 0) ? -cur : cur;
              end
            d = (img[y*w+x] << m) - e;
            cur = lut(iabs(d) >> m, snum, ssh, 1 << n, k);
            sum += (d < 0) ? -cur : cur;
            if (sum < 0) sum = 0;
            if (sum > omax) sum = omax;
            nx[y*w+x] = sum;
            if (ph == 2 && it == r - 1) begin
              bit b;
              b = 0;
              if (x+1 < w && (iabs(o[y*w+x+1] - e) >> m) >= dc) b = 1;
              if (y+1 < h && (iabs(o[(y+1)*w+x] - e) >> m) >= dc) b = 1;
              edg[y*w+x] = b;
            end
          end
        end
        o = nx;
      end
    end
    foreach (o[p]) begin
      int v;
      v = (m > 0) ? (o[p] + (1 << (m-1))) >> m : o[p];
      res[p] = (v > (1 << n) - 1) ? (1 << n) - 1 : v;
    end
  endtask

  task automatic parallel_model(input int w, input int h, input int r,
                                input int n, input int k,
                                input int gnum, input int gsh,
                                input int snum, input int ssh,
                                input int da, input int db, input int dc,
                                input int img[], output int res[]);
    int o[], nx[];
    int dl[3];
    int dxs[4], dys[4];
    dl[0] = da; dl[1] = db; dl[2] = dc;
    dxs = '{0, 1, 0, -1}; dys = '{-1, 0, 1, 0};
    o = new[w*h]; nx = new[w*h];
    foreach (o[p]) o[p] = img[p];
    for (int ph = 0; ph < 3; ph++) begin
      for (int it = 0; it < r; it++) begin
        // input (sigma) step
        foreach (o[p]) begin
          int d, cur, v;
          d = img[p] - o[p];
          cur = lut(iabs(d), snum, ssh, 1 << n, k);
          v = o[p] + ((d < 0) ? -cur : cur);
          nx[p] = (v < 0) ? 0 : (v > (1 << n) - 1) ? (1 << n) - 1 : v;
        end
        o = nx;
        // neighbour (G) step
        for (int y = 0; y < h; y++)
          for (int x = 0; x < w; x++) begin
            int v, d, cur;
            v = o[y*w+x];
            for (int j = 0; j < 4; j++) begin
              if (x+dxs[j] < 0 || x+dxs[j] >= w || y+dys[j] < 0 || y+dys[j] >= h) continue;
              d = o[(y+dys[j])*w + x+dxs[j]] - o[y*w+x];
              cur = lut(iabs(d), gnum, gsh, dl[ph], k);
              v += (d < 0) ? -cur : cur;
            end
            nx[y*w+x] = (v < 0) ? 0 : (v > (1 << n) - 1) ? (1 << n) - 1 : v;
          end
        o = nx;
      end
    end
    res = o;
  endtask

endpackage
