// cqnn_tb_pkg: test-side mapping and reference model for CQNN.
//
// Mapping ("default" engine shape): an engine for fb-bit features, wb-bit
// weights and ng 32-channel groups occupies R = fb*ng rows and wb tile
// columns.  Engine row k holds feature bit i = fb-1-k/ng of group g = k%ng;
// engine column m holds weight bit j = wb-1-m.  Each row reduces west to
// east (shift 1 per column: add-after-shift over weight bits), and the last
// column reduces north to south (shift 1 where the feature bit drops, 0
// between groups of the same bit).  Popcount skew = k + m aligns the
// pipeline.  The q-stage T-BN / BPOOL chain climbs the last column from the
// bottom row: result bit q-1-s sits in engine row R-1-s.
//
// Mapping ("vertical" engine shape): all fb*wb*ng binary products sit in
// one tile column, ordered by decreasing bit weight i+j (then feature bit,
// then group).  The column reduces north to south with a shift of 1 where
// the weight i+j drops and 0 otherwise; skew = k.  The T-BN / BPOOL chain
// climbs the same column from the bottom row.
//
// Reference: qconv = sum over channels and window positions of f*w (integer
// arithmetic on the values, not on bit planes), level = number of
// thresholds below qconv, pooling = maximum over pool_n successive windows.
package cqnn_tb_pkg;
  import cqnn_pkg::*;

  function automatic tile_cfg_t eng_tile_cfg(int fb, int wb, int ng, int q, int k, int m);
    tile_cfg_t c;
    int R = fb * ng;
    c = '0;
    c.bconv_en = 1'b1;
    if (m > 0) begin
      c.acc_src   = SRC_W;
      c.acc_shift = 1;
    end
    if (m == wb - 1 && k > 0) begin
      c.side_src   = SRC_N;
      c.side_shift = ((k % ng) == 0) ? 1 : 0;
    end
    c.skew = SKEW_W'(k + m);
    if (m == wb - 1) begin
      if (k == R - 1) begin
        c.tbn_src = TB_OWN;
        c.qbits   = 3'(q);
        c.out_dly = ODLY_W'(q - 1);
      end else if (k >= R - q) begin
        c.tbn_src = TB_S;
        c.qbits   = 3'(q);
        c.out_dly = ODLY_W'(q - 1 - (R - 1 - k));
      end
    end
    return c;
  endfunction

  // vertical shape: feature bit i, weight bit j and group g of engine row k
  function automatic void vert_ijg(int fb, int wb, int ng, int k,
                                   output int i, output int j, output int g);
    int n = 0;
    i = 0; j = 0; g = 0;
    for (int e = fb + wb - 2; e >= 0; e--)
      for (int fi = fb - 1; fi >= 0; fi--)
        if (e - fi >= 0 && e - fi < wb)
          for (int gg = 0; gg < ng; gg++) begin
            if (n == k) begin i = fi; j = e - fi; g = gg; end
            n++;
          end
  endfunction

  function automatic tile_cfg_t vert_tile_cfg(int fb, int wb, int ng, int q, int k);
    tile_cfg_t c;
    int R = fb * wb * ng;
    int i, j, g, pi, pj, pg;
    c = '0;
    c.bconv_en = 1'b1;
    vert_ijg(fb, wb, ng, k, i, j, g);
    if (k > 0) begin
      vert_ijg(fb, wb, ng, k - 1, pi, pj, pg);
      c.side_src   = SRC_N;
      c.side_shift = SHIFT_W'((pi + pj) - (i + j));
    end
    c.skew = SKEW_W'(k);
    if (k == R - 1) begin
      c.tbn_src = TB_OWN;
      c.qbits   = 3'(q);
      c.out_dly = ODLY_W'(q - 1);
    end else if (k >= R - q) begin
      c.tbn_src = TB_S;
      c.qbits   = 3'(q);
      c.out_dly = ODLY_W'(q - 1 - (R - 1 - k));
    end
    return c;
  endfunction

  function automatic row_map_t eng_row_map(int fb, int ng, int k);
    row_map_t r;
    r.plane = PLANE_W'(fb - 1 - k / ng);
    r.group = GROUP_W'(k % ng);
    return r;
  endfunction

  // window -> result latency bound, used as the drain time of a layer
  function automatic int eng_drain(int fb, int wb, int ng, int q);
    return fb * ng + wb + 2 * q + 8;
  endfunction

  // one bit plane of 288 values
  function automatic logic [BW-1:0] plane_of(int vals[], int bitn);
    logic [BW-1:0] p;
    for (int n = 0; n < BW; n++) p[n] = vals[n][bitn];
    return p;
  endfunction

  // level of x against increasing thresholds thr[0..nt-1]
  function automatic int quant_level(longint x, longint thr[]);
    int v = 0;
    foreach (thr[t]) if (x > thr[t]) v++;
    return v;
  endfunction

endpackage
