// tb_cgra_array: configures a small CGRA array as QNN engines and checks
// the quantized, pooled outputs against an integer reference model.
//
// Layer A: two engines for 2-bit features x 3-bit weights, 64 input
// channels (two 32-channel groups, twelve BCONVs each), 3-bit output
// features (three T-BN / BPOOL stages) and 2x2 max pooling.
// Layer B: three engines for 3-bit features x 2-bit weights, 32 input
// channels, 2-bit outputs, no pooling.
// Layer B's configuration is shifted in and its parameters loaded while
// layer A runs (double buffering); `apply` then switches all tiles.
// Windows arrive with random bubbles.  The test acts as feature scheduler.
module tb_cgra_array;
  import cqnn_pkg::*;
  import cqnn_tb_pkg::*;
  localparam int ROWS = 4, TCOLS = 6;
  logic clk = 0, rst_n = 0;
  tile_cfg_t  cfg_in [ROWS];
  logic cfg_shift, apply;
  logic [POOL_W-1:0] pool_n;
  logic pw_en;
  param_rec_t pw_rec;
  logic row_valid;
  logic [BW-1:0] row_feat [ROWS];
  logic out_valid [ROWS][TCOLS];
  logic out_bit   [ROWS][TCOLS];
  int checks = 0, failures = 0;
  int n_bubbles = 0, n_overlap_writes = 0;

  cgra_array #(.ROWS(ROWS), .TCOLS(TCOLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- layer description ----------------
  typedef struct {
    int fb, wb, ng, q, pool, neng, nwin;
  } layer_t;

  layer_t L [2];
  int     fv [2][][][];      // [layer][window][group][pos] feature values
  int     wv [2][][][];      // [layer][engine][group][pos] weight values
  longint thr [2][][];       // [layer][engine][threshold]
  int     expq [2][][$];     // [layer][engine] expected pooled outputs

  function automatic longint qconv(int l, int w, int e);
    longint s = 0;
    for (int g = 0; g < L[l].ng; g++)
      for (int n = 0; n < BW; n++) s += longint'(fv[l][w][g][n]) * wv[l][e][g][n];
    return s;
  endfunction

  task automatic make_layer(int l);
    longint xs [$];
    fv[l] = new[L[l].nwin];
    for (int w = 0; w < L[l].nwin; w++) begin
      fv[l][w] = new[L[l].ng];
      for (int g = 0; g < L[l].ng; g++) begin
        fv[l][w][g] = new[BW];
        for (int n = 0; n < BW; n++) fv[l][w][g][n] = $urandom_range(0, (1 << L[l].fb) - 1);
      end
    end
    wv[l]   = new[L[l].neng];
    thr[l]  = new[L[l].neng];
    expq[l] = new[L[l].neng];
    for (int e = 0; e < L[l].neng; e++) begin
      wv[l][e] = new[L[l].ng];
      for (int g = 0; g < L[l].ng; g++) begin
        wv[l][e][g] = new[BW];
        for (int n = 0; n < BW; n++) wv[l][e][g][n] = $urandom_range(0, (1 << L[l].wb) - 1);
      end
      // thresholds at quantiles of this engine's results, so every level occurs
      xs.delete();
      for (int w = 0; w < L[l].nwin; w++) xs.push_back(qconv(l, w, e));
      xs.sort();
      thr[l][e] = new[(1 << L[l].q) - 1];
      for (int t = 0; t < (1 << L[l].q) - 1; t++)
        thr[l][e][t] = xs[(t + 1) * L[l].nwin / (1 << L[l].q)] + t;  // strictly increasing
      for (int w = 0; w < L[l].nwin; w += L[l].pool) begin
        int m = 0;
        for (int p = 0; p < L[l].pool; p++) begin
          int v = quant_level(qconv(l, w + p, e), thr[l][e]);
          if (v > m) m = v;
        end
        expq[l][e].push_back(m);
      end
    end
  endtask

  // ---------------- configuration and parameters ----------------
  function automatic tile_cfg_t tile_cfg(int l, int r, int c);
    int R = L[l].fb * L[l].ng;
    int e = c / L[l].wb;
    if (r >= R || e >= L[l].neng) return '0;
    return eng_tile_cfg(L[l].fb, L[l].wb, L[l].ng, L[l].q, r, c % L[l].wb);
  endfunction

  task automatic shift_config(int l);
    for (int c = 0; c < TCOLS; c++) begin
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) cfg_in[r] = tile_cfg(l, r, c);
      cfg_shift = 1;
    end
    @(negedge clk);
    cfg_shift = 0;
  endtask

  task automatic write_rec(param_rec_t rec);
    @(negedge clk);
    pw_en = 1; pw_rec = rec;
    if (row_valid) n_overlap_writes++;
    @(negedge clk);
    pw_en = 0;
  endtask

  task automatic load_params(int l);
    param_rec_t rec;
    int R = L[l].fb * L[l].ng;
    for (int e = 0; e < L[l].neng; e++) begin
      for (int k = 0; k < R; k++)
        for (int m = 0; m < L[l].wb; m++) begin
          int g = k % L[l].ng;
          int j = L[l].wb - 1 - m;
          rec = '0;
          rec.kind = PW_WEIGHT;
          rec.row  = ROW_W'(k);
          rec.col  = COL_W'(e * L[l].wb + m);
          rec.data = plane_of(wv[l][e][g], j);
          write_rec(rec);
        end
      for (int s = 0; s < L[l].q; s++)
        for (int t = 0; t < (1 << L[l].q) - 1; t++) begin
          rec = '0;
          rec.kind = PW_THRESH;
          rec.row  = ROW_W'(R - 1 - s);
          rec.col  = COL_W'(e * L[l].wb + L[l].wb - 1);
          rec.idx  = TADDR_W'(t + 1);
          rec.data = BW'(thr[l][e][t]);
          write_rec(rec);
        end
    end
  endtask

  task automatic stream(int l);
    int R = L[l].fb * L[l].ng;
    for (int w = 0; w < L[l].nwin; w++) begin
      @(negedge clk);
      while ($urandom_range(0, 4) == 0) begin
        row_valid = 0; n_bubbles++;
        @(negedge clk);
      end
      row_valid = 1;
      for (int r = 0; r < ROWS; r++) begin
        row_map_t rm;
        if (r < R) begin
          rm = eng_row_map(L[l].fb, L[l].ng, r);
          row_feat[r] = plane_of(fv[l][w][rm.group], rm.plane);
        end else row_feat[r] = '0;
      end
    end
    @(negedge clk);
    row_valid = 0;
  endtask

  // ---------------- output checking ----------------
  int cur = 0;
  int got_n [2];
  always @(posedge clk) begin
    #1;
    if (rst_n) for (int e = 0; e < L[cur].neng; e++) begin
      automatic int R  = L[cur].fb * L[cur].ng;
      automatic int cc = e * L[cur].wb + L[cur].wb - 1;
      if (out_valid[R-1][cc]) begin
        automatic int v = 0;
        for (int s = 0; s < L[cur].q; s++) begin
          if (!out_valid[R-1-s][cc]) failures++;
          v |= int'(out_bit[R-1-s][cc]) << (L[cur].q - 1 - s);
        end
        checks++;
        got_n[cur]++;
        if (expq[cur][e].size() == 0) begin
          failures++;
          $display("layer %0d engine %0d: unexpected output", cur, e);
        end else begin
          automatic int x = expq[cur][e].pop_front();
          if (x != v) begin
            failures++;
            if (failures < 10) $display("layer %0d engine %0d: got %0d exp %0d", cur, e, v, x);
          end
        end
      end
    end
  end

  initial begin
    L[0] = '{fb: 2, wb: 3, ng: 2, q: 3, pool: 4, neng: 2, nwin: 160};
    L[1] = '{fb: 3, wb: 2, ng: 1, q: 2, pool: 1, neng: 3, nwin: 120};
    make_layer(0);
    make_layer(1);
    cfg_shift = 0; apply = 0; pool_n = 1; pw_en = 0; pw_rec = '0; row_valid = 0;
    for (int r = 0; r < ROWS; r++) begin cfg_in[r] = '0; row_feat[r] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    shift_config(0);
    load_params(0);
    @(negedge clk); apply = 1; pool_n = POOL_W'(L[0].pool);
    @(negedge clk); apply = 0;
    fork
      stream(0);
      begin
        shift_config(1);      // next layer prepared while this one runs
        load_params(1);
      end
    join
    repeat (eng_drain(L[0].fb, L[0].wb, L[0].ng, L[0].q)) @(negedge clk);
    apply = 1; pool_n = POOL_W'(L[1].pool); cur = 1;
    @(negedge clk); apply = 0;
    stream(1);
    repeat (eng_drain(L[1].fb, L[1].wb, L[1].ng, L[1].q)) @(negedge clk);
    for (int l = 0; l < 2; l++)
      for (int e = 0; e < L[l].neng; e++) begin
        checks++;
        if (expq[l][e].size() != 0) begin
          failures++;
          $display("layer %0d engine %0d: %0d outputs missing", l, e, expq[l][e].size());
        end
      end
    checks++;
    if (n_bubbles == 0 || n_overlap_writes == 0) failures++;
    $display("outputs: layer0=%0d layer1=%0d bubbles=%0d overlapped_param_writes=%0d",
             got_n[0], got_n[1], n_bubbles, n_overlap_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
