// Body shared by the end-to-end CQNN testbenches.  The including module
// declares ROWS, TCOLS, LAYERS, the layer list (function layer_def) and
// instantiates cqnn_top as `dut`.
//
// The test plays host and off-chip memory: it maps every layer onto as
// many engines of the layer's shape (default or vertical, cqnn_tb_pkg) as
// fit, writes the program into
// the instruction memory, queues the parameter records of all layers and
// the windows of all layers, pulses start and checks every pooled output
// feature written back against the integer reference model.  It counts the
// mechanisms a run must exercise: layer switches, preparation of the next
// layer during a running one, pooling, inter-group sums, window stalls.

  logic clk = 0, rst_n = 0;
  logic im_we_hdr, im_we_col;
  logic [$clog2(LAYERS)-1:0] im_layer;
  logic [$clog2(TCOLS)-1:0]  im_col;
  instr_hdr_t im_hdr;
  tile_cfg_t  im_cfg [ROWS];
  logic start;
  logic [$clog2(LAYERS):0] n_layers;
  logic done, busy;
  logic p_valid, p_ready;
  param_rec_t p_rec;
  logic win_valid, win_ready;
  logic [BW-1:0] win_data [FB_MAX][G_MAX];
  logic wb_valid;
  logic [ROWS*TCOLS-1:0] wb_bits, wb_mask;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  typedef struct {
    int fb, wb, ng, q, pool, nwin;
    bit vert;                // vertical engine shape instead of default
  } layer_t;

  layer_t L [NL];
  int     ner [NL], nec [NL];
  int     fv [NL][][][];     // [layer][window][group][pos]
  int     wv [NL][][][];     // [layer][engine][group][pos]
  longint thr [NL][][];
  int     expq [NL][][$];
  param_rec_t prec [$];
  int     cyc = 0;
  int     n_apply = 0, n_overlap = 0, n_pooled = 0, n_stall = 0, n_groupsum = 0, n_out = 0;

  // engine footprint in tiles
  function automatic int erows(int l);
    return L[l].vert ? L[l].fb * L[l].wb * L[l].ng : L[l].fb * L[l].ng;
  endfunction
  function automatic int ecols(int l);
    return L[l].vert ? 1 : L[l].wb;
  endfunction

  function automatic longint qconv(int l, int w, int e);
    longint s = 0;
    for (int g = 0; g < L[l].ng; g++)
      for (int n = 0; n < BW; n++) s += longint'(fv[l][w][g][n]) * wv[l][e][g][n];
    return s;
  endfunction

  task automatic make_layer(int l);
    longint xs [$];
    int R, neng;
    R = erows(l);
    ner[l] = ROWS / R;
    nec[l] = TCOLS / ecols(l);
    neng = ner[l] * nec[l];
    fv[l] = new[L[l].nwin];
    for (int w = 0; w < L[l].nwin; w++) begin
      fv[l][w] = new[L[l].ng];
      for (int g = 0; g < L[l].ng; g++) begin
        fv[l][w][g] = new[BW];
        for (int n = 0; n < BW; n++) fv[l][w][g][n] = $urandom_range(0, (1 << L[l].fb) - 1);
      end
    end
    wv[l] = new[neng]; thr[l] = new[neng]; expq[l] = new[neng];
    for (int e = 0; e < neng; e++) begin
      wv[l][e] = new[L[l].ng];
      for (int g = 0; g < L[l].ng; g++) begin
        wv[l][e][g] = new[BW];
        for (int n = 0; n < BW; n++) wv[l][e][g][n] = $urandom_range(0, (1 << L[l].wb) - 1);
      end
      xs.delete();
      for (int w = 0; w < L[l].nwin; w++) xs.push_back(qconv(l, w, e));
      xs.sort();
      thr[l][e] = new[(1 << L[l].q) - 1];
      for (int t = 0; t < (1 << L[l].q) - 1; t++)
        thr[l][e][t] = xs[(t + 1) * L[l].nwin / (1 << L[l].q)] + t;
      for (int w = 0; w < L[l].nwin; w += L[l].pool) begin
        int m;
        m = 0;
        for (int p = 0; p < L[l].pool; p++) begin
          int v;
          v = quant_level(qconv(l, w + p, e), thr[l][e]);
          if (v > m) m = v;
        end
        expq[l][e].push_back(m);
      end
    end
  endtask

  function automatic tile_cfg_t tile_cfg(int l, int r, int c);
    int R = erows(l);
    if (r >= ner[l] * R || c >= nec[l] * ecols(l)) return '0;
    if (L[l].vert) return vert_tile_cfg(L[l].fb, L[l].wb, L[l].ng, L[l].q, r % R);
    return eng_tile_cfg(L[l].fb, L[l].wb, L[l].ng, L[l].q, r % R, c % L[l].wb);
  endfunction

  task automatic program_layer(int l);
    instr_hdr_t h;
    int R = erows(l);
    int np = 0;
    // parameter records: weights, then thresholds of every T-BN stage
    for (int er = 0; er < ner[l]; er++)
      for (int ec = 0; ec < nec[l]; ec++) begin
        int e = er * nec[l] + ec;
        for (int k = 0; k < R; k++)
          for (int m = 0; m < ecols(l); m++) begin
            param_rec_t rec;
            int vi, vj, vg;
            rec = '0;
            rec.kind = PW_WEIGHT;
            rec.row  = ROW_W'(er * R + k);
            rec.col  = COL_W'(ec * ecols(l) + m);
            if (L[l].vert) begin
              vert_ijg(L[l].fb, L[l].wb, L[l].ng, k, vi, vj, vg);
              rec.data = plane_of(wv[l][e][vg], vj);
            end else
              rec.data = plane_of(wv[l][e][k % L[l].ng], L[l].wb - 1 - m);
            prec.push_back(rec); np++;
          end
        for (int s = 0; s < L[l].q; s++)
          for (int t = 0; t < (1 << L[l].q) - 1; t++) begin
            param_rec_t rec;
            rec = '0;
            rec.kind = PW_THRESH;
            rec.row  = ROW_W'(er * R + R - 1 - s);
            rec.col  = COL_W'(ec * ecols(l) + ecols(l) - 1);
            rec.idx  = TADDR_W'(t + 1);
            rec.data = BW'(thr[l][e][t]);
            prec.push_back(rec); np++;
          end
      end
    h = '0;
    h.pool_n    = POOL_W'(L[l].pool);
    h.n_windows = CNT_W'(L[l].nwin);
    h.drain     = DRAIN_W'(eng_drain(L[l].fb, L[l].wb, L[l].ng, L[l].q) + (L[l].vert ? R : 0));
    h.n_params  = CNT_W'(np);
    for (int r = 0; r < ROWS; r++)
      if (r >= ner[l] * R) h.row_map[r] = '0;
      else if (L[l].vert) begin
        int vi, vj, vg;
        vert_ijg(L[l].fb, L[l].wb, L[l].ng, r % R, vi, vj, vg);
        h.row_map[r].plane = PLANE_W'(vi);
        h.row_map[r].group = GROUP_W'(vg);
      end else h.row_map[r] = eng_row_map(L[l].fb, L[l].ng, r % R);
    @(negedge clk);
    im_we_hdr = 1; im_layer = l; im_hdr = h;
    @(negedge clk);
    im_we_hdr = 0;
    for (int c = 0; c < TCOLS; c++) begin
      for (int r = 0; r < ROWS; r++) im_cfg[r] = tile_cfg(l, r, c);
      im_we_col = 1; im_col = c;
      @(negedge clk);
      im_we_col = 0;
    end
  endtask

  // ---------------- off-chip memory model ----------------
  int wl = 0, ww = 0;        // next window to offer: layer, index
  always @(negedge clk) begin
    if (rst_n) begin
      p_valid = (prec.size() > 0) && ($urandom_range(0, 7) != 0);
      if (prec.size() > 0) p_rec = prec[0];
      win_valid = (wl < NL) && ($urandom_range(0, 5) != 0);
      if (wl < NL) begin
        automatic int R = erows(wl);
        for (int p = 0; p < FB_MAX; p++)
          for (int g = 0; g < G_MAX; g++)
            win_data[p][g] = (p < L[wl].fb && g < L[wl].ng) ? plane_of(fv[wl][ww][g], p) : '0;
        if (R > ROWS) win_valid = 0;
      end
    end
  end

  int cur = -1;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) begin
      // handshakes are not sampled while the design is held in reset
    end else if (p_valid && p_ready) begin
      void'(prec.pop_front());
      if (dut.u_fs.busy) n_overlap++;
    end
    if (rst_n && win_ready && !win_valid) n_stall++;
    if (rst_n && win_valid && win_ready) begin
      ww++;
      if (ww == L[wl].nwin) begin wl++; ww = 0; end
    end
    if (rst_n && dut.apply) begin cur++; n_apply++; end
  end

  // ---------------- write-back checking ----------------
  always @(posedge clk) begin
    #1;
    if (rst_n && wb_valid && cur >= 0) begin
      automatic int R = erows(cur);
      automatic int seen = 0;
      for (int er = 0; er < ner[cur]; er++)
        for (int ec = 0; ec < nec[cur]; ec++) begin
          automatic int e  = er * nec[cur] + ec;
          automatic int c  = ec * ecols(cur) + ecols(cur) - 1;
          automatic int rb = er * R + R - 1;
          if (wb_mask[rb * TCOLS + c]) begin
            int v;
            v = 0;
            for (int s = 0; s < L[cur].q; s++) begin
              if (!wb_mask[(rb - s) * TCOLS + c]) failures++;
              v |= int'(wb_bits[(rb - s) * TCOLS + c]) << (L[cur].q - 1 - s);
            end
            seen += L[cur].q;
            checks++;
            n_out++;
            if (L[cur].pool > 1) n_pooled++;
            if (L[cur].ng > 1) n_groupsum++;
            if (expq[cur][e].size() == 0) begin
              failures++;
              $display("layer %0d engine %0d: unexpected output", cur, e);
            end else begin
              int x;
              x = expq[cur][e].pop_front();
              if (x != v) begin
                failures++;
                if (failures < 10) $display("layer %0d engine %0d: got %0d exp %0d", cur, e, v, x);
              end
            end
          end
        end
      checks++;
      if (seen != $countones(wb_mask)) failures++;   // no stray valid bits
    end
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    im_we_hdr = 0; im_we_col = 0; im_layer = 0; im_col = 0; im_hdr = '0;
    start = 0; n_layers = 0; p_valid = 0; p_rec = '0; win_valid = 0;
    for (int r = 0; r < ROWS; r++) im_cfg[r] = '0;
    for (int p = 0; p < FB_MAX; p++) for (int g = 0; g < G_MAX; g++) win_data[p][g] = '0;
    for (int l = 0; l < NL; l++) begin
      L[l] = layer_def(l);
      make_layer(l);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++) program_layer(l);
    n_layers = NL;
    @(negedge clk);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    for (int l = 0; l < NL; l++)
      foreach (expq[l][e]) begin
        checks++;
        if (expq[l][e].size() != 0) begin
          failures++;
          $display("layer %0d engine %0d: %0d outputs missing", l, e, expq[l][e].size());
        end
      end
    $display("cycles=%0d outputs=%0d layer_switches=%0d params_loaded_during_run=%0d pooled=%0d group_sums=%0d window_stalls=%0d",
             cyc - t0, n_out, n_apply, n_overlap, n_pooled, n_groupsum, n_stall);
    checks++; if (n_apply != NL) failures++;
    checks++; if (n_overlap == 0) begin failures++; $display("no overlapped preparation"); end
    checks++; if (n_pooled == 0) begin failures++; $display("no pooling"); end
    checks++; if (n_groupsum == 0) begin failures++; $display("no inter-group sum"); end
    checks++; if (n_stall == 0) begin failures++; $display("no window stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
