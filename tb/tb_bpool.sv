// tb_bpool: a Q-POOL built from Q bpool instances fed bit-serially, most
// significant bit first with one cycle of skew per bit (as a T-BN chain
// delivers them).  Random Q-bit values in pooling regions of POOL_N values
// must give the region maximum; the output delays are set so all bits of
// a result leave in the same cycle, one cycle after the last bit arrives.
module tb_bpool;
  import cqnn_pkg::*;
  localparam int Q = 3;
  logic clk = 0, rst_n = 0;
  logic clr;
  logic [POOL_W-1:0] pool_n;
  logic       vin  [Q];
  logic       bin  [Q];
  pool_st_e   st   [Q];
  pool_st_e   pred [Q];
  logic       ov   [Q];
  logic       ob   [Q];
  int checks = 0, failures = 0;
  int n_lt = 0, n_gt = 0;

  for (genvar s = 0; s < Q; s++) begin : g_bp
    if (s == 0) begin : g_first
      assign pred[s] = PS_EQ;
    end else begin : g_next
      assign pred[s] = st[s-1];
    end
    bpool u (.clk, .rst_n, .clr, .pool_n, .out_dly(ODLY_W'(Q - 1 - s)),
             .in_valid(vin[s]), .in_bit(bin[s]), .pred(pred[s]), .state(st[s]),
             .out_valid(ov[s]), .out_bit(ob[s]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // skewed input: value entered at cycle t feeds bit s at cycle t+s
  int vals [$];
  logic [Q-1:0] hist [Q];
  logic         hv   [Q];
  int exp_q [$];

  always @(negedge clk) begin
    if (rst_n) begin
      for (int s = Q - 1; s > 0; s--) begin hist[s] = hist[s-1]; hv[s] = hv[s-1]; end
      if (vals.size() > 0) begin hist[0] = Q'(vals.pop_front()); hv[0] = 1; end
      else hv[0] = 0;
      for (int s = 0; s < Q; s++) begin
        vin[s] = hv[s];
        bin[s] = hist[s][Q-1-s];
      end
    end
  end

  always @(posedge clk) begin
    #1;
    if (rst_n && ov[0]) begin
      int got;
      got = 0;
      for (int s = 0; s < Q; s++) begin
        got |= int'(ob[s]) << (Q - 1 - s);
        if (!ov[s]) failures++;
      end
      checks++;
      if (exp_q.size() == 0) failures++;
      else begin
        int e;
        e = exp_q.pop_front();
        if (got != e) begin
          failures++;
          if (failures < 10) $display("got %0d exp %0d", got, e);
        end
      end
    end
    for (int s = 1; s < Q; s++) if (ov[s] && !ov[0]) failures++;
    for (int s = 0; s < Q; s++) if (vin[s] && st[s] == PS_LT && s > 0) n_lt++;
  end

  task automatic region(int n);
    int m = 0;
    for (int k = 0; k < n; k++) begin
      int v = $urandom_range(0, (1 << Q) - 1);
      vals.push_back(v);
      if (v > m) m = v;
    end
    exp_q.push_back(m);
  endtask

  initial begin
    clr = 0; pool_n = 4;
    for (int s = 0; s < Q; s++) begin vin[s] = 0; bin[s] = 0; hist[s] = 0; hv[s] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) region(4);          // 2x2 pooling
    wait (vals.size() == 0);
    repeat (Q + 4) @(posedge clk);
    @(negedge clk); pool_n = 9; clr = 1; @(negedge clk); clr = 0;
    for (int r = 0; r < 100; r++) region(9);          // 3x3 pooling
    wait (vals.size() == 0);
    repeat (Q + 4) @(posedge clk);
    @(negedge clk); pool_n = 1; clr = 1; @(negedge clk); clr = 0;
    for (int r = 0; r < 50; r++) region(1);           // no pooling
    wait (vals.size() == 0);
    repeat (Q + 4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
