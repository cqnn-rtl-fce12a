// tb_tbn: builds a q-stage T-BN chain (the 3-bit example: 7 thresholds,
// first address 100) from tbn instances, loads thresholds into the idle bank,
// swaps banks, and checks that the q output bits equal the level of a
// reference threshold search, with one cycle per stage.  Also checks that
// writes go to the idle bank only.
module tb_tbn;
  import cqnn_pkg::*;
  localparam int Q = 3;
  logic clk = 0, rst_n = 0;
  logic bank;
  logic tw_en;
  logic [TADDR_W-1:0] tw_idx;
  logic signed [ACC_W-1:0] tw_data;
  tbn_link_t link [Q+1];
  logic bits [Q];
  int checks = 0, failures = 0;
  int thr [2][7];

  for (genvar s = 0; s < Q; s++) begin : g_st
    tbn u (.clk, .rst_n, .bank, .tw_en, .tw_idx, .tw_data,
           .in(link[s]), .out(link[s+1]), .out_bit(bits[s]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int level(int x, int b);
    int v = 0;
    for (int k = 0; k < 7; k++) if (x > thr[b][k]) v = k + 1;
    return v;
  endfunction

  task automatic load(int b);
    // thresholds increasing, entry a holds T(a-1)
    int base = int'($urandom_range(0, 100)) - 50;
    for (int k = 0; k < 7; k++) begin
      base += $urandom_range(1, 40);
      thr[b][k] = base;
      @(negedge clk);
      tw_en = 1; tw_idx = TADDR_W'(k + 1); tw_data = ACC_W'(base);
    end
    @(negedge clk);
    tw_en = 0;
  endtask

  // collect the bits of each value as its stages complete
  int res [$];
  int partial [Q];
  always @(posedge clk) begin
    #2;
    if (rst_n) for (int s = Q - 1; s >= 0; s--) begin
      if (link[s+1].valid) begin
        if (s == 0) partial[0] = 0;
        else        partial[s] = partial[s-1];
        partial[s] = partial[s] | (int'(bits[s]) << (Q - 1 - s));
      end
    end
    if (link[Q].valid) res.push_back(partial[Q-1]);
  end

  initial begin
    bank = 0; tw_en = 0; tw_idx = 0; tw_data = 0;
    link[0] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // bank 0 active: writes go to bank 1
    load(1);
    bank = 1;
    check_stream(1, 300);
    load(0);                      // fills bank 0 while bank 1 is active
    check_stream(1, 100);         // bank 1 results unchanged
    bank = 0;
    check_stream(0, 300);
    // every output level must have occurred
    for (int v = 0; v < 8; v++) begin
      checks++;
      if (seen_level[v] == 0) begin failures++; $display("level %0d never produced", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen_level [8];

  task automatic check_stream(int b, int n);
    int xs[$];
    res.delete();
    for (int t = 0; t < n; t++) begin
      int x = $urandom_range(0, 400) - 80;
      @(negedge clk);
      link[0].valid = 1; link[0].qconv = ACC_W'(x); link[0].addr = TADDR_W'(1 << (Q - 1));
      xs.push_back(x);
    end
    @(negedge clk);
    link[0].valid = 0;
    repeat (Q + 2) @(posedge clk);
    #3;
    checks++;
    if (res.size() != n) begin
      failures++;
      $display("got %0d results, expected %0d", res.size(), n);
    end
    for (int t = 0; t < n && t < res.size(); t++) begin
      checks++;
      seen_level[level(xs[t], b)]++;
      if (res[t] != level(xs[t], b)) begin
        failures++;
        if (failures < 10) $display("x=%0d got=%0d exp=%0d", xs[t], res[t], level(xs[t], b));
      end
    end
  endtask
endmodule
