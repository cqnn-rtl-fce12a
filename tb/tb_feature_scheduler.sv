// tb_feature_scheduler: checks that accepted windows are sliced onto the
// row buses by the row map (one cycle later), that exactly n_windows are
// accepted per layer, that layer_done follows after the drain time, and
// that pooled bits are masked and written back with their valid mask.
module tb_feature_scheduler;
  import cqnn_pkg::*;
  localparam int ROWS = 5, TCOLS = 3;
  logic clk = 0, rst_n = 0;
  logic start;
  row_map_t [ROWS_MAX-1:0] row_map;
  logic [CNT_W-1:0] n_windows;
  logic [DRAIN_W-1:0] drain;
  logic layer_done, busy;
  logic win_valid, win_ready;
  logic [BW-1:0] win_data [FB_MAX][G_MAX];
  logic row_valid;
  logic [BW-1:0] row_feat [ROWS];
  logic pool_valid [ROWS][TCOLS];
  logic pool_bit   [ROWS][TCOLS];
  logic wb_valid;
  logic [ROWS*TCOLS-1:0] wb_bits, wb_mask;
  int checks = 0, failures = 0;

  feature_scheduler #(.ROWS(ROWS), .TCOLS(TCOLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ROWS*BW-1:0] taken [$];   // expected row slices of each accepted window
  int n_taken = 0;
  int done_cycle = -1, cyc = 0, last_take = -1;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && win_valid && win_ready) begin
      logic [ROWS*BW-1:0] w;
      for (int r = 0; r < ROWS; r++) w[r*BW +: BW] = win_data[row_map[r].plane][row_map[r].group];
      taken.push_back(w);
      n_taken++;
      last_take = cyc;
    end
    if (layer_done) done_cycle = cyc;
  end

  // row buses: the slice of the window accepted in the previous cycle
  always @(posedge clk) begin
    #1;
    if (rst_n && row_valid) begin
      checks++;
      if (taken.size() == 0) failures++;
      else begin
        for (int r = 0; r < ROWS; r++)
          if (row_feat[r] !== taken[0][r*BW +: BW]) failures++;
        void'(taken.pop_front());
      end
    end
  end

  task automatic run_layer(int nw, int dr);
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) begin
      row_map[r].plane = PLANE_W'($urandom_range(0, FB_MAX - 1));
      row_map[r].group = GROUP_W'($urandom_range(0, G_MAX - 1));
    end
    n_windows = CNT_W'(nw); drain = DRAIN_W'(dr);
    n_taken = 0; done_cycle = -1;
    start = 1;
    @(negedge clk);
    start = 0;
    while (done_cycle < 0) begin
      win_valid = $urandom_range(0, 3) != 0;
      for (int p = 0; p < FB_MAX; p++)
        for (int g = 0; g < G_MAX; g++)
          for (int n = 0; n < BW; n += 32) win_data[p][g][n +: 32] = $urandom;
      @(negedge clk);
    end
    win_valid = 0;
    checks++;
    if (n_taken != nw) begin failures++; $display("took %0d of %0d", n_taken, nw); end
    checks++;
    if (done_cycle - last_take != dr + 2) begin
      failures++; $display("done %0d cycles after last window, drain %0d", done_cycle - last_take, dr);
    end
  endtask

  initial begin
    start = 0; win_valid = 0; row_map = '0; n_windows = 0; drain = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < TCOLS; c++) begin
      pool_valid[r][c] = 0; pool_bit[r][c] = 0;
    end
    for (int p = 0; p < FB_MAX; p++) for (int g = 0; g < G_MAX; g++) win_data[p][g] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run_layer(40, 7);
    run_layer(25, 0);
    // write-back masking
    for (int t = 0; t < 200; t++) begin
      logic [ROWS*TCOLS-1:0] ev, eb;
      @(negedge clk);
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < TCOLS; c++) begin
        pool_valid[r][c] = $urandom_range(0, 3) == 0;
        pool_bit[r][c]   = $urandom_range(0, 1);
        ev[r*TCOLS+c] = pool_valid[r][c];
        eb[r*TCOLS+c] = pool_valid[r][c] & pool_bit[r][c];
      end
      @(posedge clk); #1;
      checks++;
      if (wb_valid !== (|ev) || wb_mask !== ev || wb_bits !== eb) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
