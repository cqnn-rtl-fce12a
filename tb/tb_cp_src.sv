// tb_cp_src: connects the SRC to a model of the instruction memory's column
// port and to a TCOLS-stage shift chain like the array's.  After `start` the
// chain must hold column c's word in stage c, the SRC must push exactly
// TCOLS words on consecutive cycles (one column per cycle), and `done` must
// rise right after the last push.
module tb_cp_src;
  import cqnn_pkg::*;
  localparam int ROWS = 3, TCOLS = 5;
  logic clk = 0, rst_n = 0;
  logic start, done;
  logic [$clog2(TCOLS)-1:0] rd_col;
  tile_cfg_t rd_cfg [ROWS];
  tile_cfg_t cfg_out [ROWS];
  logic cfg_shift;
  int checks = 0, failures = 0;
  tile_cfg_t mem [TCOLS][ROWS];
  tile_cfg_t chain [TCOLS][ROWS];
  int pushes, first_push, last_push, done_cyc, cyc;

  cp_src #(.ROWS(ROWS), .TCOLS(TCOLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    for (int r = 0; r < ROWS; r++) rd_cfg[r] <= mem[rd_col][r];   // one-cycle read
    if (rst_n && cfg_shift) begin
      for (int c = 0; c < TCOLS - 1; c++) chain[c] <= chain[c+1];
      for (int r = 0; r < ROWS; r++) chain[TCOLS-1][r] <= cfg_out[r];
      pushes++;
      if (first_push < 0) first_push = cyc;
      last_push = cyc;
    end
    if (rst_n && done && done_cyc < 0) done_cyc = cyc;
  end

  initial begin
    start = 0; cyc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      for (int c = 0; c < TCOLS; c++) for (int r = 0; r < ROWS; r++) mem[c][r] = tile_cfg_t'($urandom);
      pushes = 0; first_push = -1; done_cyc = -1;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0; done_cyc = -1;
      repeat (TCOLS + 6) @(negedge clk);
      checks++;
      if (pushes != TCOLS || last_push - first_push != TCOLS - 1) begin
        failures++; $display("pushes=%0d span=%0d", pushes, last_push - first_push);
      end
      checks++;
      if (done_cyc != last_push + 1) begin failures++; $display("done at %0d last push %0d", done_cyc, last_push); end
      for (int c = 0; c < TCOLS; c++) for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (chain[c][r] !== mem[c][r]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
