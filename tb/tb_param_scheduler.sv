// tb_param_scheduler: checks that a load accepts exactly n_params records
// (with the source stalling at random), forwards each unchanged one cycle
// later as a write, raises load_done afterwards, and accepts nothing
// outside a load.
module tb_param_scheduler;
  import cqnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load_start;
  logic [CNT_W-1:0] n_params;
  logic load_done;
  logic p_valid, p_ready;
  param_rec_t p_rec;
  logic pw_en;
  param_rec_t pw_rec;
  int checks = 0, failures = 0;
  param_rec_t sent [$];

  param_scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && p_valid && p_ready) sent.push_back(p_rec);
    #1;
    if (rst_n && pw_en) begin
      checks++;
      if (sent.size() == 0 || pw_rec !== sent[0]) failures++;
      if (sent.size() != 0) void'(sent.pop_front());
    end
  end

  task automatic load(int n);
    int acc = 0;
    @(negedge clk);
    load_start = 1; n_params = CNT_W'(n);
    @(negedge clk);
    load_start = 0;
    while (!load_done) begin
      p_valid = $urandom_range(0, 2) != 0;
      p_rec.kind = pkind_e'($urandom_range(0, 1));
      p_rec.row  = ROW_W'($urandom); p_rec.col = COL_W'($urandom);
      p_rec.idx  = TADDR_W'($urandom);
      for (int k = 0; k < BW; k += 32) p_rec.data[k +: 32] = $urandom;
      @(posedge clk);
      if (p_valid && p_ready) acc++;
      @(negedge clk);
    end
    p_valid = 0;
    checks++;
    if (acc != n) begin failures++; $display("accepted %0d of %0d", acc, n); end
    // idle: nothing accepted
    p_valid = 1;
    repeat (3) begin
      @(posedge clk); #1;
      checks++;
      if (p_ready) failures++;
    end
    p_valid = 0;
  endtask

  initial begin
    load_start = 0; n_params = 0; p_valid = 0; p_rec = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(37);
    load(1);
    load(0);
    load(120);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
