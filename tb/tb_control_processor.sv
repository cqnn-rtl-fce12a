// tb_control_processor: loads a program of several layers, runs it with
// models of the parameter scheduler (done after a random delay) and the
// feature scheduler (layer done a random time after apply), and checks:
// each layer's column words are pushed in order, one per cycle; apply
// comes only after the configuration push, the parameter load and the end
// of the previous layer; act_hdr after apply is that layer's header; the
// next layer is prepared while the current one runs; done after the last.
module tb_control_processor;
  import cqnn_pkg::*;
  localparam int ROWS = 3, TCOLS = 4, LAYERS = 8;
  logic clk = 0, rst_n = 0;
  logic im_we_hdr, im_we_col;
  logic [$clog2(LAYERS)-1:0] im_layer;
  logic [$clog2(TCOLS)-1:0] im_col;
  instr_hdr_t im_hdr;
  tile_cfg_t im_cfg [ROWS];
  logic start;
  logic [$clog2(LAYERS):0] n_layers;
  logic done, running;
  tile_cfg_t cfg_out [ROWS];
  logic cfg_shift, apply;
  instr_hdr_t act_hdr, nxt_hdr;
  logic ps_start;
  logic [CNT_W-1:0] ps_n;
  logic ps_done, fs_done;
  int checks = 0, failures = 0;

  control_processor #(.ROWS(ROWS), .TCOLS(TCOLS), .LAYERS(LAYERS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NL = 5;
  instr_hdr_t hm [NL];
  tile_cfg_t  cm [NL][TCOLS][ROWS];
  int pushes_l [NL];
  int push_idx = 0, prep_layer = -1, run_layer = -1, applies = 0, overlaps = 0;
  int ps_cnt = -1, fs_cnt = -1;
  bit ps_busy = 0, layer_active = 0;

  // parameter scheduler model
  always @(posedge clk) begin
    if (!rst_n) begin
      // nothing is sampled while the design is held in reset
    end else if (ps_start) begin
      prep_layer++;
      checks++;
      if (ps_n != hm[prep_layer].n_params) failures++;
      if (layer_active) overlaps++;
      ps_cnt <= $urandom_range(0, 30);
      ps_done <= 0;
      push_idx = 0;
    end else if (ps_cnt > 0) ps_cnt <= ps_cnt - 1;
    else if (ps_cnt == 0) begin ps_done <= 1; ps_cnt <= -1; end
    if (rst_n && cfg_shift) begin
      checks++;
      for (int r = 0; r < ROWS; r++) if (cfg_out[r] !== cm[prep_layer][push_idx][r]) failures++;
      push_idx++;
    end
  end

  // feature scheduler model and apply checks
  always @(posedge clk) begin
    fs_done <= 0;
    if (rst_n && apply) begin
      checks++;
      if (!ps_done || push_idx != TCOLS || layer_active) begin
        failures++; $display("early apply: ps_done=%0b pushes=%0d active=%0b", ps_done, push_idx, layer_active);
      end
      run_layer++;
      applies++;
      layer_active = 1;
      fs_cnt <= $urandom_range(5, 60);
    end else if (fs_cnt > 0) fs_cnt <= fs_cnt - 1;
    else if (fs_cnt == 0) begin fs_done <= 1; layer_active = 0; fs_cnt <= -1; end
  end

  // header of the running layer
  always @(posedge clk) begin
    #1;
    if (layer_active && run_layer >= 0) begin
      checks++;
      if (act_hdr !== hm[run_layer]) failures++;
    end
  end

  initial begin
    im_we_hdr = 0; im_we_col = 0; im_layer = 0; im_col = 0; im_hdr = '0; start = 0; n_layers = 0;
    ps_done = 0; fs_done = 0;
    for (int r = 0; r < ROWS; r++) im_cfg[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < NL; l++) begin
      logic [$bits(instr_hdr_t)-1:0] b;
      for (int k = 0; k < $bits(instr_hdr_t); k += 32) b[k +: 32] = $urandom;
      hm[l] = instr_hdr_t'(b);
      hm[l].n_params = CNT_W'($urandom_range(1, 100));
      @(negedge clk);
      im_we_hdr = 1; im_layer = l; im_hdr = hm[l];
      @(negedge clk);
      im_we_hdr = 0;
      for (int c = 0; c < TCOLS; c++) begin
        for (int r = 0; r < ROWS; r++) begin cm[l][c][r] = tile_cfg_t'($urandom); im_cfg[r] = cm[l][c][r]; end
        im_we_col = 1; im_col = c;
        @(negedge clk);
        im_we_col = 0;
      end
    end
    n_layers = NL;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (applies != NL || layer_active) begin failures++; $display("applies=%0d", applies); end
    checks++;
    if (overlaps != NL - 1) begin failures++; $display("overlapped preparations=%0d", overlaps); end
    $display("layers=%0d overlapped preparations=%0d", applies, overlaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
