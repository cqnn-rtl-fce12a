// tb_cp_imem: writes random headers and column words for every layer and
// reads them back in random order, checking data and the one-cycle read
// latency of both read ports.
module tb_cp_imem;
  import cqnn_pkg::*;
  localparam int ROWS = 4, TCOLS = 4, LAYERS = 8;
  logic clk = 0;
  logic we_hdr, we_col;
  logic [$clog2(LAYERS)-1:0] wlayer, hlayer, clayer;
  logic [$clog2(TCOLS)-1:0] wcol, ccol;
  instr_hdr_t whdr, hdr;
  tile_cfg_t wcfg [ROWS];
  tile_cfg_t cfg [ROWS];
  int checks = 0, failures = 0;
  instr_hdr_t hm [LAYERS];
  tile_cfg_t  cm [LAYERS][TCOLS][ROWS];

  cp_imem #(.ROWS(ROWS), .TCOLS(TCOLS), .LAYERS(LAYERS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_hdr_t rnd_hdr();
    logic [$bits(instr_hdr_t)-1:0] b;
    for (int k = 0; k < $bits(instr_hdr_t); k += 32) b[k +: 32] = $urandom;
    return instr_hdr_t'(b);
  endfunction

  initial begin
    we_hdr = 0; we_col = 0; wlayer = 0; wcol = 0; whdr = '0; hlayer = 0; clayer = 0; ccol = 0;
    for (int r = 0; r < ROWS; r++) wcfg[r] = '0;
    for (int l = 0; l < LAYERS; l++) begin
      @(negedge clk);
      hm[l] = rnd_hdr();
      we_hdr = 1; wlayer = l; whdr = hm[l];
      @(negedge clk);
      we_hdr = 0;
      for (int c = 0; c < TCOLS; c++) begin
        for (int r = 0; r < ROWS; r++) begin
          cm[l][c][r] = tile_cfg_t'($urandom);
          wcfg[r] = cm[l][c][r];
        end
        we_col = 1; wcol = c;
        @(negedge clk);
        we_col = 0;
      end
    end
    for (int t = 0; t < 200; t++) begin
      int l, lc, c;
      l = $urandom_range(0, LAYERS - 1); lc = $urandom_range(0, LAYERS - 1);
      c = $urandom_range(0, TCOLS - 1);
      hlayer = l; clayer = lc; ccol = c;
      @(posedge clk); #1;
      checks++;
      if (hdr !== hm[l]) failures++;
      for (int r = 0; r < ROWS; r++) if (cfg[r] !== cm[lc][c][r]) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
