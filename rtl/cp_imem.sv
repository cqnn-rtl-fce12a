// cp_imem: Instruction Memory (IM) of the control processor.
//
// One instruction per layer: a header (pooling, window count, drain time,
// parameter record count, row map) and TCOLS column words, each holding the
// configuration of the ROWS tiles of one array column.  The host writes the
// compiled program through the write port; the control processor reads the
// header and the switch reconfiguration controller reads column words, both
// with one cycle of read latency.  This split layout is this design's own.
module cp_imem
  import cqnn_pkg::*;
#(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned TCOLS  = 16,
  parameter int unsigned LAYERS = 32
) (
  input  logic        clk,
  // host write port
  input  logic        we_hdr,
  input  logic        we_col,
  input  logic [$clog2(LAYERS)-1:0] wlayer,
  input  logic [$clog2(TCOLS)-1:0]  wcol,
  input  instr_hdr_t  whdr,
  input  tile_cfg_t   wcfg [ROWS],
  // header read
  input  logic [$clog2(LAYERS)-1:0] hlayer,
  output instr_hdr_t  hdr,
  // column read
  input  logic [$clog2(LAYERS)-1:0] clayer,
  input  logic [$clog2(TCOLS)-1:0]  ccol,
  output tile_cfg_t   cfg [ROWS]
);
  instr_hdr_t hmem [LAYERS];
  tile_cfg_t  cmem [LAYERS*TCOLS][ROWS];

  always_ff @(posedge clk) begin
    if (we_hdr) hmem[wlayer] <= whdr;
    hdr <= hmem[hlayer];
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_ff @(posedge clk) begin
      if (we_col) cmem[32'(wlayer)*TCOLS + 32'(wcol)][r] <= wcfg[r];
      cfg[r] <= cmem[32'(clayer)*TCOLS + 32'(ccol)][r];
    end
  end
endmodule
