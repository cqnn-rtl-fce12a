// cqnn_top: CQNN accelerator: control processor plus CGRA array with its
// parameter and feature schedulers.
//
// The host loads the compiled program (one instruction per layer) into the
// control processor and pulses `start`.  Per layer the control processor
// shifts the column configuration into the array and the parameter
// scheduler preloads weights and thresholds from off-chip memory (p_*);
// then the layer switch (`apply`) reconfigures every tile at once and the
// feature scheduler streams windows in (win_*) and pooled, quantized output
// bits out (wb_*).  Preparation of layer l+1 overlaps execution of layer l.
// `done` rises after n_layers layers.  Off-chip memory is outside this
// module: its read and write streams are the ports.
module cqnn_top
  import cqnn_pkg::*;
#(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned TCOLS  = 16,
  parameter int unsigned LAYERS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // program load and run control
  input  logic        im_we_hdr,
  input  logic        im_we_col,
  input  logic [$clog2(LAYERS)-1:0] im_layer,
  input  logic [$clog2(TCOLS)-1:0]  im_col,
  input  instr_hdr_t  im_hdr,
  input  tile_cfg_t   im_cfg [ROWS],
  input  logic        start,
  input  logic [$clog2(LAYERS):0]   n_layers,
  output logic        done,
  output logic        busy,
  // parameter stream from off-chip memory
  input  logic        p_valid,
  output logic        p_ready,
  input  param_rec_t  p_rec,
  // window stream from off-chip memory
  input  logic        win_valid,
  output logic        win_ready,
  input  logic [BW-1:0] win_data [FB_MAX][G_MAX],
  // result stream to off-chip memory
  output logic        wb_valid,
  output logic [ROWS*TCOLS-1:0] wb_bits,
  output logic [ROWS*TCOLS-1:0] wb_mask
);
  tile_cfg_t  cfg_col [ROWS];
  logic       cfg_shift, apply;
  instr_hdr_t act_hdr, nxt_hdr;
  logic       ps_start, ps_done, fs_done, fs_busy;
  logic [CNT_W-1:0] ps_n;
  logic       pw_en;
  param_rec_t pw_rec;
  logic       row_valid;
  logic [BW-1:0] row_feat [ROWS];
  logic       pool_valid [ROWS][TCOLS];
  logic       pool_bit   [ROWS][TCOLS];
  logic       cp_running;

  control_processor #(.ROWS(ROWS), .TCOLS(TCOLS), .LAYERS(LAYERS)) u_cp (
    .clk, .rst_n,
    .im_we_hdr, .im_we_col, .im_layer, .im_col, .im_hdr, .im_cfg,
    .start, .n_layers, .done, .running(cp_running),
    .cfg_out(cfg_col), .cfg_shift, .apply, .act_hdr, .nxt_hdr,
    .ps_start, .ps_n, .ps_done,
    .fs_done
  );

  param_scheduler u_ps (
    .clk, .rst_n,
    .load_start(ps_start), .n_params(ps_n), .load_done(ps_done),
    .p_valid, .p_ready, .p_rec,
    .pw_en, .pw_rec
  );

  feature_scheduler #(.ROWS(ROWS), .TCOLS(TCOLS)) u_fs (
    .clk, .rst_n,
    .start(apply), .row_map(nxt_hdr.row_map), .n_windows(nxt_hdr.n_windows),
    .drain(nxt_hdr.drain), .layer_done(fs_done), .busy(fs_busy),
    .win_valid, .win_ready, .win_data,
    .row_valid, .row_feat,
    .pool_valid, .pool_bit,
    .wb_valid, .wb_bits, .wb_mask
  );

  cgra_array #(.ROWS(ROWS), .TCOLS(TCOLS)) u_cgra (
    .clk, .rst_n,
    .cfg_in(cfg_col), .cfg_shift, .apply, .pool_n(act_hdr.pool_n),
    .pw_en, .pw_rec,
    .row_valid, .row_feat,
    .out_valid(pool_valid), .out_bit(pool_bit)
  );

  assign busy = cp_running || fs_busy;
endmodule
