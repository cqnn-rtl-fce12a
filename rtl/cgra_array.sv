// cgra_array: the reconfigurable CGRA array of CQNN.
//
// ROWS x TCOLS tiles, each holding a BCONV, an accumulating NOC switch, a
// T-BN and a BPOOL; the default 64 x 16 tiles are the document's 64 x 48
// component array (64 x 16 each of BCONVs, T-BNs and BPOOLs).  Neighbouring
// tiles are linked north/south/east/west for partial sums and north/south for
// the T-BN / BPOOL chains.  Which links are used, and how the tiles group
// into QNN engines, is set by the per-tile configuration, so one array serves
// layers of any feature and parameter width.
//
// Feature scheduler -> array: one BCONV-wide bit vector per row (row_feat),
// with one valid for all rows.  Parameter scheduler -> array: a write port
// addressed by tile row and column.  Control processor -> array: cfg_in
// enters the right-most column and moves one column to the left per cfg_shift
// pulse (the document's right-to-left, one-column-per-cycle reconfiguration);
// `apply` switches every tile to the shifted-in configuration at once.
// Array -> feature scheduler: one pooled bit and valid per tile.
module cgra_array
  import cqnn_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned TCOLS = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  tile_cfg_t          cfg_in [ROWS],
  input  logic               cfg_shift,
  input  logic               apply,
  input  logic [POOL_W-1:0]  pool_n,
  input  logic               pw_en,
  input  param_rec_t         pw_rec,
  input  logic               row_valid,
  input  logic [BW-1:0]      row_feat [ROWS],
  output logic               out_valid [ROWS][TCOLS],
  output logic               out_bit   [ROWS][TCOLS]
);
  tile_cfg_t  cfg_sh [ROWS][TCOLS];
  acc_link_t  acc    [ROWS][TCOLS];
  tbn_link_t  tl     [ROWS][TCOLS];
  pool_st_e   bp     [ROWS][TCOLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < TCOLS; c++) begin : g_col
      acc_link_t an, as, ae, aw;
      tbn_link_t tn, ts;
      pool_st_e  pn, ps;
      tile_cfg_t cin;
      logic      hit;

      if (r > 0) begin : g_n
        assign an = acc[r-1][c]; assign tn = tl[r-1][c]; assign pn = bp[r-1][c];
      end else begin : g_nz
        assign an = '0; assign tn = '0; assign pn = PS_EQ;
      end
      if (r < ROWS - 1) begin : g_s
        assign as = acc[r+1][c]; assign ts = tl[r+1][c]; assign ps = bp[r+1][c];
      end else begin : g_sz
        assign as = '0; assign ts = '0; assign ps = PS_EQ;
      end
      if (c < TCOLS - 1) begin : g_e
        assign ae  = acc[r][c+1];
        assign cin = cfg_sh[r][c+1];
      end else begin : g_ez
        assign ae  = '0;
        assign cin = cfg_in[r];
      end
      if (c > 0) begin : g_w
        assign aw = acc[r][c-1];
      end else begin : g_wz
        assign aw = '0;
      end

      assign hit = pw_en && (pw_rec.row == ROW_W'(r)) && (pw_rec.col == COL_W'(c));

      cgra_tile u_tile (
        .clk, .rst_n,
        .cfg_sh_in (cin),
        .cfg_sh_en (cfg_shift),
        .cfg_sh    (cfg_sh[r][c]),
        .apply     (apply),
        .pool_n    (pool_n),
        .w_we      (hit && pw_rec.kind == PW_WEIGHT),
        .t_we      (hit && pw_rec.kind == PW_THRESH),
        .t_idx     (pw_rec.idx),
        .p_data    (pw_rec.data),
        .feat_valid(row_valid),
        .feat      (row_feat[r]),
        .acc_n(an), .acc_s(as), .acc_e(ae), .acc_w(aw),
        .tbn_n(tn), .tbn_s(ts),
        .bp_n (pn), .bp_s (ps),
        .acc_out   (acc[r][c]),
        .tbn_out   (tl[r][c]),
        .bp_state  (bp[r][c]),
        .out_valid (out_valid[r][c]),
        .out_bit   (out_bit[r][c])
      );
    end
  end
endmodule
