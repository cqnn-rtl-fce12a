// cgra_tile: one tile of the CGRA array: a BCONV, its accumulating switch, a
// T-BN and a BPOOL (one red, one green and one blue block of the array
// picture), plus the tile's configuration and weight registers.
//
// Configuration is double buffered: cfg_sh is a stage of the per-row shift
// chain the control processor fills column by column; `apply` copies it into
// the active configuration at a layer boundary.  Weights are double buffered
// the same way (w_we writes the shadow copy) and the T-BN threshold table has
// two banks that swap on `apply`.
//
// The tile chooses which neighbour feeds its switch (acc_src, side_src: N, S,
// E, W or none) and which neighbour feeds its T-BN/BPOOL pair (tbn_src: own
// switch, N or S).  All links are registered outputs of the neighbouring
// tile, so no configuration can form a combinational loop.
module cgra_tile
  import cqnn_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // configuration shift chain and layer switch
  input  tile_cfg_t          cfg_sh_in,
  input  logic               cfg_sh_en,
  output tile_cfg_t          cfg_sh,
  input  logic               apply,
  input  logic [POOL_W-1:0]  pool_n,
  // parameter writes (already decoded for this tile)
  input  logic               w_we,
  input  logic               t_we,
  input  logic [TADDR_W-1:0] t_idx,
  input  logic [BW-1:0]      p_data,
  // feature row bus
  input  logic               feat_valid,
  input  logic [BW-1:0]      feat,
  // neighbour links
  input  acc_link_t          acc_n, acc_s, acc_e, acc_w,
  input  tbn_link_t          tbn_n, tbn_s,
  input  pool_st_e           bp_n, bp_s,
  output acc_link_t          acc_out,
  output tbn_link_t          tbn_out,
  output pool_st_e           bp_state,
  // pooled result bit towards the feature scheduler
  output logic               out_valid,
  output logic               out_bit
);
  tile_cfg_t      cfg;
  logic [BW-1:0]  w_sh, w_act;
  logic           bank;
  logic           pc_valid;
  logic [PC_W-1:0] pc;
  acc_link_t      chain_in, side_in;
  tbn_link_t      tin;
  pool_st_e       pred;
  logic           tbit;
  logic           tvalid;
  logic           bp_out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_sh <= '0;
      cfg    <= '0;
      w_sh   <= '0;
      w_act  <= '0;
      bank   <= 1'b0;
    end else begin
      if (cfg_sh_en) cfg_sh <= cfg_sh_in;
      if (w_we)      w_sh   <= p_data;
      if (apply) begin
        cfg   <= cfg_sh;
        w_act <= w_sh;
        bank  <= ~bank;
      end
    end
  end

  bconv u_bconv (
    .clk, .rst_n,
    .in_valid (feat_valid),
    .feat     (feat),
    .wt       (w_act),
    .out_valid(pc_valid),
    .pc       (pc)
  );

  function automatic acc_link_t pick(dir_e d, acc_link_t n, acc_link_t s,
                                     acc_link_t e, acc_link_t w);
    unique case (d)
      SRC_N:   return n;
      SRC_S:   return s;
      SRC_E:   return e;
      SRC_W:   return w;
      default: return '0;
    endcase
  endfunction

  assign chain_in = pick(cfg.acc_src,  acc_n, acc_s, acc_e, acc_w);
  assign side_in  = pick(cfg.side_src, acc_n, acc_s, acc_e, acc_w);

  acc_switch u_sw (
    .clk, .rst_n,
    .acc_shift(cfg.acc_shift),
    .side_shift(cfg.side_shift),
    .bconv_en (cfg.bconv_en),
    .skew     (cfg.skew),
    .pc_valid (pc_valid),
    .pc       (pc),
    .chain_in (chain_in),
    .side_in  (side_in),
    .acc_out  (acc_out)
  );

  always_comb begin
    tin  = '0;
    pred = PS_EQ;
    unique case (cfg.tbn_src)
      TB_OWN: begin
        tin.valid = acc_out.valid;
        tin.qconv = acc_out.acc;
        tin.addr  = (cfg.qbits == '0) ? '0 : TADDR_W'(1) << (cfg.qbits - 1'b1);
        pred      = PS_EQ;
      end
      TB_N: begin tin = tbn_n; pred = bp_n; end
      TB_S: begin tin = tbn_s; pred = bp_s; end
      default: begin tin = '0; pred = PS_EQ; end
    endcase
  end

  tbn u_tbn (
    .clk, .rst_n,
    .bank   (bank),
    .tw_en  (t_we),
    .tw_idx (t_idx),
    .tw_data(p_data[ACC_W-1:0]),
    .in     (tin),
    .out    (tbn_out),
    .out_bit(tbit)
  );

  assign tvalid = tbn_out.valid && (cfg.tbn_src != TB_OFF);

  bpool u_bpool (
    .clk, .rst_n,
    .clr      (apply),
    .pool_n   (pool_n),
    .out_dly  (cfg.out_dly),
    .in_valid (tvalid),
    .in_bit   (tbit),
    .pred     (pred),
    .state    (bp_state),
    .out_valid(bp_out_valid),
    .out_bit  (out_bit)
  );

  assign out_valid = bp_out_valid && (cfg.tbn_src != TB_OFF);
endmodule
