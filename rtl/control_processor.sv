// control_processor: Control Processor (CP) of CQNN: instruction memory,
// instruction fetch & decode, and the switch reconfiguration controller.
//
// The compiled program (one instruction per layer) is written into the
// instruction memory by the host.  After `start` the CP runs n_layers
// layers.  For each layer it fetches and decodes the header, has the SRC
// shift the layer's column configuration into the array's shadow registers
// and has the parameter scheduler preload the layer's weights and
// thresholds.  When that is done and the previous layer has finished
// (fs_done from the feature scheduler), it pulses `apply`: every tile
// switches to the new configuration at once and the feature scheduler starts
// the layer.  The next layer is prepared while this one runs, so
// reconfiguration overlaps computation.  `done` rises after the last layer.
//
// The document gives the CP's parts (IM, IF & ID, SRC) and what they do;
// the state machine and the instruction layout are this design's own.
module control_processor
  import cqnn_pkg::*;
#(
  parameter int unsigned ROWS   = 64,
  parameter int unsigned TCOLS  = 16,
  parameter int unsigned LAYERS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // host: program load and run control
  input  logic        im_we_hdr,
  input  logic        im_we_col,
  input  logic [$clog2(LAYERS)-1:0] im_layer,
  input  logic [$clog2(TCOLS)-1:0]  im_col,
  input  instr_hdr_t  im_hdr,
  input  tile_cfg_t   im_cfg [ROWS],
  input  logic        start,
  input  logic [$clog2(LAYERS):0]   n_layers,
  output logic        done,
  output logic        running,
  // to the array
  output tile_cfg_t   cfg_out [ROWS],
  output logic        cfg_shift,
  output logic        apply,
  output instr_hdr_t  act_hdr,      // layer now running
  output instr_hdr_t  nxt_hdr,      // layer being prepared (latched by the FS on apply)
  // to / from the parameter scheduler
  output logic        ps_start,
  output logic [CNT_W-1:0] ps_n,
  input  logic        ps_done,
  // from the feature scheduler
  input  logic        fs_done
);
  localparam int unsigned LW = $clog2(LAYERS);

  typedef enum logic [2:0] {C_IDLE, C_FETCH, C_DECODE, C_PREP, C_WAIT, C_APPLY, C_LAST, C_DONE} cst_e;
  cst_e        st;
  logic [LW:0] nxt;          // layer being prepared
  instr_hdr_t  hdr_rd;
  logic        src_start, src_done;
  logic [$clog2(TCOLS)-1:0] src_col;
  tile_cfg_t   src_rd [ROWS];
  logic        layer_busy;   // a layer is running in the array
  logic        fs_done_seen;

  cp_imem #(.ROWS(ROWS), .TCOLS(TCOLS), .LAYERS(LAYERS)) u_im (
    .clk,
    .we_hdr(im_we_hdr), .we_col(im_we_col), .wlayer(im_layer), .wcol(im_col),
    .whdr(im_hdr), .wcfg(im_cfg),
    .hlayer(nxt[LW-1:0]), .hdr(hdr_rd),
    .clayer(nxt[LW-1:0]), .ccol(src_col), .cfg(src_rd)
  );

  cp_src #(.ROWS(ROWS), .TCOLS(TCOLS)) u_src (
    .clk, .rst_n,
    .start(src_start), .done(src_done),
    .rd_col(src_col), .rd_cfg(src_rd),
    .cfg_out(cfg_out), .cfg_shift(cfg_shift)
  );

  assign src_start = (st == C_DECODE);
  assign ps_start  = (st == C_DECODE);
  assign ps_n      = hdr_rd.n_params;
  assign apply     = (st == C_APPLY);
  assign running   = (st != C_IDLE) && (st != C_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= C_IDLE;
      nxt          <= '0;
      nxt_hdr      <= '0;
      act_hdr      <= '0;
      layer_busy   <= 1'b0;
      fs_done_seen <= 1'b0;
      done         <= 1'b0;
    end else begin
      if (fs_done) fs_done_seen <= 1'b1;
      unique case (st)
        C_IDLE: if (start) begin
          done       <= 1'b0;
          nxt        <= '0;
          layer_busy <= 1'b0;
          st         <= (n_layers == '0) ? C_DONE : C_FETCH;
        end
        C_FETCH:  st <= C_DECODE;            // header read in flight
        C_DECODE: begin
          nxt_hdr <= hdr_rd;
          st      <= C_PREP;
        end
        C_PREP:   if (src_done && ps_done && !src_start) st <= C_WAIT;
        C_WAIT:   if (!layer_busy || fs_done_seen || fs_done) st <= C_APPLY;
        C_APPLY: begin
          act_hdr      <= nxt_hdr;
          layer_busy   <= 1'b1;
          fs_done_seen <= 1'b0;
          nxt          <= nxt + 1'b1;
          st           <= ((nxt + 1'b1) < n_layers) ? C_FETCH : C_LAST;
        end
        C_LAST: if (fs_done_seen || fs_done) begin
          layer_busy <= 1'b0;
          st         <= C_DONE;
        end
        C_DONE: begin
          done <= 1'b1;
          if (start) begin
            done <= 1'b0;
            nxt  <= '0;
            st   <= (n_layers == '0) ? C_DONE : C_FETCH;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
