// cqnn_pkg: constants and types shared by the CQNN blocks.
//
// CQNN builds quantized (1..6 bit) neural-network layers out of binary
// components placed in a reconfigurable array: BCONV (bit-AND + popcount over
// a K*K*CH window), T-BN (one threshold comparison = one output bit) and BPOOL
// (one bit of a max-pooling result).  This package fixes the component sizes,
// the per-tile configuration word that the control processor shifts into the
// array, the per-layer instruction header and the parameter-load record.
//
// From the document: K*K*32 products per BCONV, 1..6 bit features and
// parameters, one threshold table per T-BN addressed by a binary-search
// address, one pooling counter per BPOOL.  Field widths, encodings and the
// layout of the instruction are this design's own choices.
package cqnn_pkg;

  // ---- component sizes -------------------------------------------------
  localparam int unsigned K        = 3;             // convolution window side
  localparam int unsigned CH       = 32;            // input channels per BCONV
  localparam int unsigned BW       = K * K * CH;    // bits per BCONV operand (288)
  localparam int unsigned PC_W     = $clog2(BW + 1);// popcount width (9)
  localparam int unsigned ACC_W    = 26;            // signed accumulator / threshold width
  localparam int unsigned QB_MAX   = 6;             // widest feature / parameter
  localparam int unsigned TADDR_W  = QB_MAX;        // threshold-table address width
  localparam int unsigned TDEPTH   = 1 << TADDR_W;  // entries per table bank
  localparam int unsigned SHIFT_W  = 3;             // left-shift amount in a switch
  localparam int unsigned SKEW_W   = 7;             // popcount alignment delay select
  localparam int unsigned SKEW_DEPTH = 1 << SKEW_W;
  localparam int unsigned ODLY_W   = 3;             // BPOOL output alignment delay
  localparam int unsigned FB_MAX   = QB_MAX;        // feature bit planes carried by a window
  localparam int unsigned PLANE_W  = 3;
  localparam int unsigned G_MAX    = 16;            // 32-channel groups carried by a window
  localparam int unsigned GROUP_W  = 4;
  localparam int unsigned POOL_W   = 4;             // pooling window count (up to 15)
  localparam int unsigned CNT_W    = 24;
  localparam int unsigned DRAIN_W  = 16;
  localparam int unsigned ROWS_MAX = 64;            // rows described by one instruction
  localparam int unsigned ROW_W    = 8;
  localparam int unsigned COL_W    = 8;

  // ---- NOC configuration -----------------------------------------------
  // Where a switch takes a partial sum from (N = row above, W = column left).
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0, SRC_N = 3'd1, SRC_S = 3'd2, SRC_E = 3'd3, SRC_W = 3'd4
  } dir_e;

  // Where a T-BN (and the BPOOL wired to it) takes its input from.
  // TB_OWN: first stage, QCONV result from the switch of the same tile.
  typedef enum logic [1:0] {
    TB_OFF = 2'd0, TB_OWN = 2'd1, TB_N = 2'd2, TB_S = 2'd3
  } tchain_e;

  typedef struct packed {
    dir_e                acc_src;    // shifted chain input
    dir_e                side_src;   // second input (sum of the row above)
    logic [SHIFT_W-1:0]  acc_shift;  // left shift applied to the chain input
    logic [SHIFT_W-1:0]  side_shift; // left shift applied to the side input
    logic                bconv_en;   // add this tile's popcount
    logic [SKEW_W-1:0]   skew;       // cycles the popcount waits before the add
    tchain_e             tbn_src;    // T-BN / BPOOL chain input
    logic [2:0]          qbits;      // output feature width (first T-BN start address)
    logic [ODLY_W-1:0]   out_dly;    // BPOOL result delay so all bits leave together
  } tile_cfg_t;

  // ---- instruction header (one per layer) --------------------------------
  typedef struct packed {
    logic [PLANE_W-1:0] plane;   // feature bit plane placed on the row bus
    logic [GROUP_W-1:0] group;   // 32-channel group placed on the row bus
  } row_map_t;

  typedef struct packed {
    logic [POOL_W-1:0]  pool_n;     // windows per pooling region (1 = no pooling)
    logic [CNT_W-1:0]   n_windows;  // windows streamed in this layer
    logic [DRAIN_W-1:0] drain;      // cycles from the last window to the last result
    logic [CNT_W-1:0]   n_params;   // parameter records to preload for this layer
    row_map_t [ROWS_MAX-1:0] row_map;
  } instr_hdr_t;

  // ---- parameter load record -------------------------------------------
  typedef enum logic {PW_WEIGHT = 1'b0, PW_THRESH = 1'b1} pkind_e;

  typedef struct packed {
    pkind_e              kind;
    logic [ROW_W-1:0]    row;
    logic [COL_W-1:0]    col;
    logic [TADDR_W-1:0]  idx;   // threshold-table entry
    logic [BW-1:0]       data;  // weight bits, or threshold in [ACC_W-1:0]
  } param_rec_t;

  // ---- links between neighbouring tiles --------------------------------
  typedef struct packed {
    logic                    valid;
    logic signed [ACC_W-1:0] acc;
  } acc_link_t;

  typedef struct packed {
    logic                    valid;
    logic signed [ACC_W-1:0] qconv;
    logic [TADDR_W-1:0]      addr;
  } tbn_link_t;

  // Bit-serial max comparison state handed from one BPOOL to the next
  // (the EN signal, plus GT: the new value already won on a higher bit).
  typedef enum logic [1:0] {
    PS_EQ = 2'd0, PS_GT = 2'd1, PS_LT = 2'd2
  } pool_st_e;

endpackage
