// feature_scheduler: Feature Scheduler (FS) of the CGRA array.
//
// Inbound: it accepts one convolution window per cycle from off-chip memory
// (win_valid/win_ready).  A window carries every feature bit plane (up to
// FB_MAX) of every 32-channel group (up to G_MAX) of one K x K window.  Each
// array row is given one (bit plane, group) slice of it, chosen by the row
// map of the current layer's instruction; all rows of a cycle see the same
// window, and the engines differ by the weights they hold (output channels).
// The slice is registered, so row_feat follows the accepted window by one
// cycle.
//
// Outbound: every cycle it gathers the pooled bits of all tiles, masks the
// ones that are not valid and, when any is valid, writes the masked vector
// and the valid mask back (wb_*).  The write side is assumed always ready.
//
// A layer starts with `start` (the layer switch), which latches the layer's
// row map, window count and drain time; layer_done pulses drain+2 cycles
// after the last of the n_windows windows is accepted.  Building windows from a feature
// map (the line buffers) is not part of this block: windows arrive formed.
module feature_scheduler
  import cqnn_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned TCOLS = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  row_map_t [ROWS_MAX-1:0] row_map,
  input  logic [CNT_W-1:0]   n_windows,
  input  logic [DRAIN_W-1:0] drain,
  output logic               layer_done,
  output logic               busy,
  // window stream from off-chip memory
  input  logic               win_valid,
  output logic               win_ready,
  input  logic [BW-1:0]      win_data [FB_MAX][G_MAX],
  // row buses into the array
  output logic               row_valid,
  output logic [BW-1:0]      row_feat [ROWS],
  // pooled bits from the array
  input  logic               pool_valid [ROWS][TCOLS],
  input  logic               pool_bit   [ROWS][TCOLS],
  // write-back to off-chip memory
  output logic               wb_valid,
  output logic [ROWS*TCOLS-1:0] wb_bits,
  output logic [ROWS*TCOLS-1:0] wb_mask
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} st_e;
  st_e                st;
  logic [CNT_W-1:0]   cnt;
  logic [DRAIN_W-1:0] dcnt;
  row_map_t [ROWS_MAX-1:0] map_q;
  logic [CNT_W-1:0]   nw_q;
  logic [DRAIN_W-1:0] dr_q;
  logic               take;
  logic [ROWS*TCOLS-1:0] v_flat, b_flat;

  assign win_ready = (st == S_RUN) && (cnt < nw_q);
  assign take      = win_valid && win_ready;
  assign busy      = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      cnt        <= '0;
      dcnt       <= '0;
      map_q      <= '0;
      nw_q       <= '0;
      dr_q       <= '0;
      layer_done <= 1'b0;
    end else begin
      layer_done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st    <= S_RUN;
          cnt   <= '0;
          map_q <= row_map;
          nw_q  <= n_windows;
          dr_q  <= drain;
        end
        S_RUN: begin
          if (take) cnt <= cnt + 1'b1;
          if ((cnt + CNT_W'(take)) >= nw_q) begin
            st   <= S_DRAIN;
            dcnt <= dr_q;
          end
        end
        S_DRAIN: begin
          if (dcnt == '0) begin
            st         <= S_IDLE;
            layer_done <= 1'b1;
          end else begin
            dcnt <= dcnt - 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) row_valid <= 1'b0;
    else        row_valid <= take;
  end

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    always_ff @(posedge clk) begin
      if (take) row_feat[r] <= win_data[map_q[r].plane][map_q[r].group];
    end
  end

  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++)
      for (int unsigned c = 0; c < TCOLS; c++) begin
        v_flat[r*TCOLS + c] = pool_valid[r][c];
        b_flat[r*TCOLS + c] = pool_bit[r][c] & pool_valid[r][c];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_bits  <= '0;
      wb_mask  <= '0;
    end else begin
      wb_valid <= |v_flat;
      wb_bits  <= b_flat;
      wb_mask  <= v_flat;
    end
  end
endmodule
