// tb_cqnn_top: end-to-end run of a reduced CQNN (8 x 6 tiles) through four
// layers of different shapes: 2-bit x 3-bit features/weights over 64
// channels with 3-bit outputs and 2x2 pooling; 3-bit x 2-bit over 32
// channels, 2-bit outputs, no pooling; binary (1 x 1 bit) over 96 channels
// with 3x3 pooling; 3-bit x 2-bit over 32 channels in the vertical engine
// shape (six products stacked in one tile column), 3-bit outputs, 2x2
// pooling.  See tb_cqnn_body.svh for what is checked.
module tb_cqnn_top;
  import cqnn_pkg::*;
  import cqnn_tb_pkg::*;
  localparam int ROWS = 8, TCOLS = 6, LAYERS = 4, NL = 4;
  localparam int WATCHDOG = 40000;


  `include "tb_cqnn_body.svh"

  function automatic layer_t layer_def(int l);
    case (l)
      0:       return '{fb: 2, wb: 3, ng: 2, q: 3, pool: 4, nwin: 96, vert: 0};
      1:       return '{fb: 3, wb: 2, ng: 1, q: 2, pool: 1, nwin: 60, vert: 0};
      2:       return '{fb: 1, wb: 1, ng: 3, q: 1, pool: 9, nwin: 90, vert: 0};
      default: return '{fb: 3, wb: 2, ng: 1, q: 3, pool: 4, nwin: 48, vert: 1};
    endcase
  endfunction

  cqnn_top #(.ROWS(ROWS), .TCOLS(TCOLS), .LAYERS(LAYERS)) dut (.*);
endmodule
