// tb_cqnn_full: end-to-end run of CQNN at its default size (64 x 16 tiles,
// i.e. 64 x 48 components, 32-layer instruction memory).  Layer 0 is a
// 4-bit-feature x 3-bit-weight layer over 128 input channels (four groups)
// with 4-bit outputs and 2x2 pooling, mapped as twenty 16 x 3-tile engines
// (960 of the 1024 BCONVs busy); layer 1 is a binary layer over 64 channels
// with 2x2 pooling, mapped as 512 engines of 2 x 1 tiles.  See
// tb_cqnn_body.svh for what is checked.
module tb_cqnn_full;
  import cqnn_pkg::*;
  import cqnn_tb_pkg::*;
  localparam int ROWS = 64, TCOLS = 16, LAYERS = 32, NL = 2;
  localparam int WATCHDOG = 60000;

  `include "tb_cqnn_body.svh"

  function automatic layer_t layer_def(int l);
    case (l)
      0:       return '{fb: 4, wb: 3, ng: 4, q: 4, pool: 4, nwin: 32, vert: 0};
      default: return '{fb: 1, wb: 1, ng: 2, q: 1, pool: 4, nwin: 32, vert: 0};
    endcase
  endfunction

  cqnn_top dut (.*);
endmodule
