// tb_cqnn_table1: the layer sweep a CQNN is rated on, run end to end on the
// default-size accelerator (64 x 16 tiles).  Every layer is a 3x3
// convolution with 2x2 max pooling.  The first nine layers run over 128
// input channels (four 288-bit groups) at the feature/weight widths
// (1,1) (2,1) (2,2) (3,2) (3,3) (4,3) (4,4) (5,4) (5,5).  The last three run
// at (4,3) over 32, 64 and 96 channels.  Each layer quantizes to as many
// bits as its features have.  32 windows per layer (8 pooled outputs per
// output channel), as many engines per layer as fit, twelve layer switches
// in one program.  See tb_cqnn_body.svh for what is checked.
module tb_cqnn_table1;
  import cqnn_pkg::*;
  import cqnn_tb_pkg::*;
  localparam int ROWS = 64, TCOLS = 16, LAYERS = 32, NL = 12;
  localparam int WATCHDOG = 200000;

  `include "tb_cqnn_body.svh"

  function automatic layer_t layer_def(int l);
    case (l)
      0:  return '{fb: 1, wb: 1, ng: 4, q: 1, pool: 4, nwin: 32, vert: 0};
      1:  return '{fb: 2, wb: 1, ng: 4, q: 2, pool: 4, nwin: 32, vert: 0};
      2:  return '{fb: 2, wb: 2, ng: 4, q: 2, pool: 4, nwin: 32, vert: 0};
      3:  return '{fb: 3, wb: 2, ng: 4, q: 3, pool: 4, nwin: 32, vert: 0};
      4:  return '{fb: 3, wb: 3, ng: 4, q: 3, pool: 4, nwin: 32, vert: 0};
      5:  return '{fb: 4, wb: 3, ng: 4, q: 4, pool: 4, nwin: 32, vert: 0};
      6:  return '{fb: 4, wb: 4, ng: 4, q: 4, pool: 4, nwin: 32, vert: 0};
      7:  return '{fb: 5, wb: 4, ng: 4, q: 5, pool: 4, nwin: 32, vert: 0};
      8:  return '{fb: 5, wb: 5, ng: 4, q: 5, pool: 4, nwin: 32, vert: 0};
      9:  return '{fb: 4, wb: 3, ng: 1, q: 4, pool: 4, nwin: 32, vert: 0};
      10: return '{fb: 4, wb: 3, ng: 2, q: 4, pool: 4, nwin: 32, vert: 0};
      default: return '{fb: 4, wb: 3, ng: 3, q: 4, pool: 4, nwin: 32, vert: 0};
    endcase
  endfunction

  // Simulated-time limit for this long run, a backstop behind the cycle
  // watchdog of the shared body.
  initial begin
    #(64'(WATCHDOG) * 10 + 1000);
    failures++;
    $display("time limit reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cqnn_top dut (.*);
endmodule
