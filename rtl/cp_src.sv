// cp_src: Switch Reconfiguration Controller (SRC) of the control processor.
//
// On `start` it reads the TCOLS column words of a layer from the instruction
// memory, one per cycle, and pushes each into the array's configuration
// shift chain (cfg_out with cfg_shift).  Words enter at the right-most column
// and move left, so column 0's word is sent first; after TCOLS pushes every
// column holds its word and `done` rises.  One column per cycle is the
// document's setting.  Memory read latency is one cycle.
module cp_src
  import cqnn_pkg::*;
#(
  parameter int unsigned ROWS  = 64,
  parameter int unsigned TCOLS = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output logic [$clog2(TCOLS)-1:0] rd_col,
  input  tile_cfg_t   rd_cfg [ROWS],
  output tile_cfg_t   cfg_out [ROWS],
  output logic        cfg_shift
);
  localparam int unsigned CW = $clog2(TCOLS);
  logic        reading;
  logic [CW:0] issued;

  assign rd_col  = issued[CW-1:0];
  assign cfg_out = rd_cfg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading   <= 1'b0;
      issued    <= '0;
      cfg_shift <= 1'b0;
      done      <= 1'b0;
    end else begin
      cfg_shift <= reading;
      if (start) begin
        reading <= 1'b1;
        issued  <= '0;
        done    <= 1'b0;
      end else if (reading) begin
        if (issued == (CW+1)'(TCOLS - 1)) reading <= 1'b0;
        else                               issued  <= issued + 1'b1;
      end
      if (cfg_shift && !reading) done <= 1'b1;
    end
  end
endmodule
