// acc_switch: NOC switch with accumulator and left-shift logic.
//
// Each switch next to a BCONV carries a partial sum through the array.  A
// Q-CONV result is built by chaining switches: the chain input and the side
// input (each already selected from a neighbour by the tile) are shifted left
// by acc_shift and side_shift, added, and the local BCONV popcount is added:
//   acc = (chain << acc_shift) + (side << side_shift) + popcount.
// Chaining from the most significant bit product to the least significant
// one (shift 1 where the bit weight drops, 0 where it stays) gives the
// document's add-after-shift reduction; shift 0 on an input merges a partial
// sum of equal weight, e.g. another 32-channel group (inter-group sum).  The
// second input lets a block of tiles reduce in two directions: along each
// row, and down the last column.
//
// Because each hop is registered, the popcount of chain position n must be
// the one computed n cycles earlier.  A small circular buffer delays the
// popcount by cfg skew cycles (0 = no delay); the compiler sets skew to the
// position in the chain.  The buffer and the side input are this design's
// way of aligning the pipeline; the document only says the switches
// accumulate and shift.
//
// Timing: acc_out is registered; latency chain_in -> acc_out is one cycle,
// popcount -> acc_out is skew+1 cycles.
module acc_switch
  import cqnn_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [SHIFT_W-1:0]       acc_shift,
  input  logic [SHIFT_W-1:0]       side_shift,
  input  logic                     bconv_en,
  input  logic [SKEW_W-1:0]        skew,
  input  logic                     pc_valid,
  input  logic [PC_W-1:0]          pc,
  input  acc_link_t                chain_in,
  input  acc_link_t                side_in,
  output acc_link_t                acc_out
);
  logic [PC_W-1:0]     dmem [SKEW_DEPTH];
  logic [SKEW_DEPTH-1:0] vmem;
  logic [SKEW_W-1:0]   wptr;
  logic [SKEW_W-1:0]   rptr;
  logic                d_valid;
  logic [PC_W-1:0]     d_pc;
  logic signed [ACC_W-1:0] sum;

  assign rptr = wptr - skew;

  always_comb begin
    if (skew == '0) begin
      d_valid = pc_valid;
      d_pc    = pc;
    end else begin
      d_valid = vmem[rptr];
      d_pc    = dmem[rptr];
    end
  end

  always_ff @(posedge clk) dmem[wptr] <= pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vmem <= '0;
      wptr <= '0;
    end else begin
      vmem[wptr] <= pc_valid;
      wptr       <= wptr + 1'b1;
    end
  end

  always_comb begin
    sum = (chain_in.acc <<< acc_shift) + (side_in.acc <<< side_shift);
    if (bconv_en) sum = sum + $signed({{(ACC_W-PC_W){1'b0}}, d_pc});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_out <= '0;
    end else begin
      acc_out.valid <= bconv_en ? d_valid : chain_in.valid;
      acc_out.acc   <= sum;
    end
  end
endmodule
