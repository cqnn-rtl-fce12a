// tbn: threshold batch-normalisation component (T-BN).
//
// Batch normalisation followed by quantisation reduces to comparing the Q-CONV
// result with thresholds.  A q-bit output needs 2^q - 1 thresholds; a chain of
// q T-BNs finds the output level by binary search, the first stage giving the
// most significant bit.  Each T-BN holds the whole threshold table, compares
// the incoming Q-CONV value with the entry at the incoming address
// (output bit = qconv > threshold) and passes the value on with the address
// for the next stage.
//
// Addressing (as in the document's 3-bit example, first address 100):
// an address is {bits decided so far, 1, 0...}; entry a holds threshold
// T(a-1), entry 0 is unused.  With m the lowest set bit of the address the
// next address is (bit ? addr : addr & ~m) | m>>1.
//
// The table has two banks: the running layer reads bank `bank`, the
// parameter scheduler fills the other bank for the next layer (double
// buffering, this design's choice).  Table read is asynchronous; all outputs
// are registered, one cycle per stage.
module tbn
  import cqnn_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     bank,
  input  logic                     tw_en,
  input  logic [TADDR_W-1:0]       tw_idx,
  input  logic signed [ACC_W-1:0]  tw_data,
  input  tbn_link_t                in,
  output tbn_link_t                out,
  output logic                     out_bit
);
  logic signed [ACC_W-1:0] table_q [2][TDEPTH];
  logic signed [ACC_W-1:0] thr;
  logic [TADDR_W-1:0]      m;
  logic [TADDR_W-1:0]      nxt;
  logic                    bit_d;

  always_ff @(posedge clk) begin
    if (tw_en) table_q[~bank][tw_idx] <= tw_data;
  end

  always_comb begin
    thr   = table_q[bank][in.addr];
    bit_d = in.qconv > thr;
    m     = in.addr & (~in.addr + 1'b1);
    nxt   = (bit_d ? in.addr : (in.addr & ~m)) | (m >> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out     <= '0;
      out_bit <= 1'b0;
    end else begin
      out.valid <= in.valid;
      if (in.valid) begin
        out.qconv <= in.qconv;
        out.addr  <= nxt;
        out_bit   <= bit_d;
      end
    end
  end
endmodule
