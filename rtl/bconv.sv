// bconv: bit-level convolution component (BCONV).
//
// Every cycle it takes one bit plane of a K*K*CH feature window and one bit
// plane of the matching weights, forms the N one-bit products with AND and
// counts the ones (POPCOUNT).  The count and a valid flag are registered, so
// the result appears one cycle after the operands.  N is 3*3*32 = 288 by
// default, as the document states; feature and weight values are unsigned
// quantized levels, so the one-bit product is an AND.
module bconv #(
  parameter int unsigned N = cqnn_pkg::BW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [N-1:0]             feat,
  input  logic [N-1:0]             wt,
  output logic                     out_valid,
  output logic [$clog2(N+1)-1:0]   pc
);
  localparam int unsigned W = $clog2(N + 1);

  logic [N-1:0] prod;
  logic [W-1:0] count;

  always_comb begin
    prod  = feat & wt;
    count = '0;
    for (int unsigned i = 0; i < N; i++) count = count + W'(prod[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pc        <= '0;
    end else begin
      out_valid <= in_valid;
      pc        <= count;
    end
  end
endmodule
