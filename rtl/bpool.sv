// bpool: bit-level max-pooling component (BPOOL).
//
// A q-bit max pooling is done by q BPOOLs, one per bit, most significant bit
// first, each fed by the T-BN that produces that bit.  A BPOOL keeps the
// current maximum's bit and a pooling-complete counter.  The first value of a
// pooling region is loaded unconditionally.  For later values the BPOOL uses
// the state handed on by the BPOOL of the next higher bit (pred):
//   PS_GT  the new value already won on a higher bit: take the new bit;
//   PS_LT  it already lost (the document's EN = 0): keep the stored bit;
//   PS_EQ  equal so far: compare this bit, and hand on GT, LT or EQ.
// The most significant BPOOL is given PS_EQ.  The document names only the EN
// signal; GT is added here because a bit-serial maximum also needs to know
// that a higher bit was won.
//
// When pool_n values have been seen the maximum bit is emitted (out_valid)
// after out_dly further cycles, so the compiler can line up all q bits of a
// result.  State is registered: a BPOOL sees its bit one cycle after the
// BPOOL above it, matching the one-cycle-per-stage T-BN chain.
module bpool
  import cqnn_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clr,        // layer start: restart the counter
  input  logic [POOL_W-1:0]  pool_n,
  input  logic [ODLY_W-1:0]  out_dly,
  input  logic               in_valid,
  input  logic               in_bit,
  input  pool_st_e           pred,
  output pool_st_e           state,
  output logic               out_valid,
  output logic               out_bit
);
  localparam int unsigned DL = 1 << ODLY_W;

  logic [POOL_W-1:0] cnt;
  logic              max_q;
  logic              nmax;
  pool_st_e          nstate;
  logic              done;
  logic [DL-1:0]     dv;
  logic [DL-1:0]     db;

  always_comb begin
    nmax   = max_q;
    nstate = PS_EQ;
    if (cnt == '0) begin
      nmax   = in_bit;
      nstate = PS_GT;
    end else begin
      unique case (pred)
        PS_GT: begin nmax = in_bit; nstate = PS_GT; end
        PS_LT: begin nmax = max_q;  nstate = PS_LT; end
        default: begin
          if (in_bit && !max_q)      begin nmax = 1'b1; nstate = PS_GT; end
          else if (!in_bit && max_q) begin nmax = 1'b1; nstate = PS_LT; end
          else                       begin nmax = max_q; nstate = PS_EQ; end
        end
      endcase
    end
    done = in_valid && ((cnt + 1'b1) >= pool_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      max_q <= 1'b0;
      state <= PS_EQ;
      dv    <= '0;
      db    <= '0;
    end else begin
      if (clr) begin
        cnt <= '0;
      end else if (in_valid) begin
        max_q <= nmax;
        state <= nstate;
        cnt   <= done ? '0 : cnt + 1'b1;
      end
      dv <= {dv[DL-2:0], done};
      db <= {db[DL-2:0], nmax};
    end
  end

  // out_dly = 0 gives the result one cycle after the last value of the region.
  assign out_valid = dv[out_dly];
  assign out_bit   = db[out_dly];
endmodule
