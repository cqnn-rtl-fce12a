// param_scheduler: Parameter Scheduler (PS) of the CGRA array.
//
// While a layer runs, the PS prefetches the weights and thresholds of the
// next layer from off-chip memory and writes them into the shadow weight
// registers of the BCONVs and the idle bank of the T-BN threshold tables, so
// the layer switch needs no reload time.  The control processor starts a
// load with the record count of the next layer (load_start, n_params); the
// PS then accepts that many records (p_valid/p_ready), forwards each, one
// cycle later, as a write on the array's parameter port and raises
// load_done once all are written.  Biases are assumed folded into the
// thresholds by the compiler.
module param_scheduler
  import cqnn_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_start,
  input  logic [CNT_W-1:0] n_params,
  output logic             load_done,
  input  logic             p_valid,
  output logic             p_ready,
  input  param_rec_t       p_rec,
  output logic             pw_en,
  output param_rec_t       pw_rec
);
  logic             loading;
  logic [CNT_W-1:0] cnt, target;
  logic             take;

  assign p_ready = loading && (cnt < target);
  assign take    = p_valid && p_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading   <= 1'b0;
      cnt       <= '0;
      target    <= '0;
      load_done <= 1'b0;
      pw_en     <= 1'b0;
      pw_rec    <= '0;
    end else begin
      pw_en <= take;
      if (take) pw_rec <= p_rec;
      if (load_start) begin
        loading   <= 1'b1;
        cnt       <= '0;
        target    <= n_params;
        load_done <= 1'b0;
      end else if (loading) begin
        if (take) cnt <= cnt + 1'b1;
        if ((cnt + CNT_W'(take)) >= target) begin
          loading   <= 1'b0;
          load_done <= 1'b1;
        end
      end
    end
  end
endmodule
