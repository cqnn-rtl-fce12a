// tb_bconv: checks the BCONV popcount of AND-ed bit planes against a
// reference count, one cycle of latency, on random and corner operands.
module tb_bconv;
  import cqnn_pkg::*;
  localparam int unsigned N = BW;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [N-1:0] feat, wt;
  logic out_valid;
  logic [$clog2(N+1)-1:0] pc;
  int checks = 0, failures = 0;
  int exp_q, expv_q;

  bconv #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_pc(logic [N-1:0] a, logic [N-1:0] b);
    int n = 0;
    for (int i = 0; i < N; i++) if (a[i] && b[i]) n++;
    return n;
  endfunction

  task automatic drive(logic [N-1:0] a, logic [N-1:0] b);
    feat = a; wt = b; in_valid = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (pc !== ref_pc(a, b) || out_valid !== 1'b1) begin
      failures++;
      $display("mismatch: pc=%0d exp=%0d", pc, ref_pc(a, b));
    end
  endtask

  initial begin
    in_valid = 0; feat = '0; wt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    drive('1, '1);          // all 288 products are one
    drive('1, '0);
    drive('0, '1);
    for (int t = 0; t < 200; t++) begin
      logic [N-1:0] a, b;
      for (int w = 0; w < N; w += 32) begin
        a[w +: 32] = $urandom;
        b[w +: 32] = $urandom;
      end
      drive(a, b);
    end
    in_valid = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
