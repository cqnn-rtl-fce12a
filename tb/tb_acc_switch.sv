// tb_acc_switch: checks acc = (chain << acc_shift) + (side << side_shift)
// + popcount delayed by `skew` cycles, the valid selection, and the
// one-cycle latency, with random operands and random skews.
module tb_acc_switch;
  import cqnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [SHIFT_W-1:0] acc_shift, side_shift;
  logic bconv_en;
  logic [SKEW_W-1:0] skew;
  logic pc_valid;
  logic [PC_W-1:0] pc;
  acc_link_t chain_in, side_in, acc_out;
  int checks = 0, failures = 0;
  int hist_pc [$];
  bit hist_v [$];

  acc_switch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc_shift = 0; side_shift = 0; bconv_en = 0; skew = 0; pc_valid = 0; pc = 0;
    chain_in = '0; side_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the history with known popcounts
    for (int t = 0; t < 3000; t++) begin
      int exp_acc;
      bit exp_v;
      int idx;
      @(negedge clk);
      pc       = PC_W'($urandom_range(0, BW));
      pc_valid = $urandom_range(0, 3) != 0;
      hist_pc.push_back(pc);
      hist_v.push_back(pc_valid);
      chain_in.acc   = $signed(ACC_W'($urandom_range(0, 100000)));
      chain_in.valid = $urandom_range(0, 1);
      side_in.acc    = $signed(ACC_W'($urandom_range(0, 100000)));
      acc_shift  = SHIFT_W'($urandom_range(0, 2));
      side_shift = SHIFT_W'($urandom_range(0, 2));
      bconv_en   = $urandom_range(0, 3) != 0;
      skew       = (t < SKEW_DEPTH) ? '0 : SKEW_W'($urandom_range(0, SKEW_DEPTH - 1));
      idx = hist_pc.size() - 1 - int'(skew);
      exp_acc = (int'(chain_in.acc) << acc_shift) + (int'(side_in.acc) << side_shift)
              + (bconv_en ? hist_pc[idx] : 0);
      exp_v   = bconv_en ? hist_v[idx] : chain_in.valid;
      @(posedge clk); #1;
      checks++;
      if (int'(acc_out.acc) != exp_acc || acc_out.valid != exp_v) begin
        failures++;
        if (failures < 10)
          $display("t=%0d skew=%0d acc=%0d exp=%0d v=%0b/%0b", t, skew, acc_out.acc, exp_acc,
                   acc_out.valid, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
