// tb_rsc_encoder: drives random blocks through rsc_encoder, using the
// `first` input to restart between blocks, and compares every parity bit
// with the reference feedback-sequence encoder.
module tb_rsc_encoder;
  import tsync_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, first = 0, u = 0;
  logic p;
  logic [2:0] state;
  int checks = 0, failures = 0;

  rsc_encoder dut (.clk, .rst_n, .en, .first, .u, .p, .state);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int_da ub, pb;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      int K;
      K = 5 + int'($urandom_range(60, 0));
      ub = new[K];
      foreach (ub[k]) ub[k] = int'($urandom_range(1, 0));
      pb = ref_encode(ub);
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        en = 1; first = (k == 0); u = ub[k][0];
        #1;
        checks++;
        if (int'(p) != pb[k]) begin
          failures++;
          if (failures < 10) $display("blk %0d k %0d parity %0b expected %0d", blk, k, p, pb[k]);
        end
        // idle cycles inside the block must not disturb the state
        if ($urandom_range(3, 0) == 0) begin
          @(negedge clk); en = 0; u = ~u;
        end
      end
      @(negedge clk); en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
