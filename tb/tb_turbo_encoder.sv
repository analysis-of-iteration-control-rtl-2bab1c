// tb_turbo_encoder: encodes random blocks with a random interleaver, both
// component encoders fed in the same cycle (transmitter use), and compares
// s, p1 and p2 with the reference encoder applied to u and to u permuted.
module tb_turbo_encoder;
  import tsync_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic en1 = 0, first1 = 0, u1 = 0, en2 = 0, first2 = 0, u2 = 0;
  logic s, p1, p2;
  int checks = 0, failures = 0;

  turbo_encoder dut (.clk, .rst_n, .en1, .first1, .u1, .en2, .first2, .u2, .s, .p1, .p2);
  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int_da ub, ui, pr, e1, e2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 10; blk++) begin
      int K;
      K  = 8 + int'($urandom_range(100, 0));
      ub = new[K]; ui = new[K];
      foreach (ub[k]) ub[k] = int'($urandom_range(1, 0));
      pr = ref_perm(K);
      foreach (ui[k]) ui[k] = ub[pr[k]];
      e1 = ref_encode(ub);
      e2 = ref_encode(ui);
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        en1 = 1; first1 = (k == 0); u1 = ub[k][0];
        en2 = 1; first2 = (k == 0); u2 = ui[k][0];
        #1;
        checks += 3;
        if (int'(s) != ub[k])  failures++;
        if (int'(p1) != e1[k]) failures++;
        if (int'(p2) != e2[k]) failures++;
      end
      @(negedge clk); en1 = 0; en2 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
