// tb_iteration_control: feeds half-iterations of APP beats built from known
// codewords and checks the stopping decision:
//   1. first half-iteration of a block with a valid codeword  -> not valid
//      (no previous half-iteration to compare with)
//   2. second half-iteration, same word, parity consistent    -> valid
//   3. a half-iteration with one wrong parity decision        -> not valid,
//      and the following half-iteration is not valid either
//   4. a consistent half-iteration of a different word        -> not valid
//      (systematic decisions changed), the next one            -> valid
// It also checks the mismatch/change counts, the one-cycle check latency
// and the stored hard decisions.
module tb_iteration_control;
  import tsync_pkg::*;
  import tsync_ref_pkg::*;
  localparam int K = 40;
  logic clk = 0, rst_n = 0, blk_start = 0, beat_valid = 0;
  app_beat_t beat;
  logic chk_done, codeword_valid, rd_bit;
  logic [IDX_W-1:0] n_par_err, n_sys_chg, rd_addr;
  int checks = 0, failures = 0;
  int_da pr;

  iteration_control #(.KMAX(64)) dut (.clk, .rst_n, .blk_start, .beat_valid, .beat,
    .chk_done, .codeword_valid, .n_par_err, .n_sys_chg, .rd_addr, .rd_bit);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int llr_of(input int b);
    int m;
    m = 1 + int'($urandom_range(200, 0));
    return b ? -m : m;
  endfunction

  // one half-iteration for info word u; flip_par >= 0 corrupts that parity
  task automatic send_half(input int h, input int_da u, input int flip_par);
    int_da ui, p;
    ui = new[K];
    foreach (ui[j]) ui[j] = (h == 0) ? u[j] : u[pr[j]];
    p = ref_encode(ui);
    for (int j = 0; j < K; j++) begin
      @(negedge clk);
      beat_valid = 1;
      beat.half  = h[0];
      beat.step  = IDX_W'(j);
      beat.nat   = IDX_W'((h == 0) ? j : pr[j]);
      beat.app_s = app_t'(llr_of(ui[j]));
      beat.app_p = app_t'(llr_of(p[j] ^ int'(j == flip_par)));
      beat.last  = (j == K - 1);
      // random bubbles
      if (j != K - 1 && $urandom_range(4, 0) == 0) begin
        @(negedge clk); beat_valid = 0;
      end
    end
    @(negedge clk);
    beat_valid = 0;
    // chk_done must be high exactly one cycle after the last beat
    checks++;
    if (!chk_done) begin failures++; $display("chk_done late"); end
  endtask

  task automatic expect_valid(input int exp_v, input int exp_pe, input int exp_sc, input string what);
    checks += 3;
    if (int'(codeword_valid) != exp_v) begin failures++; $display("%s: valid=%0b", what, codeword_valid); end
    if (int'(n_par_err) != exp_pe)     begin failures++; $display("%s: par_err=%0d", what, n_par_err); end
    if (int'(n_sys_chg) != exp_sc)     begin failures++; $display("%s: sys_chg=%0d", what, n_sys_chg); end
  endtask

  initial begin
    int_da u, w;
    int nchg;
    beat = '0; rd_addr = '0;
    pr = ref_perm(K);
    u = new[K]; w = new[K];
    foreach (u[k]) u[k] = int'($urandom_range(1, 0));
    foreach (w[k]) w[k] = u[k];
    w[3] ^= 1; w[17] ^= 1;
    nchg = 2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); blk_start = 1; @(negedge clk); blk_start = 0;

    send_half(0, u, -1); expect_valid(0, 0, 0, "first half");
    send_half(1, u, -1); expect_valid(1, 0, 0, "second half");
    send_half(0, u, 7);  expect_valid(0, 1, 0, "parity error");
    send_half(1, u, -1); expect_valid(0, 0, 0, "after parity error");
    send_half(0, w, -1); expect_valid(0, 0, nchg, "word changed");
    send_half(1, w, -1); expect_valid(1, 0, 0, "stable again");

    // stored decisions are the last word
    for (int k = 0; k < K; k++) begin
      rd_addr = IDX_W'(k); #1;
      checks++;
      if (int'(rd_bit) != w[k]) failures++;
    end

    // a new block forgets the history
    @(negedge clk); blk_start = 1; @(negedge clk); blk_start = 0;
    checks++;
    if (codeword_valid) failures++;
    send_half(0, w, -1); expect_valid(0, 0, 0, "new block first half");
    send_half(1, w, -1); expect_valid(1, 0, 0, "new block second half");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
