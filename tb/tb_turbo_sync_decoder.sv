// tb_turbo_sync_decoder: end-to-end test of the turbo synchronisation
// receiver at its default sizes (no parameter overrides).
//
// For each block the testbench draws random information bits and a random
// interleaver, encodes with the reference encoder, punctures (rate 1/3,
// rate 0.8 or rate 0.443 patterns, given to the receiver as a position
// table), maps onto QPSK (bit 2l on I, bit 2l+1 on Q, bit 0 -> +1) or Gray
// 16-QAM (bits 4l..4l+3: I sign, I amplitude, Q sign, Q amplitude), applies
// a carrier frequency and phase offset, adds Gaussian noise, quantises to
// 8 bits and runs the receiver. Blocks:
//   A  K=64,   turbo sync + iteration control: decoded bits correct, the
//      decoder stops early on a valid codeword;
//   B  K=64,   turbo sync, iteration control off: all 16 half-iterations
//      run, synchronisation updates are applied, the decoder stalls for the
//      estimator (small blocks), the frequency estimate is close, bits correct;
//   C  K=64,   external stop raised during the first iteration: ends early
//      at a half-iteration boundary;
//   D  K=64,   turbo sync off (mode switch): no updates, estimates stay zero;
//   E  K=5124, the largest block, turbo sync + iteration control: bits
//      correct and early stop;
//   F  K=1136, rate 0.8 (p1 at k mod 8 = 0, p2 at k mod 8 = 4), QPSK, turbo
//      sync + iteration control: bits correct, early stop;
//   G  K=1056, rate 0.443 (1328 of the 2112 parity bits, evenly spread),
//      16-QAM, turbo sync + iteration control: bits correct, early stop;
//   then G without turbo sync (bit errors remain), G without iteration
//   control (16 half-iterations, bits correct, more than with it) and F
//   without turbo sync (bit errors remain), as in the compared
//   configurations of the evaluation.
// Each mechanism (early stop on a valid codeword, max half-iterations,
// external stop, sync update, stall, ts off) is counted and must occur.
module tb_turbo_sync_decoder;
  import tsync_pkg::*;
  import tsync_ref_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] blk_len = '0;
  logic [HI_W-1:0] max_half = 5'd16;
  logic ts_en = 1, ic_en = 1;
  logic [2:0] demap_sh = 3'd2, tanh_sh = 3'd3;
  logic il_we = 0; logic [IDX_W-1:0] il_addr = '0, il_data = '0;
  logic [IDX_W+1:0] n_tx = '0; logic qam16 = 0; logic signed [9:0] qam_thr = 10'sd43;
  logic pos_we = 0; logic [IDX_W+1:0] pos_addr = '0; logic [IDX_W-1:0] pos_k = '0;
  bit_type_e pos_t = BT_SYS;
  logic r_we = 0; logic [IDX_W:0] r_addr = '0; logic signed [7:0] r_i = '0, r_q = '0;
  logic run = 0, stop = 0;
  logic busy, done, codeword_valid, stopped_early, rd_bit;
  logic [HI_W:0] half_iters;
  logic [IDX_W-1:0] rd_addr = '0;
  logic signed [31:0] est_step;
  logic signed [15:0] est_phi;
  logic [15:0] n_sync_updates, n_stall_cycles;
  int checks = 0, failures = 0;
  int ev_early = 0, ev_maxhalf = 0, ev_extstop = 0, ev_update = 0, ev_stall = 0, ev_tsoff = 0;
  int cyc = 0;

  turbo_sync_decoder dut (.clk, .rst_n, .blk_len, .max_half, .ts_en, .ic_en, .n_tx, .qam16, .qam_thr,
    .demap_sh, .tanh_sh, .pos_we, .pos_addr, .pos_k, .pos_t, .il_we, .il_addr, .il_data, .r_we, .r_addr, .r_i, .r_q, .run, .stop, .busy, .done,
    .codeword_valid, .stopped_early, .half_iters, .rd_addr, .rd_bit, .est_step, .est_phi,
    .n_sync_updates, .n_stall_cycles);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic int q8(input real v);
    int r;
    r = (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
    return ref_sat(r, 127);
  endfunction

  int_da u;
  int nerr, hi, hi_ref, upd0, stall0, t_run;
  int ev_tsgain = 0;

  // pattern 0: rate 1/3; 1: rate 0.8; 2: rate 0.443
  task automatic run_block(input int K, input bit ts, input bit ic, input real f0, input real ph,
                           input real sigma, input int stop_at_cycle,
                           input int qam = 0, input int pat = 0);
    int_da pr, ui, p1, p2, cw, tx;
    int L, N, ip;
    real amp;
    u = new[K]; ui = new[K]; cw = new[3 * K];
    foreach (u[k]) u[k] = int'($urandom_range(1, 0));
    pr = ref_perm(K);
    foreach (ui[j]) ui[j] = u[pr[j]];
    p1 = ref_encode(u);
    p2 = ref_encode(ui);
    for (int k = 0; k < K; k++) begin cw[3*k] = u[k]; cw[3*k+1] = p1[k]; cw[3*k+2] = p2[k]; end
    for (int k = 0; k < K; k++) begin
      @(negedge clk); il_we = 1; il_addr = IDX_W'(k); il_data = IDX_W'(pr[k]);
    end
    @(negedge clk); il_we = 0;
    // transmitted positions
    tx = new[3 * K]; N = 0; ip = 0;
    for (int k = 0; k < K; k++)
      for (int t = 0; t < 3; t++) begin
        bit keep;
        if (t == 0 || pat == 0) keep = 1;
        else if (pat == 1) keep = (k % 8 == 4 * (t - 1));
        else begin
          keep = ((ip + 1) * 1328 / 2112) > (ip * 1328 / 2112);
          ip++;
        end
        if (keep) begin
          tx[N] = 3 * k + t; N++;
          @(negedge clk); pos_we = 1; pos_addr = (IDX_W+2)'(N - 1);
          pos_k = IDX_W'(k); pos_t = bit_type_e'(t);
        end
      end
    @(negedge clk); pos_we = 0;
    L   = qam ? N / 4 : N / 2;
    amp = qam ? 13.0 : 40.0;
    for (int l = 0; l < L; l++) begin
      real a, xi, xq;
      a  = 2.0 * PI * f0 * l + ph;
      if (qam) begin
        xi = amp * (1 - 2 * cw[tx[4*l]])   * (cw[tx[4*l+1]] ? 1.0 : 3.0);
        xq = amp * (1 - 2 * cw[tx[4*l+2]]) * (cw[tx[4*l+3]] ? 1.0 : 3.0);
      end else begin
        xi = amp * (1 - 2 * cw[tx[2*l]]);
        xq = amp * (1 - 2 * cw[tx[2*l+1]]);
      end
      @(negedge clk);
      r_we = 1; r_addr = (IDX_W+1)'(l);
      r_i = 8'(q8(xi * $cos(a) - xq * $sin(a) + sigma * gauss()));
      r_q = 8'(q8(xi * $sin(a) + xq * $cos(a) + sigma * gauss()));
    end
    @(negedge clk); r_we = 0;
    blk_len = IDX_W'(K); ts_en = ts; ic_en = ic; n_tx = (IDX_W+2)'(N); qam16 = qam[0];
    upd0 = int'(n_sync_updates); stall0 = int'(n_stall_cycles);
    @(negedge clk); run = 1; t_run = cyc;
    @(negedge clk); run = 0;
    fork
      while (!done) @(negedge clk);
      if (stop_at_cycle > 0) begin
        repeat (stop_at_cycle) @(negedge clk);
        stop = 1; @(negedge clk); stop = 0;
      end
    join
    nerr = 0;
    for (int k = 0; k < K; k++) begin
      rd_addr = IDX_W'(k); #1;
      if (int'(rd_bit) != u[k]) nerr++;
    end
    hi = int'(half_iters);
    $display("K=%0d N=%0d qam16=%0d ts=%0b ic=%0b: %0d half-iterations, %0d bit errors, valid=%0b early=%0b, updates %0d, stall cycles %0d, %0d cycles, step %0d (true %0d)",
             K, N, qam, ts, ic, hi, nerr, codeword_valid, stopped_early, int'(n_sync_updates) - upd0,
             int'(n_stall_cycles) - stall0, cyc - t_run, est_step, int'(f0 * 4294967296.0));
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // A: turbo sync and iteration control
    run_block(64, 1, 1, 0.15 / 96.0, 0.3, 14.0, 0);
    checks += 3;
    if (nerr != 0) failures++;
    if (!(stopped_early && codeword_valid && hi < 16)) failures++; else ev_early++;
    if (hi < 2) failures++;

    // B: fixed 16 half-iterations with turbo sync
    run_block(64, 1, 0, 0.15 / 96.0, 0.3, 14.0, 0);
    checks += 5;
    if (nerr != 0) failures++;
    if (hi != 16 || stopped_early) failures++; else ev_maxhalf++;
    n = int'(n_sync_updates) - upd0;
    if (n < 5) failures++; else ev_update += n;
    if (int'(n_stall_cycles) - stall0 == 0) failures++; else ev_stall++;
    if (real'(est_step) < 0.8 * 0.15 / 96.0 * 4294967296.0 ||
        real'(est_step) > 1.2 * 0.15 / 96.0 * 4294967296.0) failures++;

    // C: external stop during the first iteration
    run_block(64, 1, 0, 0.15 / 96.0, 0.3, 14.0, 250);
    checks += 2;
    if (!stopped_early) failures++; else ev_extstop++;
    if (hi > 2) failures++;

    // D: turbo synchronisation switched off
    run_block(64, 0, 0, 0.0, 0.2, 10.0, 0);
    checks += 3;
    if (int'(n_sync_updates) != upd0) failures++; else ev_tsoff++;
    if (est_step != 0 || hi != 16) failures++;
    if (nerr != 0) failures++;

    // E: largest block
    run_block(5124, 1, 1, 0.15 / 7686.0, -0.4, 14.0, 0);
    checks += 2;
    if (nerr != 0) failures++;
    if (!(stopped_early && codeword_valid)) failures++; else ev_early++;

    // F: rate 0.8, QPSK
    run_block(1136, 1, 1, 0.06 / 710.0, 0.4, 6.0, 0, 0, 1);
    checks += 2;
    if (nerr != 0) failures++;
    if (!(stopped_early && codeword_valid)) failures++; else ev_early++;

    // G: rate 0.443, 16-QAM
    run_block(1056, 1, 1, 0.15 / 596.0, -0.9, 3.0, 0, 1, 2);
    checks += 2;
    if (nerr != 0) failures++;
    if (!(stopped_early && codeword_valid)) failures++; else ev_early++;

    // F and G again in the compared configurations: without turbo sync the
    // carrier offset leaves bit errors; without iteration control all 16
    // half-iterations run to the same result
    hi_ref = hi;
    run_block(1056, 0, 1, 0.15 / 596.0, -0.9, 3.0, 0, 1, 2);
    checks++;
    if (nerr == 0) failures++; else ev_tsgain++;
    run_block(1056, 1, 0, 0.15 / 596.0, -0.9, 3.0, 0, 1, 2);
    checks += 2;
    if (nerr != 0 || hi != 16) failures++;
    if (hi_ref >= 16) failures++;
    run_block(1136, 0, 1, 0.06 / 710.0, 0.4, 6.0, 0, 0, 1);
    checks++;
    if (nerr == 0) failures++; else ev_tsgain++;

    $display("mechanisms: early stop %0d, max half-iterations %0d, external stop %0d, sync updates %0d, stalls %0d, ts off %0d, errors left without ts %0d",
             ev_early, ev_maxhalf, ev_extstop, ev_update, ev_stall, ev_tsoff, ev_tsgain);
    checks += 6;
    if (ev_early == 0)   failures++;
    if (ev_maxhalf == 0) failures++;
    if (ev_extstop == 0) failures++;
    if (ev_update == 0)  failures++;
    if (ev_stall == 0)   failures++;
    if (ev_tsoff == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
