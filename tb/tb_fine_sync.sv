// tb_fine_sync: builds a burst of random codeword bits with a known
// frequency and phase offset, for four cases: QPSK at rate 1/3, QPSK
// punctured to rate 0.8, 16-QAM punctured to rate 1/2 and 16-QAM at rate
// 1/3. The position table lists the transmitted codeword positions; the
// burst maps them in pairs as fine_sync expects. The APP LLRs of the bits
// are delivered through the decoder-style beat stream (p1 in a first
// half-iteration, systematic and p2 in interleaved order in a second).
// Checks:
//   * cmd_init: every transmitted position gets the demapped value of its
//     received sample (QPSK clip(1.647 r >>> sh); 16-QAM sign and amplitude
//     LLRs) within 1 (2 for amplitude bits), every punctured position is
//     zero, all at the right bank;
//   * cmd_est: the estimated phase step per symbol and start phase match
//     the offsets put into the burst (the step within 3 % plus 24 angle
//     units over the half-burst distance L/2, the start phase within the -pi*f0
//     bias of the half-block centring plus 2 degrees), and after correction
//     every transmitted LLR has the sign of its bit and a clear magnitude;
//   * the run times: init within 2K + N/2 + 20 cycles, estimation within
//     N + 150.
module tb_fine_sync;
  import tsync_pkg::*;
  import tsync_ref_pkg::*;
  localparam int KM = 128;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] blk_len = '0;
  logic [IDX_W+1:0] n_tx = '0;
  logic qam16 = 0;
  logic signed [9:0] qam_thr = '0;
  logic pos_we = 0; logic [IDX_W+1:0] pos_addr = '0; logic [IDX_W-1:0] pos_k = '0;
  bit_type_e pos_t = BT_SYS;
  logic [2:0] demap_sh = 3'd1, tanh_sh = 3'd2;
  logic r_we = 0; logic [IDX_W:0] r_addr = '0;
  logic signed [7:0] r_i = '0, r_q = '0;
  logic app_valid = 0, app_bank = 0;
  app_beat_t app_beat = '0;
  logic cmd_init = 0, cmd_est = 0, src_bank = 0, dst_bank = 0;
  logic busy, done, llr_bank, llr_clr;
  logic [1:0] llr_we;
  bit_type_e llr_type [2];
  logic [IDX_W-1:0] llr_addr [2];
  llr_t llr_data [2];
  logic signed [31:0] est_step;
  logic signed [15:0] est_phi;
  int checks = 0, failures = 0;

  int bits [3*KM];          // codeword bit 3k+t
  int got  [2][3*KM];       // captured LLRs per bank and codeword position
  int seen [2][3*KM];
  int ri_v [3*KM/2], rq_v [3*KM/2];
  int pos  [3*KM];          // codeword position of transmitted bit n
  int txd  [3*KM];          // 1 when the codeword position is transmitted
  int cyc;

  fine_sync #(.KMAX(KM)) dut (.clk, .rst_n, .blk_len, .n_tx, .qam16, .qam_thr,
    .demap_sh, .tanh_sh, .pos_we, .pos_addr, .pos_k, .pos_t, .r_we, .r_addr, .r_i, .r_q, .app_valid, .app_beat, .app_bank,
    .cmd_init, .cmd_est, .src_bank, .dst_bank, .busy, .done,
    .llr_we, .llr_bank, .llr_clr, .llr_type, .llr_addr, .llr_data, .est_step, .est_phi);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int ln = 0; ln < 2; ln++)
      if (llr_we[ln]) begin
        int pos;
        pos = 3 * int'(llr_addr[ln]) + int'(llr_type[ln]);
        got[llr_bank][pos]  = int'(llr_data[ln]);
        seen[llr_bank][pos] = 1;
        if (llr_clr && ln == 0)
          for (int t = 0; t < 3; t++) begin
            got[llr_bank][pos - int'(llr_type[0]) + t]  = int'(llr_data[0]);
            seen[llr_bank][pos - int'(llr_type[0]) + t] = 1;
          end
      end
  end

  function automatic int rnd(input real v);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  // pattern 0: rate 1/3; 1: sys + p1 at k%8==0 + p2 at k%8==4;
  // 2: sys + p1 at even k + p2 at odd k
  task automatic run_case(input int K, input int qam, input int pat, input real f0,
                          input real ph, input int bank);
    int N, L, t0, dt, amp, thr, mmin;
    int_da pr;
    real exp_step, exp_phi, e;
    pr = ref_perm(K);
    N = 0;
    for (int b = 0; b < 3 * K; b++) txd[b] = 0;
    for (int k = 0; k < K; k++)
      for (int t = 0; t < 3; t++)
        if (t == 0 || pat == 0 || (pat == 1 && k % 8 == 4 * (t - 1)) || (pat == 2 && k % 2 == t - 1)) begin
          pos[N] = 3 * k + t; txd[3 * k + t] = 1; N++;
        end
    L   = qam ? N / 4 : N / 2;
    amp = qam ? 13 : 40;
    thr = rnd(2.0 * amp * 1.6468);
    for (int b = 0; b < 3 * K; b++) bits[b] = int'($urandom_range(1, 0));
    blk_len = IDX_W'(K); n_tx = (IDX_W+2)'(N); qam16 = qam[0]; qam_thr = 10'(thr);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      pos_we = 1; pos_addr = (IDX_W+2)'(n); pos_k = IDX_W'(pos[n] / 3); pos_t = bit_type_e'(pos[n] % 3);
    end
    @(negedge clk); pos_we = 0;
    // burst
    for (int l = 0; l < L; l++) begin
      real a, c, s, xi, xq;
      a  = 2.0 * PI * f0 * l + ph;
      if (qam) begin
        xi = amp * (1 - 2 * bits[pos[4*l]])   * (bits[pos[4*l+1]] ? 1.0 : 3.0);
        xq = amp * (1 - 2 * bits[pos[4*l+2]]) * (bits[pos[4*l+3]] ? 1.0 : 3.0);
      end else begin
        xi = amp * (1 - 2 * bits[pos[2*l]]);
        xq = amp * (1 - 2 * bits[pos[2*l+1]]);
      end
      c = $cos(a); s = $sin(a);
      ri_v[l] = rnd(xi * c - xq * s);
      rq_v[l] = rnd(xi * s + xq * c);
      @(negedge clk);
      r_we = 1; r_addr = (IDX_W+1)'(l); r_i = 8'(ri_v[l]); r_q = 8'(rq_v[l]);
    end
    @(negedge clk); r_we = 0;
    // APP stream: half 0 (p1 natural), half 1 (sys and p2 interleaved)
    app_bank = bank[0];
    for (int h = 0; h < 2; h++)
      for (int j = 0; j < K; j++) begin
        int n;
        n = (h == 0) ? j : pr[j];
        @(negedge clk);
        app_valid = 1;
        app_beat.half  = h[0];
        app_beat.step  = IDX_W'(j);
        app_beat.nat   = IDX_W'(n);
        app_beat.app_s = app_t'(bits[3*n] ? -200 : 200);
        app_beat.app_p = app_t'(bits[3*j + 1 + h] ? -150 : 150);
        app_beat.last  = (j == K - 1);
      end
    @(negedge clk); app_valid = 0;

    // initial demapping into bank `bank`
    foreach (seen[b, p]) begin seen[b][p] = 0; got[b][p] = 99; end
    @(negedge clk); cmd_init = 1; dst_bank = bank[0]; t0 = cyc;
    @(negedge clk); cmd_init = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 > 2 * K + N / 2 + 20) begin failures++; $display("init took %0d", cyc - t0); end
    for (int m = 0; m < N / 2; m++) begin
      int e0, e1, v, tol1;
      if (qam) begin
        v  = rnd(1.6468 * ((m % 2) ? rq_v[m/2] : ri_v[m/2]));
        e0 = ref_sat(v >>> 1, 31);
        e1 = ref_sat(((v < 0 ? -v : v) - thr) >>> 1, 31);
        tol1 = 2;
      end else begin
        e0 = ref_sat(rnd(1.6468 * ri_v[m]) >>> 1, 31);
        e1 = ref_sat(rnd(1.6468 * rq_v[m]) >>> 1, 31);
        tol1 = 1;
      end
      checks += 2;
      if (!seen[bank][pos[2*m]] || got[bank][pos[2*m]] - e0 > 1 || e0 - got[bank][pos[2*m]] > 1) begin
        failures++; if (failures < 10) $display("init pair %0d bit 0: %0d exp %0d", m, got[bank][pos[2*m]], e0);
      end
      if (!seen[bank][pos[2*m+1]] || got[bank][pos[2*m+1]] - e1 > tol1 || e1 - got[bank][pos[2*m+1]] > tol1) begin
        failures++; if (failures < 10) $display("init pair %0d bit 1: %0d exp %0d", m, got[bank][pos[2*m+1]], e1);
      end
    end
    for (int b = 0; b < 3 * K; b++)
      if (!txd[b]) begin
        checks += 2;
        if (!seen[0][b] || got[0][b] != 0 || !seen[1][b] || got[1][b] != 0) begin
          failures++; if (failures < 10) $display("punctured position %0d not cleared", b);
        end
      end

    // estimation from APP bank `bank` into LLR bank !bank
    foreach (seen[b, p]) seen[b][p] = 0;
    @(negedge clk); cmd_est = 1; src_bank = bank[0]; dst_bank = ~bank[0]; t0 = cyc;
    @(negedge clk); cmd_est = 0;
    while (!done) @(negedge clk);
    dt = cyc - t0;
    checks++;
    if (dt > N + 150) begin failures++; $display("estimation took %0d", dt); end
    exp_step = f0 * 4294967296.0;
    exp_phi  = ph / (2.0 * PI) * 65536.0;
    $display("case K=%0d N=%0d qam16=%0d: step %0d (offset %0f), phi %0d (offset %0f)",
             K, N, qam, est_step, exp_step, est_phi, exp_phi);
    checks += 2;
    // tolerance: 3 % plus 24 angle units (0.13 degree) of CORDIC and
    // rounding error in the phase difference over L/2 symbols
    e = real'(est_step) - exp_step;
    if (e < 0.0) e = -e;
    if (e > 0.03 * (exp_step < 0 ? -exp_step : exp_step) + 24.0 * 131072.0 / L) begin
      failures++; $display("step %0d expected %0f", est_step, exp_step);
    end
    e = real'(est_phi) - (exp_phi - f0 * 0.5 * 65536.0);
    if (e > 364.0 || e < -364.0) begin
      failures++; $display("phi %0d expected %0f", est_phi, exp_phi);
    end
    mmin = qam ? 5 : 20;
    for (int n = 0; n < N; n++) begin
      int b;
      b = pos[n];
      checks++;
      if (!seen[~bank[0]][b] || (bits[b] ? got[~bank[0]][b] > -mmin : got[~bank[0]][b] < mmin)) begin
        failures++; if (failures < 10) $display("est bit %0d llr %0d bit %0d", b, got[~bank[0]][b], bits[b]);
      end
    end
  endtask

  initial begin
    cyc = 0;
    foreach (got[b, p]) got[b][p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_case(64, 0, 0, 0.0008, 0.5, 0);
    run_case(128, 0, 1, -0.0006, -1.2, 1);
    run_case(100, 1, 2, 0.0, 2.8, 0);
    run_case(128, 1, 0, 0.0005, 1.9, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
