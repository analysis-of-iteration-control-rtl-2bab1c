// tb_turbo_decoder: encodes random words with a random interleaver, makes
// noisy channel LLRs, loads them (through both write lanes) into one LLR
// bank and garbage into the other, and decodes. Every a-posteriori beat of
// every half-iteration is compared with a reference turbo decoder built
// from the integer Max-Log-MAP model (in-place extrinsic exchange, zero
// a-priori in the first half). The testbench plays the iteration control:
// chk_done one cycle after the last beat, stop_req from its own rule.
// Cases: a fixed number of half-iterations (max_half reached), a stop
// request after half-iteration 3, a hold at an iteration boundary (no beats
// may appear while it is high), decoding from bank 1, and the half-
// iteration period of 2K plus a small constant.
module tb_turbo_decoder;
  import tsync_pkg::*;
  import tsync_ref_pkg::*;
  localparam int KM = 256;
  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] blk_len = '0;
  logic [HI_W-1:0]  max_half = '0;
  logic il_we = 0; logic [IDX_W-1:0] il_addr = '0, il_data = '0;
  logic [1:0] llr_we = '0; logic llr_bank = 0; logic llr_clr = 0;
  bit_type_e llr_type [2];
  logic [IDX_W-1:0] llr_addr [2];
  llr_t llr_data [2];
  logic llr_rd_bank = 0, start = 0, hold = 0, chk_done = 0, stop_req = 0;
  logic busy, done, stopped_early, iter_done, app_valid;
  logic [HI_W:0] half_cnt;
  logic [HI_W-1:0] iter_idx;
  app_beat_t app_beat;
  int checks = 0, failures = 0;

  int_da u, pr, ls, l1, l2, E, rs, rp, re;
  int half_no, nbeat, stop_after, beats_in_hold, cyc, t_half0, t_half1;

  turbo_decoder #(.KMAX(KM)) dut (.clk, .rst_n, .blk_len, .max_half, .il_we, .il_addr, .il_data,
    .llr_we, .llr_bank, .llr_clr, .llr_type, .llr_addr, .llr_data, .llr_rd_bank,
    .start, .hold, .chk_done, .stop_req, .busy, .done, .stopped_early, .half_cnt,
    .iter_idx, .iter_done, .app_valid, .app_beat);
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of one half-iteration
  task automatic ref_half(input int h);
    int K;
    int_da sy, pa, ap;
    K = u.size();
    sy = new[K]; pa = new[K]; ap = new[K];
    for (int j = 0; j < K; j++) begin
      int n;
      n = (h == 0) ? j : pr[j];
      sy[j] = ls[n];
      pa[j] = (h == 0) ? l1[j] : l2[j];
      ap[j] = (half_no == 0) ? 0 : E[n];
    end
    ref_maxlog(sy, pa, ap, rs, rp, re);
    for (int j = 0; j < K; j++) E[(h == 0) ? j : pr[j]] = re[j];
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    chk_done <= 1'b0;
    if (hold && app_valid) beats_in_hold++;
    if (rst_n && app_valid) begin
      int j, h;
      j = nbeat; h = half_no % 2;
      if (j == 0) begin
        ref_half(h);
        if (half_no == 0) t_half0 = cyc;
        if (half_no == 1) t_half1 = cyc;
      end
      checks += 5;
      if (int'(app_beat.half) != h) begin failures++; if (failures < 10) $display("half %0d flag %0d", half_no, app_beat.half); end
      if (int'(app_beat.step) != j) begin failures++; if (failures < 10) $display("half %0d step %0d exp %0d", half_no, app_beat.step, j); end
      if (int'(app_beat.nat) != ((h == 0) ? j : pr[j])) begin failures++; if (failures < 10) $display("half %0d j %0d nat %0d", half_no, j, app_beat.nat); end
      if (int'(app_beat.app_s) != rs[j]) begin failures++; if (failures < 10) $display("half %0d j %0d app_s %0d exp %0d", half_no, j, app_beat.app_s, rs[j]); end
      if (int'(app_beat.app_p) != rp[j]) begin failures++; if (failures < 10) $display("half %0d j %0d app_p %0d exp %0d", half_no, j, app_beat.app_p, rp[j]); end
      nbeat = nbeat + 1;
      if (app_beat.last) begin
        nbeat = 0;
        half_no = half_no + 1;
        chk_done <= 1'b1;
        if (stop_after > 0 && half_no >= stop_after) stop_req <= 1'b1;
      end
    end
  end

  function automatic int noisy(input int b);
    int v;
    v = (b ? -9 : 9) + int'($urandom_range(24, 0)) - 12;
    return ref_sat(v, 31);
  endfunction

  task automatic load_block(input int K, input int bank);
    int_da ui, p1, p2;
    u = new[K]; ui = new[K]; ls = new[K]; l1 = new[K]; l2 = new[K]; E = new[K];
    foreach (u[k]) u[k] = int'($urandom_range(1, 0));
    pr = ref_perm(K);
    foreach (ui[j]) ui[j] = u[pr[j]];
    p1 = ref_encode(u);
    p2 = ref_encode(ui);
    foreach (u[k]) begin ls[k] = noisy(u[k]); l1[k] = noisy(p1[k]); l2[k] = noisy(p2[k]); E[k] = 0; end
    for (int k = 0; k < K; k++) begin
      @(negedge clk);
      il_we = 1; il_addr = IDX_W'(k); il_data = IDX_W'(pr[k]);
      // lane 0: sys and p2 alternately with garbage into the other bank
      llr_we = 2'b11; llr_bank = bank[0];
      llr_type[0] = BT_SYS; llr_addr[0] = IDX_W'(k); llr_data[0] = llr_t'(ls[k]);
      llr_type[1] = BT_P1;  llr_addr[1] = IDX_W'(k); llr_data[1] = llr_t'(l1[k]);
      @(negedge clk);
      il_we = 0;
      llr_type[0] = BT_P2;  llr_addr[0] = IDX_W'(k); llr_data[0] = llr_t'(l2[k]);
      llr_we = 2'b01;
      @(negedge clk);
      llr_bank = ~bank[0]; llr_we = 2'b11;
      llr_type[0] = BT_SYS; llr_data[0] = llr_t'(-ls[k]);
      llr_type[1] = BT_P2;  llr_addr[1] = IDX_W'(k); llr_data[1] = llr_t'(5);
    end
    @(negedge clk); llr_we = '0;
  endtask

  task automatic decode(input int K, input int mh, input int stop_at, input int bank);
    half_no = 0; nbeat = 0; stop_after = stop_at; stop_req = 0;
    llr_rd_bank = bank[0];
    @(negedge clk);
    blk_len = IDX_W'(K); max_half = HI_W'(mh); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    int K;
    cyc = 0; beats_in_hold = 0;
    foreach (llr_type[i]) begin llr_type[i] = BT_SYS; llr_addr[i] = '0; llr_data[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1: fixed 6 half-iterations, bank 0
    K = 64;
    load_block(K, 0);
    decode(K, 6, 0, 0);
    checks += 3;
    if (half_cnt != 6)   begin failures++; $display("half_cnt %0d", half_cnt); end
    if (half_no != 6)    begin failures++; $display("halves seen %0d", half_no); end
    if (stopped_early)   failures++;
    checks++;
    if (t_half1 - t_half0 > 2 * K + 12) begin failures++; $display("half period %0d", t_half1 - t_half0); end

    // 2: stop request after half-iteration 3, bank 1, larger block
    K = 200;
    load_block(K, 1);
    decode(K, 16, 3, 1);
    checks += 3;
    if (half_cnt != 3) begin failures++; $display("half_cnt %0d", half_cnt); end
    if (half_no != 3)  failures++;
    if (!stopped_early) failures++;

    // 3: hold at the first iteration boundary
    K = 30;
    load_block(K, 0);
    fork
      decode(K, 4, 0, 0);
      begin
        @(posedge iter_done);
        @(negedge clk); hold = 1;
        repeat (50) @(negedge clk);
        hold = 0;
      end
    join
    checks += 2;
    if (beats_in_hold != 0) begin failures++; $display("beats during hold %0d", beats_in_hold); end
    if (half_cnt != 4) failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
