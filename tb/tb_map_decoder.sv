// tb_map_decoder: runs half-iterations of random channel and a-priori LLRs
// (full input ranges, random tags, random input bubbles) through
// map_decoder and compares every output (APP of systematic and parity bit,
// extrinsic value, step, tag, half flag, last marker) with the integer
// Max-Log-MAP reference model. A gapless run checks the latency: the last
// output must come within 2K+4 cycles of start.
module tb_map_decoder;
  import tsync_pkg::*;
  import tsync_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, half = 0, in_valid = 0;
  logic [IDX_W-1:0] blk_len = '0, in_tag = '0;
  llr_t in_sys = '0, in_par = '0;
  ext_t in_apr = '0;
  logic out_valid, busy;
  app_beat_t out_beat;
  ext_t out_ext;
  int checks = 0, failures = 0;
  int_da sy, pa, ap, tg, rs, rp, re;
  int nout = 0, cyc = 0;

  map_decoder #(.KMAX(300)) dut (.clk, .rst_n, .start, .blk_len, .half, .in_valid, .in_sys,
    .in_par, .in_apr, .in_tag, .out_valid, .out_beat, .out_ext, .busy);
  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) begin
      int k;
      k = nout;
      checks += 7;
      if (int'(out_beat.step) != k)       failures++;
      if (int'(out_beat.nat) != tg[k])    failures++;
      if (out_beat.half != half)          failures++;
      if (out_beat.last != (k == sy.size() - 1)) failures++;
      if (int'(out_beat.app_s) != rs[k])  begin failures++; if (failures < 10) $display("k %0d app_s %0d exp %0d", k, out_beat.app_s, rs[k]); end
      if (int'(out_beat.app_p) != rp[k])  begin failures++; if (failures < 10) $display("k %0d app_p %0d exp %0d", k, out_beat.app_p, rp[k]); end
      if (int'(out_ext) != re[k])         begin failures++; if (failures < 10) $display("k %0d ext %0d exp %0d", k, out_ext, re[k]); end
      nout <= nout + 1;
    end
  end

  task automatic run_block(input int K, input bit gaps, input int amp);
    int t0;
    sy = new[K]; pa = new[K]; ap = new[K]; tg = new[K];
    foreach (sy[k]) begin
      sy[k] = int'($urandom_range(2 * amp, 0)) - amp;
      pa[k] = int'($urandom_range(2 * amp, 0)) - amp;
      ap[k] = int'($urandom_range(254, 0)) - 127;
      tg[k] = int'($urandom_range(K - 1, 0));
    end
    ref_maxlog(sy, pa, ap, rs, rp, re);
    @(negedge clk);
    nout = 0;
    blk_len = IDX_W'(K); half = $urandom_range(1, 0); start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    for (int i = 0; i < 2 * K; i++) begin
      int k;
      k = (i < K) ? K - 1 - i : i - K;
      while (gaps && $urandom_range(3, 0) == 0) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_sys = llr_t'(sy[k]); in_par = llr_t'(pa[k]); in_apr = ext_t'(ap[k]);
      in_tag = IDX_W'(tg[k]);
      @(negedge clk);
    end
    in_valid = 0;
    while (busy) @(negedge clk);
    checks++;
    if (nout != K) begin failures++; $display("outputs %0d of %0d", nout, K); end
    if (!gaps) begin
      checks++;
      if (cyc - t0 > 2 * K + 4) begin failures++; $display("latency %0d for K=%0d", cyc - t0, K); end
    end
  endtask

  initial begin
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_block(40, 0, 31);
    run_block(257, 0, 31);
    run_block(120, 1, 31);
    run_block(300, 1, 8);
    run_block(2, 0, 31);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
