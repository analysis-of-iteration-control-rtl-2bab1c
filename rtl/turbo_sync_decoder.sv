// turbo_sync_decoder: turbo decoder with turbo synchronisation and
// re-encoding iteration control.
//
// Three units run side by side:
//   * turbo_decoder     serial turbo decoder (one Max-Log-MAP unit, 8 states);
//   * fine_sync         fine frequency/phase estimation from the decoder's
//                       a-posteriori LLRs and regeneration of channel LLRs;
//   * iteration_control re-encodes the hard decisions of every half-iteration
//                       and stops the decoder as soon as they form a valid
//                       codeword that did not change over two half-iterations.
//
// Operation of one block: load the interleaver table (il_*), the position
// table of the transmitted bits (pos_*, which carries the puncturing) and
// the received QPSK or 16-QAM samples (r_*), then pulse `run`. fine_sync
// first zeroes both LLR banks, demaps the samples as received into LLR bank
// 0 and the decoder starts. At the end of every full
// iteration n (with ts_en set) the decoder's APP LLRs of iteration n, stored
// in APP bank n mod 2, are handed to fine_sync, which estimates the offsets
// and writes corrected LLRs into the LLR bank the decoder is not reading,
// while the decoder goes on with iteration n+1. At the next boundary the
// banks swap, so iteration n+2 decodes LLRs synchronised with the APP values
// of iteration n. If fine_sync is not finished at a boundary the decoder is
// held (stall). The decoder stops after a half-iteration when the external
// `stop` has been raised, when codeword_valid is raised with ic_en set, or
// after max_half half-iterations. `done` pulses when the decoder has stopped
// and fine_sync is idle. Decoded bits are read from rd_addr/rd_bit.
//
// Counters for the mechanisms (sync updates applied, stall cycles) are
// brought out for observation. ts_en = 0 gives decoding with the initial
// (coarse) synchronisation only; ic_en = 0 gives a fixed number of
// half-iterations.
module turbo_sync_decoder
  import tsync_pkg::*;
#(
  parameter int unsigned KMAX = K_MAX,
  parameter int unsigned R_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration
  input  logic [IDX_W-1:0] blk_len,       // K, even, 2..KMAX
  input  logic [HI_W-1:0]  max_half,      // 16 = 8 full iterations
  input  logic             ts_en,         // turbo synchronisation on
  input  logic             ic_en,         // iteration control on
  input  logic [IDX_W+1:0] n_tx,          // transmitted bits of the burst
  input  logic             qam16,         // 0: QPSK, 1: 16-QAM (Gray)
  input  logic signed [R_W+1:0] qam_thr,  // 16-QAM amplitude threshold
  input  logic [2:0]       demap_sh,
  input  logic [2:0]       tanh_sh,
  // position table: codeword position {k, type} of transmitted bit n
  input  logic             pos_we,
  input  logic [IDX_W+1:0] pos_addr,
  input  logic [IDX_W-1:0] pos_k,
  input  bit_type_e        pos_t,
  // interleaver table
  input  logic             il_we,
  input  logic [IDX_W-1:0] il_addr,
  input  logic [IDX_W-1:0] il_data,
  // received samples
  input  logic                  r_we,
  input  logic [IDX_W:0]        r_addr,
  input  logic signed [R_W-1:0] r_i,
  input  logic signed [R_W-1:0] r_q,
  // control
  input  logic             run,
  input  logic             stop,
  output logic             busy,
  output logic             done,
  output logic             codeword_valid, // last check found a valid codeword
  output logic             stopped_early,
  output logic [HI_W:0]    half_iters,
  // results
  input  logic [IDX_W-1:0] rd_addr,
  output logic             rd_bit,
  output logic signed [31:0] est_step,
  output logic signed [15:0] est_phi,
  output logic [15:0]      n_sync_updates,
  output logic [15:0]      n_stall_cycles
);
  typedef enum logic [1:0] {T_IDLE, T_INIT, T_RUN, T_FIN} tst_e;
  tst_e st_q;

  // decoder <-> others
  logic        dec_start, dec_hold, dec_busy, dec_done, dec_stop_req, dec_early, iter_done;
  logic [HI_W-1:0] iter_idx;
  logic        app_valid;
  app_beat_t   app_beat;
  logic        chk_done;
  logic [IDX_W-1:0] n_par_err, n_sys_chg;

  // fine_sync
  logic        fs_init, fs_est, fs_busy, fs_done, fs_src, fs_dst;
  logic [1:0]  llr_we;
  logic        llr_bank, llr_clr;
  bit_type_e   llr_type [2];
  logic [IDX_W-1:0] llr_addr [2];
  llr_t        llr_data [2];

  logic        rd_bank_q, fs_new_q, boundary_q, stop_q, blk_start;

  assign dec_stop_req = stop_q || stop || (ic_en && codeword_valid);
  assign dec_hold     = boundary_q;

  turbo_decoder #(.KMAX(KMAX)) u_dec (
    .clk, .rst_n,
    .blk_len, .max_half,
    .il_we, .il_addr, .il_data,
    .llr_we, .llr_bank, .llr_clr, .llr_type, .llr_addr, .llr_data,
    .llr_rd_bank(rd_bank_q),
    .start(dec_start), .hold(dec_hold), .chk_done, .stop_req(dec_stop_req),
    .busy(dec_busy), .done(dec_done), .stopped_early(dec_early),
    .half_cnt(half_iters), .iter_idx, .iter_done,
    .app_valid, .app_beat
  );

  iteration_control #(.KMAX(KMAX)) u_ic (
    .clk, .rst_n, .blk_start,
    .beat_valid(app_valid), .beat(app_beat),
    .chk_done, .codeword_valid, .n_par_err, .n_sys_chg,
    .rd_addr, .rd_bit
  );

  fine_sync #(.KMAX(KMAX), .R_W(R_W)) u_fs (
    .clk, .rst_n, .blk_len, .n_tx, .qam16, .qam_thr, .demap_sh, .tanh_sh,
    .pos_we, .pos_addr, .pos_k, .pos_t,
    .r_we, .r_addr, .r_i, .r_q,
    .app_valid, .app_beat, .app_bank(iter_idx[0]),
    .cmd_init(fs_init), .cmd_est(fs_est), .src_bank(fs_src), .dst_bank(fs_dst),
    .busy(fs_busy), .done(fs_done),
    .llr_we, .llr_bank, .llr_clr, .llr_type, .llr_addr, .llr_data,
    .est_step, .est_phi
  );

  assign blk_start = (st_q == T_IDLE) && run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= T_IDLE; dec_start <= 1'b0; fs_init <= 1'b0; fs_est <= 1'b0;
      fs_src <= 1'b0; fs_dst <= 1'b0; rd_bank_q <= 1'b0; fs_new_q <= 1'b0;
      boundary_q <= 1'b0; stop_q <= 1'b0; done <= 1'b0; stopped_early <= 1'b0;
      n_sync_updates <= '0; n_stall_cycles <= '0;
    end else begin
      dec_start <= 1'b0;
      fs_init   <= 1'b0;
      fs_est    <= 1'b0;
      done      <= 1'b0;
      if (stop) stop_q <= 1'b1;
      unique case (st_q)
        T_IDLE: if (run) begin
          rd_bank_q <= 1'b0; fs_new_q <= 1'b0; boundary_q <= 1'b0; stop_q <= 1'b0;
          fs_dst <= 1'b0; fs_init <= 1'b1;
          st_q <= T_INIT;
        end
        T_INIT: if (fs_done) begin
          dec_start <= 1'b1;
          st_q      <= T_RUN;
        end
        T_RUN: begin
          if (iter_done && ts_en) boundary_q <= 1'b1;
          if (boundary_q) begin
            if (fs_busy) begin
              n_stall_cycles <= n_stall_cycles + 1'b1;
            end else if (!fs_est) begin
              // iteration iter_idx-1 has just finished: its APP bank feeds
              // the estimator, which writes the bank the decoder will not read
              if (fs_new_q) begin
                rd_bank_q      <= ~rd_bank_q;
                n_sync_updates <= n_sync_updates + 1'b1;
              end
              fs_src     <= ~iter_idx[0];
              fs_dst     <= fs_new_q ? rd_bank_q : ~rd_bank_q;
              fs_est     <= 1'b1;
              fs_new_q   <= 1'b1;
              boundary_q <= 1'b0;
            end
          end
          if (dec_done) begin
            stopped_early <= dec_early;
            st_q          <= T_FIN;
          end
        end
        T_FIN: if (!fs_busy && !fs_est) begin
          done <= 1'b1;
          st_q <= T_IDLE;
        end
        default: st_q <= T_IDLE;
      endcase
    end
  end

  assign busy = (st_q != T_IDLE);
endmodule
