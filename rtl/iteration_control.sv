// iteration_control: valid-codeword stopping criterion by re-encoding.
//
// The serial turbo decoder streams one a-posteriori beat per trellis step
// (app_beat_t): the APP LLR of the systematic bit and of the parity bit of
// the component code being decoded, in the order that code sees the bits.
// For each beat this block
//   * re-encodes the hard systematic decision with the matching component
//     encoder of a turbo_encoder (encoder 1 in the first half-iteration,
//     encoder 2 in the second) and compares the re-encoded parity with the
//     hard parity decision of the decoder;
//   * compares the hard systematic decision with the one stored for the same
//     (natural) bit index in the previous half-iteration, then stores it.
// After the last beat of a half-iteration it pulses chk_done for one cycle.
// codeword_valid (a level, updated with each chk_done, cleared by
// blk_start) is high when the parity matched in this and
// the previous half-iteration and no systematic decision changed between the
// two: the hard decisions then form a codeword of the turbo code and further
// iterations cannot change the result. The check runs beside the decoder
// and adds one cycle after the last beat.
//
// The stored hard decisions double as the decoded output (rd_addr/rd_bit,
// combinational read). blk_start clears the history at the start of a block.
module iteration_control
  import tsync_pkg::*;
#(
  parameter int unsigned KMAX = K_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             blk_start,      // new block: forget previous half-iteration
  input  logic             beat_valid,
  input  app_beat_t        beat,
  output logic             chk_done,       // one-cycle pulse after the last beat
  output logic             codeword_valid, // result of the last check
  output logic [IDX_W-1:0] n_par_err,      // parity mismatches of the last half-iteration
  output logic [IDX_W-1:0] n_sys_chg,      // systematic changes of the last half-iteration
  input  logic [IDX_W-1:0] rd_addr,
  output logic             rd_bit
);
  logic hard_mem [KMAX];

  logic hs, hp, penc1, penc2, penc, old_bit;
  logic first_beat;
  logic mism, chg;
  logic [IDX_W-1:0] par_err_q, sys_chg_q;   // running counts in this half-iteration
  logic prev_ok_q, have_prev_q;

  assign hs         = beat.app_s[APP_W-1];   // negative LLR -> bit 1
  assign hp         = beat.app_p[APP_W-1];
  assign first_beat = (beat.step == '0);

  turbo_encoder u_reenc (
    .clk, .rst_n,
    .en1(beat_valid && !beat.half), .first1(first_beat), .u1(hs),
    .en2(beat_valid &&  beat.half), .first2(first_beat), .u2(hs),
    .s(), .p1(penc1), .p2(penc2)
  );
  assign penc    = beat.half ? penc2 : penc1;
  assign old_bit = hard_mem[beat.nat];
  assign mism    = (penc != hp);
  assign chg     = have_prev_q && (old_bit != hs);
  assign rd_bit  = hard_mem[rd_addr];

  always_ff @(posedge clk) begin
    if (beat_valid) hard_mem[beat.nat] <= hs;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_err_q <= '0; sys_chg_q <= '0;
      prev_ok_q <= 1'b0; have_prev_q <= 1'b0;
      chk_done <= 1'b0; codeword_valid <= 1'b0;
      n_par_err <= '0; n_sys_chg <= '0;
    end else begin
      chk_done       <= 1'b0;
      if (blk_start) begin
        codeword_valid <= 1'b0;
        par_err_q <= '0; sys_chg_q <= '0;
        prev_ok_q <= 1'b0; have_prev_q <= 1'b0;
      end else if (beat_valid) begin
        if (beat.last) begin
          // close the half-iteration, including this beat
          chk_done       <= 1'b1;
          codeword_valid <= have_prev_q && prev_ok_q
                            && (par_err_q == '0) && !mism
                            && (sys_chg_q == '0) && !chg;
          n_par_err      <= par_err_q + IDX_W'(mism);
          n_sys_chg      <= sys_chg_q + IDX_W'(chg);
          prev_ok_q      <= (par_err_q == '0) && !mism;
          have_prev_q    <= 1'b1;
          par_err_q      <= '0;
          sys_chg_q      <= '0;
        end else begin
          par_err_q <= par_err_q + IDX_W'(mism);
          sys_chg_q <= sys_chg_q + IDX_W'(chg);
        end
      end
    end
  end
endmodule
