// turbo_decoder: serial binary turbo decoder built around one map_decoder.
//
// The single MAP unit runs both component decoders in turn. A half-iteration
// feeds it 2K beats (backward pass then forward pass, see map_decoder):
//   half 0 (component code 1): step j reads sys[j], p1[j], ext[j];
//   half 1 (component code 2): step j reads sys[il[j]], p2[j], ext[il[j]],
// where il[] is the interleaver table (natural index of the j-th interleaved
// bit). The extrinsic output of step j is written back in place to
// ext[nat(j)], so one memory serves as interleaver and deinterleaver buffer.
// The a-priori input is forced to zero in the first half-iteration of a
// block, so the extrinsic memory needs no clearing.
//
// Channel LLRs live in two banks (llr_rd_bank selects the bank decoded);
// the fine synchroniser writes refreshed LLRs into the other bank through
// two write lanes while decoding goes on. With llr_clr, lane 0 writes the
// same value to all three bit types at its address (used to zero the
// positions a punctured code does not transmit). The a-posteriori stream of the MAP
// unit is brought out (app_valid/app_beat) for the iteration control and the
// fine synchroniser.
//
// Sequencing: `start` begins a block. Before the first half of every full
// iteration the decoder waits while `hold` is high. After each half it waits
// for `chk_done` from the iteration control (a pulse, remembered until the
// next half starts), then ends the block if
// `stop_req` is high or max_half half-iterations have run, otherwise goes on.
// iter_done pulses at the end of each full iteration that is continued.
// Memory reads are registered; the address pipeline is two cycles deep.
// The memories are sized for the largest block (K_MAX = 5124); any block
// length 2..KMAX can be run. Default max_half is 16 (8 iterations).
module turbo_decoder
  import tsync_pkg::*;
#(
  parameter int unsigned KMAX = K_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  // configuration, sampled at start
  input  logic [IDX_W-1:0] blk_len,
  input  logic [HI_W-1:0]  max_half,
  // interleaver table write port
  input  logic             il_we,
  input  logic [IDX_W-1:0] il_addr,
  input  logic [IDX_W-1:0] il_data,
  // channel LLR write lanes
  input  logic [1:0]       llr_we,
  input  logic             llr_bank,
  input  logic             llr_clr,       // lane 0 writes its data to all three bit types
  input  bit_type_e        llr_type [2],
  input  logic [IDX_W-1:0] llr_addr [2],
  input  llr_t             llr_data [2],
  input  logic             llr_rd_bank,
  // control
  input  logic             start,
  input  logic             hold,
  input  logic             chk_done,
  input  logic             stop_req,
  output logic             busy,
  output logic             done,          // pulse: block finished
  output logic             stopped_early, // with done: ended by stop_req
  output logic [HI_W:0]    half_cnt,      // half-iterations run in this block
  output logic [HI_W-1:0]  iter_idx,      // full iteration in progress
  output logic             iter_done,
  // a-posteriori stream
  output logic             app_valid,
  output app_beat_t        app_beat
);
  typedef enum logic [2:0] {D_IDLE, D_HOLD, D_BWD, D_FWD, D_WAIT, D_CHK} dst_e;
  dst_e st_q;

  logic [IDX_W-1:0] il_mem  [KMAX];
  ext_t             ext_mem [KMAX];
  // both LLR banks in one memory per bit type, bank b at offset b*KMAX
  llr_t             s_mem   [2*KMAX];
  llr_t             p1_mem  [2*KMAX];
  llr_t             p2_mem  [2*KMAX];

  function automatic logic [IDX_W:0] bidx(input logic bank, input logic [IDX_W-1:0] a);
    return bank ? (IDX_W+1)'(KMAX) + (IDX_W+1)'(a) : (IDX_W+1)'(a);
  endfunction

  logic [IDX_W-1:0] k_q, j_q;
  logic [HI_W-1:0]  maxh_q;
  logic             half_q, first_q, bank_q;
  logic             map_start;
  logic             chk_q;           // chk_done seen since the MAP unit was started

  // ---- memory writes ------------------------------------------------------
  always_ff @(posedge clk) begin
    if (il_we) il_mem[il_addr] <= il_data;
  end

  // two write lanes per memory
  always_ff @(posedge clk) begin
    if (llr_we[0] && (llr_type[0] == BT_SYS || llr_clr)) s_mem[bidx(llr_bank, llr_addr[0])] <= llr_data[0];
    if (llr_we[1] && llr_type[1] == BT_SYS) s_mem[bidx(llr_bank, llr_addr[1])] <= llr_data[1];
  end
  always_ff @(posedge clk) begin
    if (llr_we[0] && (llr_type[0] == BT_P1 || llr_clr)) p1_mem[bidx(llr_bank, llr_addr[0])] <= llr_data[0];
    if (llr_we[1] && llr_type[1] == BT_P1) p1_mem[bidx(llr_bank, llr_addr[1])] <= llr_data[1];
  end
  always_ff @(posedge clk) begin
    if (llr_we[0] && (llr_type[0] == BT_P2 || llr_clr)) p2_mem[bidx(llr_bank, llr_addr[0])] <= llr_data[0];
    if (llr_we[1] && llr_type[1] == BT_P2) p2_mem[bidx(llr_bank, llr_addr[1])] <= llr_data[1];
  end

  // ---- address pipeline -----------------------------------------------------
  logic             c0_v;            // a step index j_q is issued this cycle
  logic             c1_v, c2_v;
  logic [IDX_W-1:0] c1_j, il_q, c1_nat, c2_nat;
  llr_t             c1_p1, c1_p2, c2_par, c2_sys;
  ext_t             c2_ext;
  logic             c1_first, c2_first;

  assign c0_v   = (st_q == D_BWD) || (st_q == D_FWD);
  assign c1_nat = half_q ? il_q : c1_j;

  always_ff @(posedge clk) begin
    // stage 0 -> 1: interleaver table and parity LLR
    il_q   <= il_mem[j_q];
    c1_p1  <= p1_mem[bidx(bank_q, j_q)];
    c1_p2  <= p2_mem[bidx(bank_q, j_q)];
    // stage 1 -> 2: systematic LLR and a-priori value at the natural index
    c2_sys <= s_mem[bidx(bank_q, c1_nat)];
    c2_ext <= ext_mem[c1_nat];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c1_v <= 1'b0; c2_v <= 1'b0; c1_j <= '0; c2_nat <= '0; c2_par <= '0;
      c1_first <= 1'b0; c2_first <= 1'b0;
    end else begin
      c1_v <= c0_v; c1_j <= j_q; c1_first <= first_q;
      c2_v <= c1_v; c2_nat <= c1_nat; c2_par <= half_q ? c1_p2 : c1_p1; c2_first <= c1_first;
    end
  end

  // ---- MAP unit -------------------------------------------------------------
  logic      map_busy, map_ov;
  app_beat_t map_beat;
  ext_t      map_ext;

  map_decoder #(.KMAX(KMAX)) u_map (
    .clk, .rst_n,
    .start   (map_start),
    .blk_len (k_q),
    .half    (st_q == D_CHK),       // sampled with map_start: D_CHK starts half 1
    .in_valid(c2_v),
    .in_sys  (c2_sys),
    .in_par  (c2_par),
    .in_apr  (c2_first ? ext_t'(0) : c2_ext),
    .in_tag  (c2_nat),
    .out_valid(map_ov),
    .out_beat (map_beat),
    .out_ext  (map_ext),
    .busy     (map_busy)
  );

  always_ff @(posedge clk) begin
    if (map_ov) ext_mem[map_beat.nat] <= map_ext;
  end

  assign app_valid = map_ov;
  assign app_beat  = map_beat;

  // ---- sequencer ------------------------------------------------------------
  assign map_start = (st_q == D_HOLD && !hold) || (st_q == D_CHK && (chk_done || chk_q) && !stop_req
                      && (half_cnt < {1'b0, maxh_q}) && !half_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= D_IDLE; k_q <= '0; j_q <= '0; maxh_q <= '0; half_q <= 1'b0;
      first_q <= 1'b0; bank_q <= 1'b0; half_cnt <= '0; chk_q <= 1'b0; iter_idx <= '0;
      done <= 1'b0; stopped_early <= 1'b0; iter_done <= 1'b0;
    end else begin
      done      <= 1'b0;
      iter_done <= 1'b0;
      if (map_start || start) chk_q <= 1'b0;
      else if (chk_done)      chk_q <= 1'b1;
      unique case (st_q)
        D_IDLE: if (start) begin
          k_q <= blk_len; maxh_q <= max_half;
          half_cnt <= '0; iter_idx <= '0; first_q <= 1'b1; half_q <= 1'b0;
          stopped_early <= 1'b0;
          st_q <= D_HOLD;
        end
        D_HOLD: if (!hold) begin           // map_start is high this cycle
          bank_q <= llr_rd_bank;
          half_q <= 1'b0;
          j_q    <= k_q - 1'b1;
          st_q   <= D_BWD;
        end
        D_BWD: begin
          if (j_q == '0) st_q <= D_FWD;
          else           j_q  <= j_q - 1'b1;
        end
        D_FWD: begin
          if (j_q == k_q - 1'b1) st_q <= D_WAIT;
          else                   j_q  <= j_q + 1'b1;
        end
        D_WAIT: if (!map_busy && !c1_v && !c2_v && !map_start) begin
          half_cnt <= half_cnt + 1'b1;
          first_q  <= 1'b0;
          st_q     <= D_CHK;
        end
        D_CHK: if (chk_done || chk_q) begin
          if (stop_req || half_cnt >= {1'b0, maxh_q}) begin
            done          <= 1'b1;
            stopped_early <= stop_req;
            st_q          <= D_IDLE;
          end else if (!half_q) begin      // map_start is high this cycle
            half_q <= 1'b1;
            j_q    <= k_q - 1'b1;
            st_q   <= D_BWD;
          end else begin
            iter_done <= 1'b1;
            iter_idx  <= iter_idx + 1'b1;
            st_q      <= D_HOLD;
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

  assign busy = (st_q != D_IDLE);
endmodule
