// map_decoder: serial Max-Log-MAP decoder for one 8-state component code.
//
// One half-iteration is one call: `start` latches the block length K and the
// half-iteration flag, then the unit consumes a stream of 2K input beats
// (sys, par, apr LLR plus a tag = natural bit index):
//   * backward pass, K beats for steps j = K-1 down to 0: the backward state
//     metrics beta are computed with one add-compare-select step per beat and
//     beta(j+1) is stored at address j of the state-metric memory;
//   * forward pass, K beats for steps j = 0 up to K-1: the forward metrics
//     alpha are updated one step per beat and, with the stored beta, give
//       APP(sys) = max over u=0 transitions - max over u=1 transitions
//       APP(par) = max over p=0 transitions - max over p=1 transitions
//     of alpha + gamma + beta, and the extrinsic value
//       ext = 0.75 * (APP(sys) - sys - apr), computed as (3*d) >>> 2.
// Branch metric gamma = [u==0]*(sys+apr) + [p==0]*par (LLR = ln P0/P1).
// State metrics are normalised to state 0 every step. The trellis starts in
// state 0 and is not terminated (all end states equally likely).
//
// Timing: one beat per cycle at most (in_valid may have gaps); outputs come
// two cycles after the forward beat, in natural step order, so a half-
// iteration takes 2K cycles plus a few. busy is high from start until the
// last output. Max-Log-MAP with extrinsic scaling 0.75, 8 states and 6-bit
// channel LLRs follow the reference design; the two-pass full-block
// schedule (instead of a windowed schedule with three recursion units) is
// this design's simplification and halves the throughput of one unit.
module map_decoder
  import tsync_pkg::*;
#(
  parameter int unsigned KMAX = K_MAX
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [IDX_W-1:0] blk_len,
  input  logic             half,
  input  logic             in_valid,
  input  llr_t             in_sys,
  input  llr_t             in_par,
  input  ext_t             in_apr,
  input  logic [IDX_W-1:0] in_tag,
  output logic             out_valid,
  output app_beat_t        out_beat,
  output ext_t             out_ext,
  output logic             busy
);
  localparam sm_t SM_NEG = sm_t'(-(2 ** (SM_W - 2)));

  typedef enum logic [1:0] {S_IDLE, S_BWD, S_FWD, S_DRAIN} st_e;
  st_e st_q;

  logic [IDX_W-1:0] k_q, cnt_q;
  logic             half_q;
  sm_vec_t          beta_q, alpha_q, bq;
  sm_vec_t          bmem [KMAX];

  // forward stage-1 registers
  logic             s1_v, s1_last;
  llr_t             s1_sys, s1_par;
  ext_t             s1_apr;
  logic [IDX_W-1:0] s1_tag, s1_j;

  // ---- branch metric ------------------------------------------------------
  function automatic logic signed [SM_W+1:0] gamma(input logic [2:0] s, input logic u,
                                                   input llr_t sy, input llr_t pa, input ext_t ap);
    logic signed [SM_W+1:0] g;
    g = '0;
    if (!u)             g += (SM_W+2)'(sy) + (SM_W+2)'(ap);
    if (!rsc_par(s, u)) g += (SM_W+2)'(pa);
    return g;
  endfunction

  // ---- backward step (combinational) --------------------------------------
  sm_vec_t beta_new;
  always_comb begin
    logic signed [SM_W+1:0] b [NSTATE];
    logic signed [SM_W+1:0] m;
    for (int s = 0; s < NSTATE; s++) begin
      b[s] = '0;
      for (int u = 0; u < 2; u++) begin
        m = gamma(3'(s), u[0], in_sys, in_par, in_apr)
            + (SM_W+2)'(beta_q[rsc_next(3'(s), u[0])]);
        if (u == 0 || m > b[s]) b[s] = m;
      end
    end
    for (int s = 0; s < NSTATE; s++) beta_new[s] = sm_t'(b[s] - b[0]);
  end

  // ---- forward step and LLRs (combinational, on stage-1 data) -------------
  sm_vec_t alpha_new;
  logic signed [SM_W+3:0] llr_s, llr_p, d_ext;
  always_comb begin
    logic signed [SM_W+1:0] a [NSTATE];
    logic               a_set [NSTATE];
    logic signed [SM_W+3:0] m, mu0, mu1, mp0, mp1;
    logic [2:0] ns;
    mu0 = '0; mu1 = '0; mp0 = '0; mp1 = '0;
    for (int s = 0; s < NSTATE; s++) begin a[s] = '0; a_set[s] = 1'b0; end
    for (int s = 0; s < NSTATE; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic signed [SM_W+1:0] g, am;
        g  = gamma(3'(s), u[0], s1_sys, s1_par, s1_apr);
        ns = rsc_next(3'(s), u[0]);
        am = (SM_W+2)'(alpha_q[s]) + g;
        if (!a_set[ns] || am > a[ns]) begin a[ns] = am; a_set[ns] = 1'b1; end
        m = (SM_W+4)'(am) + (SM_W+4)'(bq[ns]);
        if (u == 0) begin
          if (s == 0 || m > mu0) mu0 = m;
        end else begin
          if (s == 0 || m > mu1) mu1 = m;
        end
        if (!rsc_par(3'(s), u[0])) begin
          if (s == 0 || m > mp0) mp0 = m;   // transition s=0,u=0 has p=0
        end else begin
          if (s == 0 || m > mp1) mp1 = m;   // transition s=0,u=1 has p=1
        end
      end
    end
    for (int s = 0; s < NSTATE; s++) alpha_new[s] = sm_t'(a[s] - a[0]);
    llr_s = mu0 - mu1;
    llr_p = mp0 - mp1;
    d_ext = llr_s - (SM_W+4)'(s1_sys) - (SM_W+4)'(s1_apr);
  end

  logic signed [SM_W+5:0] ext_x3;
  assign ext_x3 = (SM_W+6)'(d_ext) * 3;

  // ---- control, memories --------------------------------------------------
  always_ff @(posedge clk) begin
    if (st_q == S_BWD && in_valid) bmem[cnt_q] <= beta_q;
    if (st_q == S_FWD && in_valid) bq <= bmem[cnt_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; k_q <= '0; cnt_q <= '0; half_q <= 1'b0;
      beta_q <= '0; alpha_q <= '0;
      s1_v <= 1'b0; s1_last <= 1'b0; s1_sys <= '0; s1_par <= '0; s1_apr <= '0;
      s1_tag <= '0; s1_j <= '0;
      out_valid <= 1'b0; out_beat <= '0; out_ext <= '0;
    end else begin
      s1_v      <= 1'b0;
      out_valid <= 1'b0;
      unique case (st_q)
        S_IDLE: if (start) begin
          k_q    <= blk_len;
          half_q <= half;
          cnt_q  <= blk_len - 1'b1;
          beta_q <= '0;
          st_q   <= S_BWD;
        end
        S_BWD: if (in_valid) begin
          beta_q <= beta_new;
          if (cnt_q == '0) begin
            st_q <= S_FWD;
            for (int s = 0; s < NSTATE; s++) alpha_q[s] <= (s == 0) ? sm_t'(0) : SM_NEG;
          end else begin
            cnt_q <= cnt_q - 1'b1;
          end
        end
        S_FWD: if (in_valid) begin
          s1_v    <= 1'b1;
          s1_sys  <= in_sys; s1_par <= in_par; s1_apr <= in_apr; s1_tag <= in_tag;
          s1_j    <= cnt_q;
          s1_last <= (cnt_q == k_q - 1'b1);
          cnt_q   <= cnt_q + 1'b1;
          if (cnt_q == k_q - 1'b1) st_q <= S_DRAIN;
        end
        S_DRAIN: if (!s1_v) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase

      if (s1_v) begin
        alpha_q        <= alpha_new;
        out_valid      <= 1'b1;
        out_beat.half  <= half_q;
        out_beat.step  <= s1_j;
        out_beat.nat   <= s1_tag;
        out_beat.app_s <= sat_app(20'(llr_s));
        out_beat.app_p <= sat_app(20'(llr_p));
        out_beat.last  <= s1_last;
        out_ext        <= sat_ext(20'(ext_x3 >>> 2));
      end
    end
  end

  assign busy = (st_q != S_IDLE) || s1_v || out_valid;
endmodule
