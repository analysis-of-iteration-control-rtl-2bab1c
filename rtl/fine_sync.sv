// fine_sync: data-aided fine frequency and phase synchroniser for turbo
// synchronisation, QPSK or 16-QAM (Gray), any puncturing pattern.
//
// A burst carries n_tx transmitted code bits. The position table (pos_we
// port) gives, for each transmitted bit n, its codeword position
// {k, type}: information index k and bit type s, p1 or p2. Positions not in
// the table are punctured. Transmitted bits are grouped in pairs
// m = 0 .. n_tx/2-1:
//   QPSK    pair m is symbol l = m: first bit on I, second bit on Q;
//   16-QAM  pairs 2l and 2l+1 are the I and Q rails of symbol l; in a pair
//           the first bit selects the sign and the second the amplitude
//           (b1 = 0: outer level 3A, b1 = 1: inner level A).
// A bit 0 is sent with the positive sign. The received, coarsely
// synchronised samples r(l) are written once per burst (r_we port).
//
// The decoder's a-posteriori stream (app_valid/app_beat) is stored in one of
// two APP banks (app_bank): p1 LLRs from the first half-iteration, systematic
// and p2 LLRs from the second. A `cmd_est` command then runs, one pair per
// cycle:
//   pass A  t = 63*tanh(|APP| / 2^tanh_sh / 8) with the sign of the APP LLR
//           (32-entry table) for both bits of the pair; the soft reference
//           is s_e = t0 on each QPSK rail, or t0*(2 + t1/63)*63/128 on a
//           16-QAM rail (expected value of the Gray level); then
//           Z(k) = sum over half k of the burst of r(l) * conj(s_e(l));
//   vector  theta0 = arg Z(0), theta1 = arg Z(1), theta_s = arg(Z(0)+Z(1))
//           by an iterative CORDIC;
//   divide  d = theta1 - theta0 is the phase advance over L/2 symbols, so
//           the phase step per symbol is 2*d/L (Q16.16, 2*pi/65536 units),
//           and the start phase is phi = theta_s - d;
//   pass B  r(l) * e^{-j(phi + l*step)} by a pipelined CORDIC, then the new
//           channel LLRs, clipped to 6 bits after >>> demap_sh:
//             QPSK    x and y;
//             16-QAM  v and |v| - qam_thr for the rail v of the pair,
//           written through two lanes into the decoder's LLR bank dst_bank.
// `cmd_init` first zeroes all 3K LLR positions of both banks (punctured
// positions stay zero), then runs pass B with phi = step = 0, giving the
// LLRs of the coarse-synchronised burst for the first iteration. The
// estimate is always made against the stored burst, so it is a total
// offset, not an increment. qam_thr is the decision threshold 2A scaled by
// the CORDIC gain (about 1.647).
//
// Timing: pass A takes n_tx/2 + 4 cycles, the CORDIC 3 x 17, the divider 35
// and pass B n_tx/2 + 15; init takes 2K + n_tx/2 + 16. Equations (3)-(5) and
// the tanh soft symbols follow the reference design; the pair mapping, the
// position table, the widths, tables and scalings are this design's choices.
module fine_sync
  import tsync_pkg::*;
#(
  parameter int unsigned KMAX  = K_MAX,
  parameter int unsigned R_W   = 8,       // received sample width (I and Q)
  parameter int unsigned ACC_W = 32       // Z accumulator width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] blk_len,       // K
  input  logic [IDX_W+1:0] n_tx,          // transmitted bits, multiple of 2 (QPSK) or 4 (16-QAM)
  input  logic             qam16,         // 0: QPSK, 1: 16-QAM
  input  logic signed [R_W+1:0] qam_thr,  // 16-QAM amplitude threshold after the CORDIC gain
  input  logic [2:0]       demap_sh,
  input  logic [2:0]       tanh_sh,
  // position table
  input  logic             pos_we,
  input  logic [IDX_W+1:0] pos_addr,      // transmitted bit index n
  input  logic [IDX_W-1:0] pos_k,
  input  bit_type_e        pos_t,
  // received samples
  input  logic                     r_we,
  input  logic [IDX_W:0]           r_addr,        // symbol index l
  input  logic signed [R_W-1:0]    r_i,
  input  logic signed [R_W-1:0]    r_q,
  // a-posteriori stream of the decoder
  input  logic             app_valid,
  input  app_beat_t        app_beat,
  input  logic             app_bank,
  // commands
  input  logic             cmd_init,
  input  logic             cmd_est,
  input  logic             src_bank,      // APP bank read by cmd_est
  input  logic             dst_bank,      // LLR bank written
  output logic             busy,
  output logic             done,
  // new channel LLRs
  output logic [1:0]       llr_we,
  output logic             llr_bank,
  output logic             llr_clr,       // lane 0 zeroes all three types at its address
  output bit_type_e        llr_type [2],
  output logic [IDX_W-1:0] llr_addr [2],
  output llr_t             llr_data [2],
  // estimates (valid after an estimation)
  output logic signed [31:0] est_step,    // phase step per symbol, Q16.16 of 2*pi/65536
  output logic signed [15:0] est_phi      // start phase, 2*pi/65536
);
  localparam int unsigned NMAX = 3 * KMAX;      // transmitted bits at most (rate 1/3)
  localparam int unsigned PMAX = NMAX / 2;      // pairs, also QPSK symbols
  localparam int unsigned N_W  = IDX_W + 2;
  localparam int unsigned S_W  = 8;
  localparam int unsigned NROT = 12;
  localparam int unsigned VW   = ACC_W + 2;
  localparam int unsigned POS_W = IDX_W + 2;
  localparam int unsigned PA_W  = $clog2(PMAX);  // pair / symbol address
  localparam int TANH_T [32] = '{0, 8, 15, 23, 29, 35, 40, 44, 48, 51, 53, 55, 57, 58, 59, 60,
                                 61, 61, 62, 62, 62, 62, 62, 63, 63, 63, 63, 63, 63, 63, 63, 63};

  typedef enum logic [3:0] {F_IDLE, F_CLR, F_A, F_ADR, F_V0, F_V1, F_VS, F_DIV, F_B, F_BDR} fst_e;
  fst_e st_q;

  // ---- memories -------------------------------------------------------------
  logic signed [R_W-1:0] ri_mem [PMAX];
  logic signed [R_W-1:0] rq_mem [PMAX];
  logic [POS_W-1:0]      pe_mem [PMAX];         // position of bit 2m
  logic [POS_W-1:0]      po_mem [PMAX];         // position of bit 2m+1
  // APP banks, bank b at offset b*KMAX
  app_t as_mem  [2*KMAX];
  app_t ap1_mem [2*KMAX];
  app_t ap2_mem [2*KMAX];

  function automatic logic [IDX_W:0] bidx(input logic bank, input logic [IDX_W-1:0] a);
    return bank ? (IDX_W+1)'(KMAX) + (IDX_W+1)'(a) : (IDX_W+1)'(a);
  endfunction

  always_ff @(posedge clk) begin
    if (r_we) begin
      ri_mem[r_addr[PA_W-1:0]] <= r_i;
      rq_mem[r_addr[PA_W-1:0]] <= r_q;
    end
  end
  always_ff @(posedge clk) begin
    if (pos_we && !pos_addr[0]) pe_mem[pos_addr[PA_W:1]] <= {pos_k, pos_t};
  end
  always_ff @(posedge clk) begin
    if (pos_we &&  pos_addr[0]) po_mem[pos_addr[PA_W:1]] <= {pos_k, pos_t};
  end
  always_ff @(posedge clk) begin
    if (app_valid && !app_beat.half) ap1_mem[bidx(app_bank, app_beat.step)] <= app_beat.app_p;
  end
  always_ff @(posedge clk) begin
    if (app_valid && app_beat.half)  as_mem[bidx(app_bank, app_beat.nat)]   <= app_beat.app_s;
  end
  always_ff @(posedge clk) begin
    if (app_valid && app_beat.half)  ap2_mem[bidx(app_bank, app_beat.step)] <= app_beat.app_p;
  end

  // ---- pair / symbol counters -------------------------------------------------
  logic [N_W-1:0]   npair_q, m_q, lsym_q, lhalf_q;
  logic [IDX_W-1:0] kc_q;                       // clear counter
  logic             cbank_q;
  logic             srcb_q, dstb_q, qam_q;
  logic [N_W-1:0]   l_of_m;

  assign l_of_m = qam_q ? (m_q >> 1) : m_q;

  // ---- stage 1: position table and samples (both passes) -------------------------
  logic                  p1_v, p1_odd, p1_h;
  logic [POS_W-1:0]      p1_pe, p1_po;
  logic signed [R_W-1:0] p1_ri, p1_rq;

  always_ff @(posedge clk) begin
    p1_pe <= pe_mem[m_q[PA_W-1:0]];
    p1_po <= po_mem[m_q[PA_W-1:0]];
    p1_ri <= ri_mem[l_of_m[PA_W-1:0]];
    p1_rq <= rq_mem[l_of_m[PA_W-1:0]];
  end

  // ---- pass A ---------------------------------------------------------------------
  function automatic app_t pick(input bit_type_e t, input app_t s, input app_t p1, input app_t p2);
    return (t == BT_SYS) ? s : (t == BT_P1) ? p1 : p2;
  endfunction

  function automatic logic signed [S_W-1:0] soft_sym(input app_t v, input logic [2:0] sh);
    logic [APP_W-1:0] mag, m2;
    logic [4:0]       ix;
    mag = v[APP_W-1] ? APP_W'(-v) : APP_W'(v);
    m2  = mag >> sh;
    ix  = (m2 > 31) ? 5'd31 : m2[4:0];
    return v[APP_W-1] ? -S_W'(TANH_T[ix]) : S_W'(TANH_T[ix]);
  endfunction

  // stage 2: APP values of both bits of the pair
  logic                  a2_v, a2_odd, a2_h;
  bit_type_e             a2_t0, a2_t1;
  app_t                  a2_s0, a2_p10, a2_p20, a2_s1, a2_p11, a2_p21;
  logic signed [R_W-1:0] a2_ri, a2_rq;

  always_ff @(posedge clk) begin
    a2_s0  <= as_mem [bidx(srcb_q, p1_pe[POS_W-1:2])];
    a2_p10 <= ap1_mem[bidx(srcb_q, p1_pe[POS_W-1:2])];
    a2_p20 <= ap2_mem[bidx(srcb_q, p1_pe[POS_W-1:2])];
    a2_s1  <= as_mem [bidx(srcb_q, p1_po[POS_W-1:2])];
    a2_p11 <= ap1_mem[bidx(srcb_q, p1_po[POS_W-1:2])];
    a2_p21 <= ap2_mem[bidx(srcb_q, p1_po[POS_W-1:2])];
  end

  // stage 3: soft reference symbol
  logic signed [S_W-1:0] t0, t1;
  logic signed [S_W+8:0] rail16;
  assign t0     = soft_sym(pick(a2_t0, a2_s0, a2_p10, a2_p20), tanh_sh);
  assign t1     = soft_sym(pick(a2_t1, a2_s1, a2_p11, a2_p21), tanh_sh);
  assign rail16 = ((S_W+9)'(t0) * ((S_W+9)'(126) + (S_W+9)'(t1))) >>> 7;

  logic                  a3_v, a3_h;
  logic signed [S_W-1:0] a3_si, a3_sq;
  logic signed [R_W-1:0] a3_ri, a3_rq;
  logic signed [ACC_W-1:0] z0r_q, z0i_q, z1r_q, z1i_q;

  // ---- vectoring, divider ---------------------------------------------------------
  logic                  vec_start, vec_done, div_start, div_done;
  logic signed [VW-1:0]  vx, vy;
  logic signed [15:0]    vang, th0_q, th1_q, dth;
  logic signed [31:0]    quo;

  always_comb begin
    unique case (st_q)
      F_V0:    begin vx = VW'(z0r_q); vy = VW'(z0i_q); end
      F_V1:    begin vx = VW'(z1r_q); vy = VW'(z1i_q); end
      default: begin vx = VW'(z0r_q) + VW'(z1r_q); vy = VW'(z0i_q) + VW'(z1i_q); end
    endcase
  end

  cordic_vec #(.W(VW), .PH_W(16), .NIT(16)) u_vec (
    .clk, .rst_n, .start(vec_start), .x_in(vx), .y_in(vy), .done(vec_done), .angle(vang));

  assign dth = th1_q - th0_q;
  sdiv_iter #(.NW(34), .DW(N_W), .QW(32)) u_div (
    .clk, .rst_n, .start(div_start), .num(34'(dth) <<< 17), .den(lsym_q),
    .done(div_done), .quo(quo));

  // ---- pass B ---------------------------------------------------------------------
  localparam int unsigned TAG_W = 2 * POS_W + 1;
  logic signed [15:0]    p1_ang;
  logic [TAG_W-1:0]      rot_tag;
  logic signed [31:0]    acc_q;
  logic                  rot_v;
  logic signed [R_W+1:0] rot_x, rot_y, rail;

  cordic_rot #(.W_IN(R_W), .PH_W(16), .NST(NROT), .TAG_W(TAG_W)) u_rot (
    .clk, .rst_n, .in_valid(p1_v && st_q inside {F_B, F_BDR}), .x_in(p1_ri), .y_in(p1_rq),
    .angle(p1_ang), .tag_in({p1_pe, p1_po, p1_odd}), .out_valid(rot_v),
    .x_out(rot_x), .y_out(rot_y), .tag_out(rot_tag));

  function automatic llr_t clip_llr(input logic signed [R_W+2:0] v, input logic [2:0] sh);
    logic signed [R_W+2:0] d;
    d = v >>> sh;
    if (d > (R_W+3)'(31))       return llr_t'(31);
    else if (d < -(R_W+3)'(31)) return llr_t'(-31);
    else                        return llr_t'(d);
  endfunction

  logic signed [R_W+2:0] rail_abs;
  assign rail     = rot_tag[0] ? rot_y : rot_x;
  assign rail_abs = rail[R_W+1] ? -(R_W+3)'(rail) : (R_W+3)'(rail);

  logic clr_phase;
  assign clr_phase = (st_q == F_CLR);

  always_comb begin
    if (clr_phase) begin
      llr_we      = 2'b01;
      llr_bank    = cbank_q;
      llr_clr     = 1'b1;
      llr_addr[0] = kc_q;        llr_type[0] = BT_SYS; llr_data[0] = '0;
      llr_addr[1] = '0;          llr_type[1] = BT_SYS; llr_data[1] = '0;
    end else begin
      llr_we      = {2{rot_v}};
      llr_bank    = dstb_q;
      llr_clr     = 1'b0;
      llr_addr[0] = rot_tag[TAG_W-1 -: IDX_W];
      llr_type[0] = bit_type_e'(rot_tag[POS_W+2 -: 2]);
      llr_addr[1] = rot_tag[POS_W -: IDX_W];
      llr_type[1] = bit_type_e'(rot_tag[2:1]);
      if (qam_q) begin
        llr_data[0] = clip_llr((R_W+3)'(rail), demap_sh);
        llr_data[1] = clip_llr(rail_abs - (R_W+3)'(qam_thr), demap_sh);
      end else begin
        llr_data[0] = clip_llr((R_W+3)'(rot_x), demap_sh);
        llr_data[1] = clip_llr((R_W+3)'(rot_y), demap_sh);
      end
    end
  end

  // ---- sequencer --------------------------------------------------------------------
  logic [4:0] drain_q;
  logic       last_m, sym_end;
  assign last_m  = (m_q == npair_q - 1'b1);
  assign sym_end = !qam_q || m_q[0];          // last pair of a symbol

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= F_IDLE; npair_q <= '0; lsym_q <= '0; lhalf_q <= '0; m_q <= '0; kc_q <= '0;
      cbank_q <= 1'b0; srcb_q <= 1'b0; dstb_q <= 1'b0; qam_q <= 1'b0; done <= 1'b0; drain_q <= '0;
      p1_v <= 1'b0; p1_odd <= 1'b0; p1_h <= 1'b0; p1_ang <= '0;
      a2_v <= 1'b0; a2_odd <= 1'b0; a2_h <= 1'b0; a2_t0 <= BT_SYS; a2_t1 <= BT_SYS;
      a2_ri <= '0; a2_rq <= '0;
      a3_v <= 1'b0; a3_h <= 1'b0; a3_si <= '0; a3_sq <= '0; a3_ri <= '0; a3_rq <= '0;
      z0r_q <= '0; z0i_q <= '0; z1r_q <= '0; z1i_q <= '0;
      vec_start <= 1'b0; div_start <= 1'b0; th0_q <= '0; th1_q <= '0;
      est_step <= '0; est_phi <= '0; acc_q <= '0;
    end else begin
      done      <= 1'b0;
      vec_start <= 1'b0;
      div_start <= 1'b0;
      p1_v      <= 1'b0;

      // pass A, stages 2 and 3, and accumulation
      a2_v   <= p1_v && (st_q inside {F_A, F_ADR});
      a2_odd <= p1_odd;
      a2_h   <= p1_h;
      a2_t0  <= bit_type_e'(p1_pe[1:0]);
      a2_t1  <= bit_type_e'(p1_po[1:0]);
      a2_ri  <= p1_ri;
      a2_rq  <= p1_rq;
      a3_v   <= 1'b0;
      if (a2_v) begin
        a3_h  <= a2_h;
        a3_ri <= a2_ri;
        a3_rq <= a2_rq;
        if (!qam_q) begin
          a3_si <= t0; a3_sq <= t1; a3_v <= 1'b1;
        end else if (!a2_odd) begin
          a3_si <= S_W'(rail16);
        end else begin
          a3_sq <= S_W'(rail16); a3_v <= 1'b1;
        end
      end
      if (a3_v) begin
        // r * conj(s_e)
        if (!a3_h) begin
          z0r_q <= z0r_q + ACC_W'(a3_ri * a3_si + a3_rq * a3_sq);
          z0i_q <= z0i_q + ACC_W'(a3_rq * a3_si - a3_ri * a3_sq);
        end else begin
          z1r_q <= z1r_q + ACC_W'(a3_ri * a3_si + a3_rq * a3_sq);
          z1i_q <= z1i_q + ACC_W'(a3_rq * a3_si - a3_ri * a3_sq);
        end
      end

      unique case (st_q)
        F_IDLE: begin
          npair_q <= n_tx >> 1;
          lsym_q  <= qam16 ? n_tx >> 2 : n_tx >> 1;
          lhalf_q <= qam16 ? n_tx >> 3 : n_tx >> 2;
          qam_q   <= qam16;
          m_q <= '0; kc_q <= '0; cbank_q <= 1'b0;
          srcb_q <= src_bank; dstb_q <= dst_bank;
          if (cmd_est) begin
            z0r_q <= '0; z0i_q <= '0; z1r_q <= '0; z1i_q <= '0;
            st_q  <= F_A;
          end else if (cmd_init) begin
            est_step <= '0; est_phi <= '0; acc_q <= '0;
            st_q     <= F_CLR;
          end
        end
        F_CLR: begin
          kc_q <= kc_q + 1'b1;
          if (kc_q == blk_len - 1'b1) begin
            kc_q    <= '0;
            cbank_q <= 1'b1;
            if (cbank_q) st_q <= F_B;
          end
        end
        F_A: begin
          p1_v   <= 1'b1;
          p1_odd <= m_q[0];
          p1_h   <= (l_of_m >= lhalf_q);
          m_q    <= m_q + 1'b1;
          if (last_m) begin st_q <= F_ADR; drain_q <= 5'd4; end
        end
        F_ADR: begin
          if (drain_q == 0) begin st_q <= F_V0; vec_start <= 1'b1; end
          else drain_q <= drain_q - 1'b1;
        end
        F_V0: if (vec_done) begin th0_q <= vang; st_q <= F_V1; vec_start <= 1'b1; end
        F_V1: if (vec_done) begin th1_q <= vang; st_q <= F_VS; vec_start <= 1'b1; end
        F_VS: if (vec_done) begin
          est_phi   <= vang - dth;
          st_q      <= F_DIV;
          div_start <= 1'b1;
        end
        F_DIV: if (div_done) begin
          est_step <= quo;
          acc_q    <= {est_phi, 16'h0};
          m_q      <= '0;
          st_q     <= F_B;
        end
        F_B: begin
          p1_v   <= 1'b1;
          p1_odd <= m_q[0];
          p1_ang <= -acc_q[31:16];
          if (sym_end) acc_q <= acc_q + est_step;
          m_q    <= m_q + 1'b1;
          if (last_m) begin st_q <= F_BDR; drain_q <= 5'(NROT + 3); end
        end
        F_BDR: begin
          if (drain_q == 0) begin st_q <= F_IDLE; done <= 1'b1; end
          else drain_q <= drain_q - 1'b1;
        end
        default: st_q <= F_IDLE;
      endcase
    end
  end

  assign busy = (st_q != F_IDLE);
endmodule
