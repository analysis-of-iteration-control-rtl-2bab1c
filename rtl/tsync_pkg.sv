// tsync_pkg: shared widths, types and trellis helpers for the turbo
// synchronisation receiver (turbo decoder, fine synchroniser, re-encoding
// iteration control).
//
// LLR convention used everywhere: a log-likelihood ratio is ln P(b=0)/P(b=1),
// so a positive value favours bit 0 and the hard decision is the sign bit.
// A bit 0 is transmitted as +1 on its I or Q rail.
//
// The component code is an 8-state recursive systematic convolutional code
// with feedback polynomial 1+D^2+D^3 and feed-forward polynomial 1+D+D^3
// (octal 13/15). The number of states is the only trellis property that is
// fixed by the reference design; the polynomials are this design's choice.
package tsync_pkg;

  // ---- sizes ------------------------------------------------------------
  localparam int unsigned K_MAX   = 5124;          // largest information word
  localparam int unsigned IDX_W   = 13;            // index into an information word
  localparam int unsigned NSTATE  = 8;             // trellis states
  localparam int unsigned LLR_W   = 6;             // channel LLR quantisation
  localparam int unsigned EXT_W   = 8;             // extrinsic / a-priori LLR
  localparam int unsigned APP_W   = 10;            // a-posteriori LLR
  localparam int unsigned SM_W    = 14;            // state metric
  localparam int unsigned HI_W    = 5;             // half-iteration counter

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [APP_W-1:0] app_t;
  typedef logic signed [SM_W-1:0]  sm_t;
  typedef sm_t [NSTATE-1:0]        sm_vec_t;

  // codeword bit type, in transmission order s, p1, p2
  typedef enum logic [1:0] {BT_SYS = 2'd0, BT_P1 = 2'd1, BT_P2 = 2'd2} bit_type_e;

  // one a-posteriori output of the serial MAP unit
  typedef struct packed {
    logic              half;      // 0: component code 1, 1: component code 2
    logic [IDX_W-1:0]  step;      // trellis step j in the order decoded
    logic [IDX_W-1:0]  nat;       // natural (non-interleaved) bit index
    app_t              app_s;     // APP LLR of the systematic bit
    app_t              app_p;     // APP LLR of the parity bit of this half
    logic              last;      // last step of the half-iteration
  } app_beat_t;

  // ---- trellis ------------------------------------------------------------
  // state = {s1, s2, s3}, s1 being the newest register bit
  function automatic logic [2:0] rsc_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];                 // feedback taps D^2, D^3
    return {a, s[2], s[1]};
  endfunction

  function automatic logic rsc_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];              // forward taps 1, D, D^3
  endfunction

  // ---- saturation helpers -------------------------------------------------
  function automatic ext_t sat_ext(input logic signed [19:0] v);
    if (v > 20'sd127)       return ext_t'(127);
    else if (v < -20'sd127) return ext_t'(-127);
    else                    return ext_t'(v);
  endfunction

  function automatic app_t sat_app(input logic signed [19:0] v);
    if (v > 20'sd511)       return app_t'(511);
    else if (v < -20'sd511) return app_t'(-511);
    else                    return app_t'(v);
  endfunction

endpackage
