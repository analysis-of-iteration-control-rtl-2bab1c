// rsc_encoder: 8-state recursive systematic convolutional component encoder.
//
// One information bit per enabled cycle. The parity output is combinational
// from the current register state and the input bit; the state register
// advances on every enabled cycle. Asserting `first` together with `en`
// treats the state as all-zero for that bit, so a new block can start
// without an idle clearing cycle (blocks are not terminated).
//
// The 8 trellis states follow the reference turbo decoder; the polynomials
// (feedback 1+D^2+D^3, forward 1+D+D^3, the 3GPP constituent code) are this
// design's choice and live in tsync_pkg.
module rsc_encoder
  import tsync_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,        // consume u this cycle
  input  logic first,     // u is the first bit of a block (start from state 0)
  input  logic u,         // information bit
  output logic p,         // parity bit belonging to u
  output logic [2:0] state // register state before u
);
  logic [2:0] s_q, s_use;

  assign s_use = first ? 3'b000 : s_q;
  assign p     = rsc_par(s_use, u);
  assign state = s_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  s_q <= '0;
    else if (en) s_q <= rsc_next(s_use, u);
  end
endmodule
