// turbo_encoder: parallel concatenated encoder made of two identical
// 8-state component encoders (rsc_encoder).
//
// Encoder 1 takes the information bits in natural order (u1/en1), encoder 2
// the same bits in interleaved order (u2/en2); the permutation itself is
// applied outside by the order in which the bits are presented. In the
// receiver the serial turbo decoder already delivers its hard decisions in
// natural order during the first half-iteration and in interleaved order
// during the second, so this block re-encodes them with no interleaver
// memory of its own. The systematic output is the information bit itself.
// Parity outputs are combinational for the bit presented in the same cycle.
module turbo_encoder
  import tsync_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en1, first1, u1,   // component encoder 1, natural order
  input  logic en2, first2, u2,   // component encoder 2, interleaved order
  output logic s,                 // systematic bit (= u1)
  output logic p1,                // parity of encoder 1
  output logic p2                 // parity of encoder 2
);
  logic [2:0] st1, st2;

  rsc_encoder u_enc1 (.clk, .rst_n, .en(en1), .first(first1), .u(u1), .p(p1), .state(st1));
  rsc_encoder u_enc2 (.clk, .rst_n, .en(en2), .first(first2), .u(u2), .p(p2), .state(st2));

  assign s = u1;
endmodule
