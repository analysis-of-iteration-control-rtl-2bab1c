// sdiv_iter: sequential signed-by-unsigned integer divider.
//
// Restoring division of |num| by den, one quotient bit per cycle, with the
// sign of num applied to the quotient (truncation towards zero). `start`
// samples the operands; `done` pulses NW+1 cycles later with quo valid
// (it then holds). The quotient is truncated to QW bits; the caller makes
// sure it fits.
module sdiv_iter #(
  parameter int unsigned NW = 34,   // numerator width, signed
  parameter int unsigned DW = 14,   // denominator width, unsigned
  parameter int unsigned QW = 32    // quotient width, signed
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic [DW-1:0]        den,
  output logic                 done,
  output logic signed [QW-1:0] quo
);
  logic [NW-1:0]  n_q, q_q;
  logic [DW:0]    r_q;
  logic [DW-1:0]  d_q;
  logic           neg_q, run_q;
  logic [$clog2(NW+1)-1:0] i_q;
  logic [DW:0]    r_sh;

  assign r_sh = {r_q[DW-1:0], n_q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q <= '0; q_q <= '0; r_q <= '0; d_q <= '0; neg_q <= 1'b0; run_q <= 1'b0;
      i_q <= '0; done <= 1'b0; quo <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_q   <= num[NW-1] ? NW'(-num) : NW'(num);
        neg_q <= num[NW-1];
        d_q   <= den;
        r_q   <= '0;
        q_q   <= '0;
        i_q   <= '0;
        run_q <= 1'b1;
      end else if (run_q) begin
        n_q <= n_q << 1;
        if (r_sh >= {1'b0, d_q}) begin
          r_q <= r_sh - {1'b0, d_q};
          q_q <= {q_q[NW-2:0], 1'b1};
        end else begin
          r_q <= r_sh;
          q_q <= {q_q[NW-2:0], 1'b0};
        end
        i_q <= i_q + 1'b1;
        if (i_q == ($clog2(NW+1))'(NW - 1)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
          quo   <= neg_q ? -QW'({q_q[NW-2:0], r_sh >= {1'b0, d_q}})
                         :  QW'({q_q[NW-2:0], r_sh >= {1'b0, d_q}});
        end
      end
    end
  end
endmodule
