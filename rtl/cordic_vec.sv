// cordic_vec: iterative CORDIC in vectoring mode, returns arg(x + jy).
//
// The vector is first folded into the right half-plane (negated, starting
// angle pi) and then driven onto the real axis by NIT micro-rotations, one
// per clock cycle, accumulating the rotation angles. Angles are binary:
// 2^PH_W units per full turn, so the result wraps naturally in [-pi, pi).
// `start` samples x/y; `done` pulses NIT+1 cycles later with `angle` valid
// (it then holds). The magnitude is not needed and not brought out.
module cordic_vec #(
  parameter int unsigned W    = 34,   // input width, signed
  parameter int unsigned PH_W = 16,   // angle width
  parameter int unsigned NIT  = 16    // micro-rotations
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic signed [W-1:0]    x_in,
  input  logic signed [W-1:0]    y_in,
  output logic                   done,
  output logic signed [PH_W-1:0] angle
);
  // atan(2^-i) in units of 2*pi / 65536
  localparam int ATAN16 [16] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81,
                                 41, 20, 10, 5, 3, 1, 1, 0};

  function automatic logic signed [PH_W-1:0] atan_i(input int i);
    return (PH_W)'(ATAN16[i] >>> (16 - PH_W));
  endfunction

  logic signed [W+1:0]   x_q, y_q;
  logic signed [PH_W-1:0] z_q;
  logic [$clog2(NIT+1)-1:0] i_q;
  logic                  run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; z_q <= '0; i_q <= '0; run_q <= 1'b0; done <= 1'b0; angle <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        if (x_in < 0) begin
          x_q <= -(W+2)'(x_in); y_q <= -(W+2)'(y_in);
          z_q <= {1'b1, {(PH_W-1){1'b0}}};         // pi
        end else begin
          x_q <= (W+2)'(x_in);  y_q <= (W+2)'(y_in);
          z_q <= '0;
        end
        i_q   <= '0;
        run_q <= 1'b1;
      end else if (run_q) begin
        if (y_q >= 0) begin
          x_q <= x_q + (y_q >>> i_q);
          y_q <= y_q - (x_q >>> i_q);
          z_q <= z_q + atan_i(int'(i_q));
        end else begin
          x_q <= x_q - (y_q >>> i_q);
          y_q <= y_q + (x_q >>> i_q);
          z_q <= z_q - atan_i(int'(i_q));
        end
        if (i_q == ($clog2(NIT+1))'(NIT - 1)) begin
          run_q <= 1'b0;
          done  <= 1'b1;
          angle <= (y_q >= 0) ? z_q + atan_i(int'(i_q)) : z_q - atan_i(int'(i_q));
        end
        i_q <= i_q + 1'b1;
      end
    end
  end
endmodule
