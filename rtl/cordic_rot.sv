// cordic_rot: pipelined CORDIC rotator, (x + jy) * G * e^{j angle}.
//
// A pre-stage folds the angle into [-pi/2, pi/2) by a rotation through pi
// (negating x and y), then NST registered micro-rotation stages follow.
// One sample per cycle, latency NST+1 cycles; a tag travels with each
// sample. The CORDIC gain G is about 1.647 and is not removed: the
// downstream LLR scaling absorbs it. Internally FR fractional bits are kept;
// outputs are rounded back to integers, W_IN+2 bits wide.
module cordic_rot #(
  parameter int unsigned W_IN  = 8,
  parameter int unsigned PH_W  = 16,
  parameter int unsigned NST   = 12,
  parameter int unsigned TAG_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [W_IN-1:0]  x_in,
  input  logic signed [W_IN-1:0]  y_in,
  input  logic signed [PH_W-1:0]  angle,
  input  logic [TAG_W-1:0]        tag_in,
  output logic                    out_valid,
  output logic signed [W_IN+1:0]  x_out,
  output logic signed [W_IN+1:0]  y_out,
  output logic [TAG_W-1:0]        tag_out
);
  localparam int unsigned FR = 4;
  localparam int unsigned IW = W_IN + 2 + FR;
  localparam int ATAN16 [16] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81,
                                 41, 20, 10, 5, 3, 1, 1, 0};

  logic signed [IW-1:0]   xs [NST+1];
  logic signed [IW-1:0]   ys [NST+1];
  logic signed [PH_W-1:0] zs [NST+1];
  logic [TAG_W-1:0]       ts [NST+1];
  logic                   vs [NST+1];

  // pre-stage: fold into the right half-plane
  logic fold;
  assign fold = angle[PH_W-1] ^ angle[PH_W-2];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0; xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= tag_in;
      zs[0] <= fold ? {~angle[PH_W-1], angle[PH_W-2:0]} : angle;
      xs[0] <= fold ? -(IW'(x_in) <<< FR) : (IW'(x_in) <<< FR);
      ys[0] <= fold ? -(IW'(y_in) <<< FR) : (IW'(y_in) <<< FR);
    end
  end

  for (genvar i = 0; i < NST; i++) begin : g_stage
    localparam logic signed [PH_W-1:0] AT = (PH_W)'(ATAN16[i] >>> (16 - PH_W));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0; xs[i+1] <= '0; ys[i+1] <= '0; zs[i+1] <= '0; ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (zs[i] >= 0) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - AT;
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + AT;
        end
      end
    end
  end

  logic signed [IW-1:0] xr, yr;
  assign xr = xs[NST] + IW'(1 << (FR - 1));
  assign yr = ys[NST] + IW'(1 << (FR - 1));
  assign out_valid = vs[NST];
  assign x_out     = (W_IN+2)'(xr >>> FR);
  assign y_out     = (W_IN+2)'(yr >>> FR);
  assign tag_out   = ts[NST];
endmodule
