// coef_mixer: weighted sum of the two pick-up signals, y = b1*x1 + b2*x2.
//
// The two BPMs sit a quarter betatron wavelength apart, so with
// b1 = cos(phi)-like and b2 = sin(phi)-like weights the sum is the signal
// of a "virtual pick-up" with any wanted betatron phase
// (cos(wt - phi) = cos wt cos phi + sin wt sin phi).  The control processor
// computes b1 and b2; this block only applies them.
//
// Coefficients are CW-bit signed with CF fraction bits (default 18 bits,
// 16 fraction bits: range -2 .. +2).  The sum is shifted right by CF
// (rounding toward minus infinity) and saturated to W bits.
// Timing: two pipeline stages (products, then sum with saturation), so
// y after the edge of cycle n + 2 belongs to x1, x2, b1, b2 of cycle n.
// The coefficient format, the rounding and the pipeline are choices of this
// implementation; the design description gives only the multipliers and the
// adder.
`timescale 1ns / 1ps
module coef_mixer #(
  parameter int unsigned W  = tfb_pkg::DATA_W,
  parameter int unsigned CW = tfb_pkg::COEF_W,
  parameter int unsigned CF = tfb_pkg::COEF_FRAC
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic signed [W-1:0]  x1,
  input  logic signed [W-1:0]  x2,
  input  logic signed [CW-1:0] b1,
  input  logic signed [CW-1:0] b2,
  output logic signed [W-1:0]  y
);

  localparam int unsigned PW = W + CW;   // product width
  localparam int unsigned SW = PW + 1;   // sum width
  localparam logic signed [SW-CF-1:0] MAX = (SW-CF)'(2**(W-1) - 1);
  localparam logic signed [SW-CF-1:0] MIN = -(SW-CF)'(2**(W-1));

  logic signed [PW-1:0]    p1, p2;
  logic signed [SW-1:0]    sum;
  logic signed [SW-CF-1:0] scaled;

  always_ff @(posedge clk) begin
    if (rst) begin
      p1 <= '0;
      p2 <= '0;
    end else begin
      p1 <= x1 * b1;
      p2 <= x2 * b2;
    end
  end

  assign sum    = SW'(p1) + SW'(p2);
  assign scaled = sum[SW-1:CF];

  always_ff @(posedge clk) begin
    if (rst)                 y <= '0;
    else if (scaled > MAX)   y <= MAX[W-1:0];
    else if (scaled < MIN)   y <= MIN[W-1:0];
    else                     y <= scaled[W-1:0];
  end

endmodule
