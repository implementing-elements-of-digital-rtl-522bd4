// notch_filter: one-turn comb filter y[n] = x[n] - x[n - T_rev].
//
// The input is subtracted from itself delayed by one revolution, which
// removes the closed-orbit offset and every other component at a multiple
// of the revolution frequency; the gain is 2|sin(pi f / f_rev)| (up to
// +6 dB half way between harmonics).  The one-turn delay is a delay_line,
// the same RAM structure as the coarse delay.  t_rev is the revolution
// period in clock cycles and may change at any time, e.g. during
// acceleration.
//
// Timing: two clock cycles from din to dout: dout after the edge of cycle
// n + 2 equals din(n) - din(n - t_rev).  The difference is saturated to W
// bits (with sign-extended 12-bit ADC samples it never saturates).  With
// en low the filter is bypassed with the same two-cycle latency.  Latency,
// saturation and bypass are choices of this implementation.
`timescale 1ns / 1ps
module notch_filter #(
  parameter int unsigned W  = tfb_pkg::DATA_W,
  parameter int unsigned AW = tfb_pkg::ADDR_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [AW-1:0]       t_rev,   // revolution period in clock cycles
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  localparam logic signed [W:0] MAX = {2'b00, {(W-1){1'b1}}};
  localparam logic signed [W:0] MIN = {2'b11, {(W-1){1'b0}}};

  logic signed [W-1:0] turn_ago;   // din delayed by one turn
  logic signed [W-1:0] din_q;      // din aligned with turn_ago
  logic signed [W:0]   diff;

  delay_line #(.W(W), .AW(AW)) u_one_turn (
    .clk  (clk),
    .rst  (rst),
    .din  (din),
    .delay(t_rev),
    .dout (turn_ago)
  );

  always_ff @(posedge clk) din_q <= din;

  assign diff = {din_q[W-1], din_q} - {turn_ago[W-1], turn_ago};

  always_ff @(posedge clk) begin
    if (rst)               dout <= '0;
    else if (!en)          dout <= din_q;
    else if (diff > MAX)   dout <= MAX[W-1:0];
    else if (diff < MIN)   dout <= MIN[W-1:0];
    else                   dout <= diff[W-1:0];
  end

endmodule
