// fine_delay_path: sub-cycle delay by crossing into phase-shifted clocks.
//
// The sample leaves the main clock domain through a register clocked by
// clk_left, passes a one-word dual-port RAM written on clk_left and read
// on clk_mid, a second one written on clk_mid and read on clk_right, and a
// final register on clk_right that drives the DAC.  The three clocks come
// from PLLs fed by the main clock; clk_left keeps the phase of the main
// clock and clk_mid, clk_right lag it by the phases set by the fine delay
// controller (each neighbour step about half a period at most, the total
// about one period at most).  The output therefore moves in time by the phase of
// clk_right, in 125 ps steps.  The chain of input register, two one-word
// RAMs and output register follows the original design.
//
// Timing (T = clock period, phi_m, phi_r the lags of clk_mid, clk_right,
// 0 < phi_m < phi_r < phi_m + T): a value that appears on din after main
// clock edge k appears on dout at time (k + 4) * T + phi_r.
`timescale 1ns / 1ps
module fine_delay_path #(
  parameter int unsigned W = tfb_pkg::DATA_W
) (
  input  logic         clk_left,
  input  logic         clk_mid,
  input  logic         clk_right,
  input  logic [W-1:0] din,     // main clock domain
  output logic [W-1:0] dout     // clk_right domain, to the DAC
);

  logic [W-1:0] left_q;
  logic [W-1:0] mid_q;
  logic [W-1:0] right_q;

  always_ff @(posedge clk_left) left_q <= din;

  dp_ram_1word #(.W(W)) u_ram_left_mid (
    .wclk (clk_left),
    .wdata(left_q),
    .rclk (clk_mid),
    .rdata(mid_q)
  );

  dp_ram_1word #(.W(W)) u_ram_mid_right (
    .wclk (clk_mid),
    .wdata(mid_q),
    .rclk (clk_right),
    .rdata(right_q)
  );

  always_ff @(posedge clk_right) dout <= right_q;

endmodule
