// dp_ram_1word: a one-word dual-port RAM with independent write and read
// clocks, the clock-domain crossing element of the fine delay.
//
// The word is written on every rising edge of wclk and copied to the read
// register on every rising edge of rclk, as a small embedded RAM block with
// registered ports does.  Data are moved safely only when rclk lags wclk by
// a phase strictly between zero and one clock period, which the fine delay
// controller guarantees; there is no synchronizer.
`timescale 1ns / 1ps
module dp_ram_1word #(
  parameter int unsigned W = tfb_pkg::DATA_W
) (
  input  logic         wclk,
  input  logic [W-1:0] wdata,
  input  logic         rclk,
  output logic [W-1:0] rdata
);

  logic [W-1:0] word;

  always_ff @(posedge wclk) word  <= wdata;
  always_ff @(posedge rclk) rdata <= word;

endmodule
