// delay_line: programmable integer-cycle delay built from a dual-port RAM.
//
// A free-running address counter (ADDR_W bits, wrapping from 2**ADDR_W-1 to
// 0) writes every input sample into the RAM; the read address is the write
// address minus the requested delay, read and write share one clock.  This
// is the coarse delay of the feedback (10 ns steps at 100 MHz) and is reused
// as the one-turn delay of the notch filter and as the BPM time-of-flight
// delay.
//
// Timing: dout is registered.  A sample presented on din in cycle n appears
// on dout after the clock edge of cycle n + delay, i.e. delay + 1 edges
// after it was sampled, for delay = 0 .. 2**ADDR_W-1.  When delay is 0 the
// read address equals the write address and the RAM output is bypassed
// with the sample being written (new-data read-during-write).  The latency
// step of one cycle and that bypass are choices of this implementation.
// RAM contents are not reset: for the first 2**ADDR_W cycles after power-up
// long delays return whatever the RAM held.
`timescale 1ns / 1ps
module delay_line #(
  parameter int unsigned W  = tfb_pkg::DATA_W,
  parameter int unsigned AW = tfb_pkg::ADDR_W
) (
  input  logic          clk,
  input  logic          rst,     // synchronous, clears the address counter
  input  logic [W-1:0]  din,
  input  logic [AW-1:0] delay,   // delay in clock cycles (plus one)
  output logic [W-1:0]  dout
);

  logic [W-1:0]  mem [2**AW];
  logic [AW-1:0] wr_addr;
  logic [AW-1:0] rd_addr;

  assign rd_addr = wr_addr - delay;

  always_ff @(posedge clk) begin
    if (rst) wr_addr <= '0;
    else     wr_addr <= wr_addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    mem[wr_addr] <= din;
  end

  always_ff @(posedge clk) begin
    if (delay == '0) dout <= din;
    else             dout <= mem[rd_addr];
  end

endmodule
