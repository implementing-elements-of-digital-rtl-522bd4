// pll_phase_model: behavioural model of one PLL with its run-time
// reconfiguration logic, as used by the fine delay (testbench only).
//
// clk_out repeats clk_in delayed by applied_phase steps of STEP ns (125 ps,
// one eighth of a 1 ns VCO period), with a high time of HALF ns.  A
// one-cycle pulse on reconfig (sampled on clk_in) latches phase and raises
// busy on that edge; BUSY_CYCLES clk_in cycles later the new phase takes
// effect and busy drops.  The timing of the real reconfiguration is not
// modelled beyond that.
`timescale 1ns / 1ps
module pll_phase_model #(
  parameter int  PW          = 7,
  parameter int  BUSY_CYCLES = 6,
  parameter real STEP        = 0.125,
  parameter real HALF        = 5.0
) (
  input  logic          clk_in,
  input  logic [PW-1:0] phase,
  input  logic          reconfig,
  output logic          busy,
  output logic          clk_out,
  output logic [PW-1:0] applied_phase
);

  logic [PW-1:0] latched;
  int            cnt;

  initial begin
    busy          = 1'b0;
    clk_out       = 1'b0;
    applied_phase = '0;
    latched       = '0;
    cnt           = 0;
  end

  always @(posedge clk_in) begin
    if (busy) begin
      if (cnt == 0) begin
        busy          <= 1'b0;
        applied_phase <= latched;
      end else begin
        cnt <= cnt - 1;
      end
    end else if (reconfig) begin
      busy    <= 1'b1;
      latched <= phase;
      cnt     <= BUSY_CYCLES - 1;
    end
  end

  always @(posedge clk_in) begin
    automatic int a = int'(applied_phase);
    fork
      begin
        if (a != 0) #(STEP * a);
        clk_out = 1'b1;
        #(HALF);
        clk_out = 1'b0;
      end
    join_none
  end

endmodule
