// tfb_dsp_top: signal processing of a digital transverse feedback system.
//
// Two beam position monitors a quarter betatron wavelength apart are
// digitised by 12-bit ADCs.  BPM 1 is delayed by the time of flight to
// BPM 2, both signals pass one-turn notch filters that remove the
// closed-orbit offset at the revolution harmonics, and they are weighted by
// b1, b2 and added, giving a "virtual pick-up" with the betatron phase the
// deflector needs.  The sum is delayed by the coarse delay (whole 10 ns
// clock cycles) and the fine delay (125 ps steps, by crossing into PLL
// clocks of adjustable phase) so that the kick reaches the same particles,
// and is sent to the 14-bit DAC.  All settings sit in memory-mapped
// registers written by the control processor (tfb_ctrl_regs).
//
// Clocks: clk is the 100 MHz main clock of the ADCs, the processing and the
// register bus.  clk_left, clk_mid, clk_right come from three PLLs fed by
// clk whose phases this block sets through the pll_* ports (the PLLs and
// their reconfiguration logic are outside); dac is in the clk_right domain.
// rst is synchronous to clk.
//
// Latency: a word captured from adc2 at main clock edge j leaves the coarse
// delay after edge j + 6 + T_COARSE (1 alignment register, 2 notch,
// 2 mixer, T_COARSE + 1 coarse delay) and is driven on dac from
// the clk_right edge at time (j + 10 + T_COARSE) * 10 ns + (T_FINE + 2) *
// 125 ps; a word from adc1 arrives T_BPM cycles later.  With the coarse
// delay disabled T_COARSE counts as 0, with the fine delay disabled T_FINE
// counts as 0 (see fine_delay_path, fine_delay_ctrl).  ADC words are taken as
// two's complement and the DAC word is two's complement: the converters'
// data formats are choices of this implementation.
`timescale 1ns / 1ps
module tfb_dsp_top
  import tfb_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst,
  // ADCs
  input  logic signed [ADC_W-1:0]      adc1,   // BPM 1 difference signal
  input  logic signed [ADC_W-1:0]      adc2,   // BPM 2 difference signal
  // register bus from the control processor
  input  logic [2:0]                   address,
  input  logic                         write,
  input  logic [31:0]                  writedata,
  input  logic                         read,
  output logic [31:0]                  readdata,
  output logic                         readdatavalid,
  // fine-delay PLLs (index 0 clk_left, 1 clk_mid, 2 clk_right)
  input  logic                         clk_left,
  input  logic                         clk_mid,
  input  logic                         clk_right,
  output logic [N_PLL-1:0][PHASE_W-1:0] pll_phase,
  output logic [N_PLL-1:0]             pll_reconfig,
  input  logic [N_PLL-1:0]             pll_busy,
  // DAC, clk_right domain
  output logic signed [DATA_W-1:0]     dac
);

  coef_t    b1, b2;
  cycles_t  t_rev, t_coarse, t_bpm, coarse_delay;
  phase_t   t_fine;
  enables_t enables;
  logic     fine_ready;

  sample_t  adc1_q, adc2_q;       // sign-extended ADC samples
  sample_t  bpm1_d, bpm2_d;       // BPM 1 delayed, BPM 2 aligned
  sample_t  notch1, notch2;
  sample_t  mixed;
  sample_t  coarse_out;

  tfb_ctrl_regs u_regs (
    .clk, .rst,
    .address, .write, .writedata, .read, .readdata, .readdatavalid,
    .fine_ready,
    .b1, .b2, .t_rev, .t_coarse, .t_fine, .enables, .t_bpm
  );

  // ADC capture
  always_ff @(posedge clk) begin
    adc1_q <= DATA_W'(adc1);
    adc2_q <= DATA_W'(adc2);
  end

  // BPM 1 waits for the particles to reach BPM 2
  delay_line u_bpm_delay (
    .clk, .rst, .din(adc1_q), .delay(t_bpm), .dout(bpm1_d)
  );
  always_ff @(posedge clk) bpm2_d <= adc2_q;

  notch_filter u_notch1 (
    .clk, .rst, .en(enables.notch), .t_rev, .din(bpm1_d), .dout(notch1)
  );
  notch_filter u_notch2 (
    .clk, .rst, .en(enables.notch), .t_rev, .din(bpm2_d), .dout(notch2)
  );

  coef_mixer u_mixer (
    .clk, .rst, .x1(notch1), .x2(notch2), .b1, .b2, .y(mixed)
  );

  assign coarse_delay = enables.coarse ? t_coarse : '0;

  delay_line u_coarse_delay (
    .clk, .rst, .din(mixed), .delay(coarse_delay), .dout(coarse_out)
  );

  fine_delay_path u_fine_path (
    .clk_left, .clk_mid, .clk_right, .din(coarse_out), .dout(dac)
  );

  fine_delay_ctrl u_fine_ctrl (
    .clk, .rst, .en(enables.fine), .t_fine,
    .phase(pll_phase), .reconfig(pll_reconfig), .busy(pll_busy),
    .ready(fine_ready)
  );

endmodule
