// tfb_pkg: widths, types and the register map shared by the transverse
// feedback signal-processing modules.
//
// The sample width of 14 bits is the datapath width of the original coarse
// delay, fine delay and notch filter and equals the DAC resolution; the
// 12-bit ADC words are sign-extended into it.  The 10-bit address (1024-word
// delay memories) and the 125 ps fine-delay step (1/8 of a 1 ns VCO period,
// 80 steps per 10 ns clock period) also come from the design description.
// The coefficient format (18-bit signed, 16 fraction bits, to match an
// 18x18 multiplier), the enable bit order and the register map are choices
// of this implementation.
`timescale 1ns / 1ps
package tfb_pkg;

  localparam int unsigned ADC_W      = 12;  // ADC resolution
  localparam int unsigned DATA_W     = 14;  // internal sample and DAC width
  localparam int unsigned ADDR_W     = 10;  // 1024-word delay memories
  localparam int unsigned COEF_W     = 18;  // b1, b2 width (18x18 multipliers)
  localparam int unsigned COEF_FRAC  = 16;  // fraction bits of b1, b2
  localparam int unsigned PHASE_W    = 7;   // PLL phase setting, 125 ps steps
  localparam int unsigned FINE_STEPS = 80;  // 125 ps steps in one 10 ns clock
  localparam int unsigned N_PLL      = 3;   // clk_left, clk_mid, clk_right

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic [ADDR_W-1:0]        cycles_t;
  typedef logic [PHASE_W-1:0]       phase_t;

  // Enables of the individual DSP elements, as switched from the host.
  typedef struct packed {
    logic fine;    // bit 2
    logic coarse;  // bit 1
    logic notch;   // bit 0
  } enables_t;

  // Word addresses of the memory-mapped control registers.
  typedef enum logic [2:0] {
    REG_B1       = 3'd0,
    REG_B2       = 3'd1,
    REG_T_REV    = 3'd2,
    REG_T_COARSE = 3'd3,
    REG_T_FINE   = 3'd4,
    REG_ENABLE   = 3'd5,
    REG_T_BPM    = 3'd6,
    REG_STATUS   = 3'd7
  } reg_addr_e;

endpackage
