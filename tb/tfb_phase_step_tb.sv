// tfb_phase_step_tb: phase response of the whole chain when the delay is
// switched from 0 to 25 ns (20 ns coarse + 5 ns fine).
//
// A 1 MHz sine of amplitude 1500 is fed to BPM 2 (b1 = 0, b2 = 1.0, notch
// filters off).  For each delay setting the testbench collects 1000 DAC
// samples (ten periods) together with the exact times of the clk_right
// edges that launch them, correlates them with sine and cosine of those
// times and so measures the output phase in continuous time.  Switching
// from T_COARSE = 0, T_FINE = 0 to T_COARSE = 2, T_FINE = 40 must move the
// phase by -360 deg * 1 MHz * 25 ns = -9 deg (within 0.05 deg), and the
// amplitude must not change.  A 0.5 MHz and a 1.5 MHz tone are checked the
// same way (-4.5 and -13.5 deg), i.e. the step is a pure time delay.
`timescale 1ns / 1ps
module tfb_phase_step_tb;
  import tfb_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam int  NWIN = 1000, AMP = 1500;

  logic clk = 0, rst = 1;
  logic signed [ADC_W-1:0] adc1 = '0, adc2 = '0;
  logic [2:0]  address = '0;
  logic        write = 0, read = 0;
  logic [31:0] writedata = '0, readdata;
  logic        readdatavalid;
  logic        clk_left, clk_mid, clk_right;
  logic [N_PLL-1:0][PHASE_W-1:0] pll_phase, applied;
  logic [N_PLL-1:0] pll_reconfig, pll_busy;
  logic [N_PLL-1:0] pll_clk;
  logic signed [DATA_W-1:0] dac;

  int  checks = 0, failures = 0;
  int  edge_cnt = 0;
  real freq = 1.0e6;
  bit  collecting = 0;
  int  ncol = 0;
  real acc_s = 0.0, acc_c = 0.0;

  tfb_dsp_top dut (.*);

  for (genvar i = 0; i < N_PLL; i++) begin : g_pll
    pll_phase_model #(.PW(PHASE_W)) u_pll (
      .clk_in(clk), .phase(pll_phase[i]), .reconfig(pll_reconfig[i]),
      .busy(pll_busy[i]), .clk_out(pll_clk[i]), .applied_phase(applied[i]));
  end
  assign clk_left  = pll_clk[0];
  assign clk_mid   = pll_clk[1];
  assign clk_right = pll_clk[2];

  always #5 clk = ~clk;
  always @(posedge clk) edge_cnt++;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // sine sampled by the ADC at main clock edge edge_cnt (time 5 + 10*j ns)
  always @(negedge clk) begin
    real t;
    t = (5.0 + 10.0 * real'(edge_cnt)) * 1.0e-9;
    adc2 = ADC_W'($rtoi($floor(real'(AMP) * $sin(2.0 * PI * freq * t) + 0.5)));
  end

  // the DAC word launched at a clk_right edge holds until the next one
  always @(posedge clk_right) begin
    real t;
    #0.001;
    t = ($realtime - 0.001) * 1.0e-9;
    if (collecting && ncol < NWIN) begin
      acc_s += real'(dac) * $sin(2.0 * PI * freq * t);
      acc_c += real'(dac) * $cos(2.0 * PI * freq * t);
      ncol++;
    end
  end

  task automatic bus_write(input reg_addr_e a, input int d);
    @(negedge clk);
    address = a; writedata = d; write = 1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic wait_ready();
    logic [31:0] st;
    do begin
      @(negedge clk);
      address = REG_STATUS; read = 1;
      @(negedge clk);
      read = 0;
      st = readdata;
    end while (st[0] !== 1'b1);
  endtask

  task automatic measure(input int tc, input int tf, output real ph, output real amp);
    bus_write(REG_T_COARSE, tc);
    bus_write(REG_T_FINE, tf);
    wait_ready();
    repeat (50) @(negedge clk);
    acc_s = 0.0; acc_c = 0.0; ncol = 0;
    collecting = 1;
    wait (ncol == NWIN);
    collecting = 0;
    ph  = $atan2(acc_c, acc_s) * 180.0 / PI;
    amp = 2.0 * $sqrt(acc_s * acc_s + acc_c * acc_c) / real'(NWIN);
  endtask

  function automatic real wrap(real a);
    while (a > 180.0) a -= 360.0;
    while (a <= -180.0) a += 360.0;
    return a;
  endfunction

  initial begin
    real fl [] = '{1.0e6, 0.5e6, 1.5e6};
    real ph0, ph1, a0, a1, step, step_exp;
    repeat (4) @(negedge clk);
    rst = 0;
    bus_write(REG_B1, 0);
    bus_write(REG_B2, 1 << COEF_FRAC);
    bus_write(REG_T_REV, 50);
    bus_write(REG_ENABLE, 6);   // coarse and fine delay on, notch off
    foreach (fl[i]) begin
      freq = fl[i];
      measure(0, 0, ph0, a0);
      measure(2, 40, ph1, a1);
      step = wrap(ph1 - ph0);
      step_exp = -360.0 * freq * 25.0e-9;
      $display("f = %4.2f MHz: phase %8.3f -> %8.3f deg, step %7.3f deg (expected %7.3f), amplitude %7.1f -> %7.1f",
               freq / 1.0e6, ph0, ph1, step, step_exp, a0, a1);
      checks++;
      if (step - step_exp > 0.05 || step_exp - step > 0.05) begin
        failures++;
        $display("  phase step out of tolerance");
      end
      checks++;
      if (a1 - a0 > 1.0 || a0 - a1 > 1.0 || a0 < 0.98 * AMP) begin
        failures++;
        $display("  amplitude changed or lost");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
