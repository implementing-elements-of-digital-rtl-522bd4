// fine_delay_path_tb: self-checking test of the phase-shifted clock-domain
// chain of the fine delay.
//
// The main clock (10 ns) feeds three PLL models; the testbench reprograms
// clk_mid and clk_right to lags phi_r = T_fine + 2 and phi_m = phi_r / 2
// (in 125 ps steps) for a range of T_fine values, clk_left staying at 0.
// A new sample enters on every main clock edge.  At every clk_right edge
// the output is checked against the sample of main clock edge k with
// (k + 4) * 10 ns + phi_r * 125 ps equal to the time of that edge, so both
// the data and the exact time of arrival are verified.  The testbench also
// checks that the output edge times differ between settings by exactly the
// change in phase.
`timescale 1ns / 1ps
module fine_delay_path_tb;
  localparam int W = 14, PW = 7, NK = 20000;
  localparam longint T_PS = 10000, STEP_PS = 125, T0_PS = 5000;

  logic         clk = 0;
  logic         clk_left, clk_mid, clk_right;
  logic [W-1:0] din = '0, dout;
  logic [PW-1:0] ph_l = '0, ph_m = '0, ph_r = '0;
  logic [PW-1:0] ap_l, ap_m, ap_r;
  logic         rc_l = 0, rc_m = 0, rc_r = 0;
  logic         bz_l, bz_m, bz_r;
  int           checks = 0, failures = 0, settings = 0;
  logic [W-1:0] val [NK];
  int           kidx = 0;
  bit           checking = 0;

  fine_delay_path #(.W(W)) dut (.*);

  pll_phase_model #(.PW(PW)) u_pll_l (.clk_in(clk), .phase(ph_l), .reconfig(rc_l),
    .busy(bz_l), .clk_out(clk_left), .applied_phase(ap_l));
  pll_phase_model #(.PW(PW)) u_pll_m (.clk_in(clk), .phase(ph_m), .reconfig(rc_m),
    .busy(bz_m), .clk_out(clk_mid), .applied_phase(ap_m));
  pll_phase_model #(.PW(PW)) u_pll_r (.clk_in(clk), .phase(ph_r), .reconfig(rc_r),
    .busy(bz_r), .clk_out(clk_right), .applied_phase(ap_r));

  always #5 clk = ~clk;

  // a new sample after every main clock edge k (edge k at T0 + k*T)
  always @(posedge clk) begin
    val[kidx] = W'($urandom);
    din <= val[kidx];
    kidx++;
  end

  initial begin
    #(20 * NK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output check on every clk_right edge while the phases are stable
  always @(posedge clk_right) begin
    longint t_ps, rem;
    int k;
    #0.001;
    if (checking) begin
      t_ps = longint'($realtime * 1000.0) - 1;
      rem  = t_ps - T0_PS - longint'(ap_r) * STEP_PS;
      k    = int'(rem / T_PS) - 4;
      checks++;
      if (rem % T_PS != 0) begin
        failures++;
        if (failures < 10) $display("clk_right edge at %0d ps off the expected phase", t_ps);
      end else if (k < 0 || dout !== val[k]) begin
        failures++;
        if (failures < 10)
          $display("t=%0d ps phi_r=%0d: got %h expected %h (k=%0d)", t_ps, ap_r, dout,
                   (k >= 0) ? val[k] : '0, k);
      end
    end
  end

  task automatic set_phase(input int t_fine);
    checking = 0;
    @(negedge clk);
    ph_m = PW'((t_fine + 2) / 2);
    ph_r = PW'(t_fine + 2);
    rc_m = 1;
    @(negedge clk) rc_m = 0;
    wait (!bz_m);
    @(negedge clk) rc_r = 1;
    @(negedge clk) rc_r = 0;
    wait (!bz_r);
    repeat (8) @(negedge clk);
    if (ap_m != ph_m || ap_r != ph_r) begin
      failures++;
      $display("phases not applied");
    end
    checking = 1;
    settings++;
  endtask

  initial begin
    int list [] = '{0, 1, 2, 7, 38, 40, 41, 63, 78, 79, 24, 0};
    repeat (4) @(negedge clk);
    foreach (list[i]) begin
      set_phase(list[i]);
      repeat (60) @(negedge clk);
    end
    checking = 0;
    $display("phase settings tested: %0d", settings);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
