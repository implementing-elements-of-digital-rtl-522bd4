// notch_response_tb: frequency response of the notch filter at a 2 MHz
// revolution frequency, 0.5 .. 5 MHz.
//
// At 100 MHz sampling a 2 MHz revolution is T_rev = 50 cycles.  For each
// test frequency a sine of amplitude 2000 is filtered; after the filter has
// settled, the output is correlated with sine and cosine over 1000 samples
// (a whole number of periods) to get its gain and phase, referred to the
// input sample it belongs to (the filter's two-cycle latency removed).
// Expected: gain 2|sin(pi f / f_rev)| (zero at the revolution harmonics,
// +6 dB half way between them) and phase 90 deg - 180 deg * f / f_rev,
// wrapped to +-180 deg, i.e. a sawtooth that jumps by 180 deg at every
// harmonic.
`timescale 1ns / 1ps
module notch_response_tb;
  localparam int W = 14, AW = 10, TREV = 50, NWIN = 1000, AMP = 2000;
  localparam real PI = 3.14159265358979;
  localparam real FS = 100.0e6, FREV = 2.0e6;

  logic                clk = 0, rst = 1, en = 1;
  logic [AW-1:0]       t_rev = AW'(TREV);
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] dout;
  int checks = 0, failures = 0, nulls = 0, peaks = 0;

  notch_filter #(.W(W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real wrap(real a);
    while (a > 180.0) a -= 360.0;
    while (a <= -180.0) a += 360.0;
    return a;
  endfunction

  task automatic measure(input real f);
    real w, si, co, gain, ph, g_exp, ph_exp;
    int n;
    w = 2.0 * PI * f / FS;
    si = 0.0;
    co = 0.0;
    n = 0;
    for (int i = 0; i < 200 + NWIN + 2; i++) begin
      @(negedge clk);
      // output now belongs to the input of two cycles earlier
      if (i >= 202 && i < 202 + NWIN) begin
        si += real'(dout) * $sin(w * real'(i - 2));
        co += real'(dout) * $cos(w * real'(i - 2));
        n++;
      end
      din = W'($rtoi($floor(real'(AMP) * $sin(w * real'(i)) + 0.5)));
    end
    gain   = 2.0 * $sqrt(si * si + co * co) / real'(n) / real'(AMP);
    ph     = $atan2(co, si) * 180.0 / PI;
    g_exp  = 2.0 * $sin(PI * f / FREV);
    if (g_exp < 0.0) g_exp = -g_exp;
    ph_exp = wrap(90.0 - 180.0 * f / FREV);
    if (g_exp > 1.0e-6 && $sin(PI * f / FREV) < 0.0) ph_exp = wrap(ph_exp + 180.0);
    $display("f = %4.2f MHz  gain %6.3f (expected %6.3f)  %7.2f dB  phase %7.2f deg (expected %7.2f)",
             f / 1.0e6, gain, g_exp, 20.0 * $log10(gain + 1.0e-9), ph, ph_exp);
    checks++;
    if (gain - g_exp > 0.005 || g_exp - gain > 0.005) begin
      failures++;
      $display("  gain out of tolerance");
    end
    if (g_exp < 1.0e-3) nulls++;
    if (g_exp > 1.99) peaks++;
    if (g_exp > 0.1) begin
      checks++;
      if (wrap(ph - ph_exp) > 0.5 || wrap(ph - ph_exp) < -0.5) begin
        failures++;
        $display("  phase out of tolerance");
      end
    end
  endtask

  initial begin
    real freqs [] = '{0.5e6, 0.8e6, 1.0e6, 1.5e6, 2.0e6, 2.5e6, 3.0e6, 3.3e6, 4.0e6, 4.5e6, 5.0e6};
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (freqs[i]) measure(freqs[i]);
    if (nulls != 2 || peaks != 3) begin
      failures++;
      $display("expected 2 notches and 3 +6 dB peaks, saw %0d and %0d", nulls, peaks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
