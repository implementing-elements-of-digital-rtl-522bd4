// coef_mixer_tb: self-checking test of the b1/b2 weighting and sum.
//
// Inputs and coefficients change every cycle: random full-scale values,
// unit gain (b1 = 1.0, b2 = 0 and the reverse), cos/sin weights of a set of
// phases and large gains that drive the sum into saturation.  The expected
// output, sat(floor((x1*b1 + x2*b2) / 2**16)), is computed with 64-bit
// integers and compared two cycles later (the block's latency).
`timescale 1ns / 1ps
module coef_mixer_tb;
  localparam int W = 14, CW = 18, CF = 16, N = 20000;

  logic                 clk = 0, rst = 1;
  logic signed [W-1:0]  x1 = '0, x2 = '0;
  logic signed [CW-1:0] b1 = '0, b2 = '0;
  logic signed [W-1:0]  y;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;
  longint exp_q [$];

  coef_mixer #(.W(W), .CW(CW), .CF(CF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(20 * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(longint a1, longint a2, longint c1, longint c2);
    longint s;
    s = (a1 * c1 + a2 * c2) >>> CF;
    if (s > 2**(W-1) - 1) s = 2**(W-1) - 1;
    if (s < -(2**(W-1))) s = -(2**(W-1));
    return s;
  endfunction

  initial begin
    longint e, raw;
    real ph;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      if (exp_q.size() == 2) begin
        e = exp_q.pop_front();
        checks++;
        if (longint'(y) != e) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %0d expected %0d", n, y, e);
        end
      end
      x1 = W'($urandom);
      x2 = W'($urandom);
      case (n % 5)
        0: begin b1 = CW'($urandom); b2 = CW'($urandom); end
        1: begin b1 = CW'(1 << CF); b2 = '0; end
        2: begin b1 = '0; b2 = CW'(1 << CF); end
        3: begin
          ph = 6.283185307 * real'($urandom_range(0, 359)) / 360.0;
          b1 = CW'($rtoi($cos(ph) * 65535.0));
          b2 = CW'($rtoi($sin(ph) * 65535.0));
        end
        default: begin b1 = CW'(-(2**(CW-1))); b2 = CW'(2**(CW-1) - 1); end
      endcase
      raw = (longint'(x1) * longint'(b1) + longint'(x2) * longint'(b2)) >>> CF;
      if (raw > 2**(W-1) - 1) sat_hi++;
      if (raw < -(2**(W-1))) sat_lo++;
      exp_q.push_back(model(longint'(x1), longint'(x2), longint'(b1), longint'(b2)));
    end
    if (sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("saturation not exercised");
    end
    $display("saturated high %0d low %0d", sat_hi, sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
