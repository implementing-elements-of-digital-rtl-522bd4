// notch_filter_tb: self-checking test of the one-turn notch filter.
//
// Three kinds of input are applied for several revolution periods T_rev:
// a closed-orbit offset plus a signal repeating every turn (the output must
// go to exactly zero once a full turn has passed), full-scale random
// samples (exercises saturation) and random samples with the filter
// bypassed.  Every output is compared with y[n+2] = sat(x[n] - x[n-T_rev])
// (or x[n] when bypassed), computed from the stored input history, which
// also checks the two-cycle latency.
`timescale 1ns / 1ps
module notch_filter_tb;
  localparam int W = 14, AW = 10, N = 12000, SEG = 1500;

  logic                clk = 0, rst = 1, en = 1;
  logic [AW-1:0]       t_rev = AW'(50);
  logic signed [W-1:0] din = '0;
  logic signed [W-1:0] dout;
  int checks = 0, failures = 0, saturations = 0, zero_turns = 0;
  int hist [N];
  int trev_hist [N];
  bit en_hist [N];
  int pattern [1024];

  notch_filter #(.W(W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(20 * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expected(int n);
    int d;
    if (!en_hist[n]) return hist[n];
    d = hist[n] - hist[n - trev_hist[n]];
    if (d > 2**(W-1) - 1) d = 2**(W-1) - 1;
    if (d < -(2**(W-1))) d = -(2**(W-1));
    return d;
  endfunction

  initial begin
    int src, seg, mode, exp_v;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      src = n - 2;
      if (src >= 0 && src - trev_hist[src] >= 0 && src % SEG > 2 && src % SEG < SEG - 1) begin
        exp_v = expected(src);
        checks++;
        if (en_hist[src] && trev_hist[src] > 0 &&
            (exp_v > 2**(W-1) - 2 || exp_v < -(2**(W-1)) + 1) &&
            (hist[src] - hist[src - trev_hist[src]] != exp_v))
          saturations++;
        if (en_hist[src] && (src / SEG) % 3 == 0 && exp_v == 0 && int'(dout) == 0)
          zero_turns++;
        if (int'(dout) != exp_v) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d T=%0d en=%0d: got %0d expected %0d", src,
                     trev_hist[src], en_hist[src], dout, exp_v);
        end
      end
      seg = n / SEG;
      mode = seg % 3;
      if (n % SEG == 0) begin
        t_rev = AW'((seg == 7) ? 1000 : $urandom_range(20, 400));
        en    = (mode != 2);
        foreach (pattern[i]) pattern[i] = $urandom_range(0, 1200) - 600;
      end
      case (mode)
        0: din = W'(1500 + pattern[n % int'(t_rev)]);   // offset + turn-periodic
        default: din = W'($urandom);                  // full scale
      endcase
      hist[n]      = int'(din);
      trev_hist[n] = int'(t_rev);
      en_hist[n]   = en;
    end
    if (saturations == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    if (zero_turns == 0) begin
      failures++;
      $display("turn-periodic input never rejected");
    end
    $display("saturations=%0d rejected=%0d", saturations, zero_turns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
