// delay_line_tb: self-checking test of the programmable RAM delay line.
//
// Random 14-bit samples are written every cycle while the delay setting is
// changed now and then (0, 1, the maximum 1023 and random values).  The
// testbench keeps the whole input history and expects the output after the
// clock edge of cycle n + delay to equal the input of cycle n, i.e. a
// latency of exactly delay + 1 clock edges.  Samples older than the start
// of the test (unknown RAM contents) are not checked.
`timescale 1ns / 1ps
module delay_line_tb;
  localparam int W = 14, AW = 10, N = 6000;

  logic          clk = 0, rst = 1;
  logic [W-1:0]  din = '0;
  logic [AW-1:0] delay = '0;
  logic [W-1:0]  dout;
  int            checks = 0, failures = 0;
  logic [W-1:0]  hist [N];
  int            dly_hist [N];

  delay_line #(.W(W), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(20 * N);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int src;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      // dout now holds the value chosen at the edge closing cycle n-1
      if (n > 0) begin
        src = (n - 1) - dly_hist[n-1];
        if (src >= 0) begin
          checks++;
          if (dout !== hist[src]) begin
            failures++;
            if (failures < 10)
              $display("cycle %0d delay %0d: got %h expected %h", n - 1,
                       dly_hist[n-1], dout, hist[src]);
          end
        end
      end
      if (n % 500 == 0) begin
        case ((n / 500) % 6)
          0: delay = AW'($urandom_range(2, 200));
          1: delay = '0;
          2: delay = AW'(1);
          3: delay = AW'(2**AW - 1);
          default: delay = AW'($urandom_range(0, 2**AW - 1));
        endcase
      end
      din         = W'($urandom);
      hist[n]     = din;
      dly_hist[n] = int'(delay);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
