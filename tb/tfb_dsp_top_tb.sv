// tfb_dsp_top_tb: end-to-end test of the transverse feedback signal
// processing, at the design's default sizes.
//
// Two ADC streams (closed-orbit offset + betatron-like oscillation + noise,
// or full-scale noise) feed the top.  The testbench acts as the control
// processor: it writes b1, b2, T_rev, T_BPM, T_coarse, T_fine and the
// enables over the register bus, polls STATUS until the fine delay PLLs are
// set, lets the pipeline settle and then checks every DAC sample.  Three
// PLL models produce clk_left, clk_mid and clk_right from the main clock.
//
// Reference: with x1[j], x2[j] the ADC words sampled at main clock edge j,
//   n1(m) = x1[m-3-Tb] - x1[m-3-Tb-Tr]     (x1[m-3-Tb] with notch off)
//   n2(m) = x2[m-3]    - x2[m-3-Tr]
//   c(k)  = sat(floor((b1*n1(k-3-Tc) + b2*n2(k-3-Tc)) / 2**16))
// and c(k) must appear on the DAC at the clk_right edge at time
// (k + 4) * 10 ns + (T_fine + 2) * 125 ps after main clock edge 0, so the
// test checks values, cycle latency and the sub-cycle fine delay.  The
// configurations include the revolution frequencies 2 MHz, 1.5 MHz and
// 100 kHz, the 25 ns step (20 ns coarse + 5 ns fine) and a 253 ns delay.
// Each mechanism (notch on/off, orbit rejection, BPM delay, coarse on/off,
// fine on/off, fine clipping, mixer saturation, PLL reload, T_rev change)
// is counted and must occur at least once.
`timescale 1ns / 1ps
module tfb_dsp_top_tb;
  import tfb_pkg::*;

  localparam int     NX = 60000;
  localparam longint T_PS = 10000, STEP_PS = 125, T0_PS = 5000;

  typedef struct {
    string name;
    int b1, b2, trev, tbpm, tcoarse, tfine, en, mode, cycles;
  } seg_t;

  logic clk = 0, rst = 1;
  logic signed [ADC_W-1:0] adc1 = '0, adc2 = '0;
  logic [2:0]  address = '0;
  logic        write = 0, read = 0;
  logic [31:0] writedata = '0, readdata;
  logic        readdatavalid;
  logic        clk_left, clk_mid, clk_right;
  logic [N_PLL-1:0][PHASE_W-1:0] pll_phase, applied;
  logic [N_PLL-1:0] pll_reconfig, pll_busy;
  logic signed [DATA_W-1:0] dac;

  int checks = 0, failures = 0;
  int x1 [NX], x2 [NX];
  int edge_cnt = 0;
  bit checking = 0;
  seg_t cur;
  int mode = 0;

  // mechanism counters
  int n_notch_on = 0, n_notch_off = 0, n_reject = 0, n_bpm = 0;
  int n_coarse_on = 0, n_coarse_off = 0, n_fine_on = 0, n_fine_off = 0;
  int n_clip = 0, n_sat = 0, n_reload = 0, n_trev_change = 0;

  tfb_dsp_top dut (.*);

  for (genvar i = 0; i < N_PLL; i++) begin : g_pll
    pll_phase_model #(.PW(PHASE_W)) u_pll (
      .clk_in(clk), .phase(pll_phase[i]), .reconfig(pll_reconfig[i]),
      .busy(pll_busy[i]), .clk_out(), .applied_phase(applied[i]));
    always @(posedge clk) if (pll_reconfig[i] && !rst) n_reload++;
  end
  assign clk_left  = g_pll[0].u_pll.clk_out;
  assign clk_mid   = g_pll[1].u_pll.clk_out;
  assign clk_right = g_pll[2].u_pll.clk_out;

  always #5 clk = ~clk;
  always @(posedge clk) edge_cnt++;

  initial begin
    #(10 * NX);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC stimulus, sampled by the top at main clock edge edge_cnt
  always @(negedge clk) begin
    int j, osc1, osc2;
    j = edge_cnt;
    osc1 = $rtoi(700.0 * $cos(6.283185307 * 0.31 * real'(j)));
    osc2 = $rtoi(700.0 * $sin(6.283185307 * 0.31 * real'(j)));
    case (mode)
      0: begin   // orbit offset + oscillation + noise
        x1[j] = 900 + osc1 + $urandom_range(0, 64) - 32;
        x2[j] = -600 + osc2 + $urandom_range(0, 64) - 32;
      end
      1: begin   // pure closed-orbit offset
        x1[j] = 1234;
        x2[j] = -777;
      end
      default: begin   // full-scale noise
        x1[j] = $urandom_range(0, 4095) - 2048;
        x2[j] = $urandom_range(0, 4095) - 2048;
      end
    endcase
    adc1 = ADC_W'(x1[j]);
    adc2 = ADC_W'(x2[j]);
  end

  function automatic int xat(int a[NX], int i);
    return (i >= 0 && i < NX) ? a[i] : 0;
  endfunction

  function automatic int notch_ref(int a[NX], int i);
    if (!cur.en[0]) return xat(a, i);
    return xat(a, i) - xat(a, i - cur.trev);
  endfunction

  function automatic int expected(int k, output bit sat);
    int m, tc;
    longint s;
    tc = cur.en[1] ? cur.tcoarse : 0;
    m  = k - 3 - tc;
    s  = (longint'(cur.b1) * notch_ref(x1, m - 3 - cur.tbpm) +
          longint'(cur.b2) * notch_ref(x2, m - 3)) >>> COEF_FRAC;
    sat = 1'b1;
    if (s > 8191) return 8191;
    if (s < -8192) return -8192;
    sat = 1'b0;
    return int'(s);
  endfunction

  // DAC check on every clk_right edge
  always @(posedge clk_right) begin
    longint t_ps, rem;
    int k, e;
    bit sat;
    #0.001;
    if (checking) begin
      t_ps = longint'($realtime * 1000.0) - 1;
      rem  = t_ps - T0_PS - longint'(applied[2]) * STEP_PS;
      k    = int'(rem / T_PS) - 4;
      e    = expected(k, sat);
      checks++;
      if (rem % T_PS != 0 || int'(applied[2]) != fine_phase(cur)) begin
        failures++;
        if (failures < 10) $display("%s: DAC edge at %0d ps, wrong fine delay", cur.name, t_ps);
      end else if (int'(dac) != e) begin
        failures++;
        if (failures < 10)
          $display("%s: k=%0d got %0d expected %0d", cur.name, k, dac, e);
      end else begin
        if (sat) n_sat++;
        if (cur.en[0]) n_notch_on++; else n_notch_off++;
        if (cur.en[0] && cur.mode == 1 && e == 0) n_reject++;
        if (cur.tbpm > 0) n_bpm++;
        if (cur.en[1] && cur.tcoarse > 0) n_coarse_on++;
        if (!cur.en[1]) n_coarse_off++;
        if (cur.en[2] && cur.tfine > 0) n_fine_on++;
        if (!cur.en[2]) n_fine_off++;
        if (cur.en[2] && cur.tfine > 79) n_clip++;
      end
    end
  end

  function automatic int fine_phase(seg_t s);
    if (!s.en[2]) return 2;
    return ((s.tfine > 79) ? 79 : s.tfine) + 2;
  endfunction

  task automatic bus_write(input reg_addr_e a, input int d);
    @(negedge clk);
    address = a; writedata = d; write = 1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic bus_read(input reg_addr_e a, output logic [31:0] d);
    @(negedge clk);
    address = a; read = 1;
    @(negedge clk);
    read = 0;
    d = readdata;
  endtask

  task automatic run_segment(input seg_t s);
    logic [31:0] st;
    int settle;
    checking = 0;
    if (s.trev != cur.trev) n_trev_change++;
    cur.name = s.name;   // keep the old settings until the new ones are in
    bus_write(REG_B1, s.b1);
    bus_write(REG_B2, s.b2);
    bus_write(REG_T_REV, s.trev);
    bus_write(REG_T_BPM, s.tbpm);
    bus_write(REG_T_COARSE, s.tcoarse);
    bus_write(REG_T_FINE, s.tfine);
    bus_write(REG_ENABLE, s.en);
    mode = s.mode;
    cur = s;
    bus_read(REG_T_FINE, st);
    checks++;
    if (st != 32'(s.tfine)) begin
      failures++;
      $display("%s: T_FINE read back %0d", s.name, st);
    end
    do bus_read(REG_STATUS, st); while (st[0] !== 1'b1);
    settle = s.tbpm + s.trev + s.tcoarse + 40;
    repeat (settle) @(negedge clk);
    checking = 1;
    repeat (s.cycles) @(negedge clk);
    checking = 0;
  endtask

  localparam int ONE = 1 << COEF_FRAC;

  initial begin
    seg_t segs [$];
    // name, b1, b2, T_rev, T_BPM, T_coarse, T_fine, enables, stimulus, cycles
    segs.push_back('{"2 MHz, virtual pick-up 45 deg", 46341, 46341, 50, 3, 10, 0, 7, 0, 400});
    segs.push_back('{"2 MHz, orbit offset rejected", ONE, ONE, 50, 3, 10, 0, 7, 1, 300});
    segs.push_back('{"2 MHz, no delay (step reference)", ONE, 0, 50, 0, 0, 0, 3, 0, 300});
    segs.push_back('{"2 MHz, 25 ns: 20 ns coarse + 5 ns fine", ONE, 0, 50, 0, 2, 40, 7, 0, 300});
    segs.push_back('{"1.5 MHz, 253 ns delay", 30000, -50000, 67, 12, 25, 24, 7, 0, 400});
    segs.push_back('{"notch off", ONE, ONE / 2, 67, 12, 25, 24, 6, 0, 300});
    segs.push_back('{"coarse and fine off", ONE, -ONE, 67, 5, 300, 50, 1, 0, 300});
    segs.push_back('{"fine clipped", ONE, 0, 100, 0, 7, 100, 7, 0, 300});
    segs.push_back('{"saturation", 2 * ONE - 1, -2 * ONE, 80, 9, 4, 63, 7, 2, 400});
    segs.push_back('{"100 kHz, long delays", -ONE, ONE / 3, 1000, 250, 700, 79, 7, 0, 800});
    segs.push_back('{"maximum coarse delay", ONE, ONE, 1000, 1023, 1023, 0, 7, 2, 400});
    cur = '{"reset", 0, 0, 0, 0, 0, 0, 0, 0, 0};
    repeat (4) @(negedge clk);
    rst = 0;
    foreach (segs[i]) run_segment(segs[i]);
    $display("notch on %0d off %0d, orbit rejected %0d, bpm delay %0d", n_notch_on,
             n_notch_off, n_reject, n_bpm);
    $display("coarse on %0d off %0d, fine on %0d off %0d clipped %0d", n_coarse_on,
             n_coarse_off, n_fine_on, n_fine_off, n_clip);
    $display("saturated %0d, PLL reloads %0d, T_rev changes %0d", n_sat, n_reload,
             n_trev_change);
    if (n_notch_on == 0 || n_notch_off == 0 || n_reject == 0 || n_bpm == 0 ||
        n_coarse_on == 0 || n_coarse_off == 0 || n_fine_on == 0 || n_fine_off == 0 ||
        n_clip == 0 || n_sat == 0 || n_reload == 0 || n_trev_change == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("edges %0d", edge_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
