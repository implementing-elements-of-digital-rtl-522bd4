// fine_delay_ctrl_tb: self-checking test of the fine delay controller.
//
// The controller drives three PLL models through their reconfiguration
// handshake.  After reset and after each new T_fine or enable setting the
// testbench waits for ready and checks that the phases the PLLs apply are
// 0, (e + 2) / 2 and e + 2, with e = T_fine clipped to 79 (0 when the fine
// delay is disabled), that only PLLs whose phase changed were reloaded,
// that ready was low while a reload was pending, and that an update of a
// single PLL takes the expected number of cycles (pulse, gap and the busy
// time of the model).
`timescale 1ns / 1ps
module fine_delay_ctrl_tb;
  localparam int PW = 7, NP = 3, BUSY = 6;

  logic clk = 0, rst = 1, en = 1;
  logic [PW-1:0] t_fine = '0;
  logic [NP-1:0][PW-1:0] phase;
  logic [NP-1:0] reconfig, busy;
  logic [NP-1:0] pll_clk;
  logic [NP-1:0][PW-1:0] applied;
  logic ready;
  int checks = 0, failures = 0;
  int pulses [NP];
  int clipped = 0, disabled = 0;

  fine_delay_ctrl #(.PW(PW), .STEPS(80), .NP(NP)) dut (.*);

  for (genvar i = 0; i < NP; i++) begin : g_pll
    pll_phase_model #(.PW(PW), .BUSY_CYCLES(BUSY)) u_pll (
      .clk_in(clk), .phase(phase[i]), .reconfig(reconfig[i]), .busy(busy[i]),
      .clk_out(pll_clk[i]), .applied_phase(applied[i]));
    always @(posedge clk) if (reconfig[i] && !rst) pulses[i]++;
  end

  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  // apply a setting, wait for ready, check phases, reload counts and time
  task automatic apply(input bit e, input int tf);
    int prev_pulses [NP];
    int eff, exp_ph [NP], old_ph [NP], changed, cycles;
    foreach (prev_pulses[i]) prev_pulses[i] = pulses[i];
    foreach (old_ph[i]) old_ph[i] = int'(applied[i]);
    @(negedge clk);
    en = e;
    t_fine = PW'(tf);
    eff = !e ? 0 : (tf > 79 ? 79 : tf);
    if (!e) disabled++;
    if (e && tf > 79) clipped++;
    exp_ph[0] = 0;
    exp_ph[2] = eff + 2;
    exp_ph[1] = (eff + 2) / 2;
    changed = 0;
    foreach (exp_ph[i]) if (exp_ph[i] != old_ph[i]) changed++;
    @(negedge clk);
    if (changed > 0) check("ready low while reloading", int'(ready), 0);
    cycles = 1;
    while (!ready) begin
      @(negedge clk);
      cycles++;
    end
    // per PLL: one cycle to issue, pulse, gap, BUSY cycles busy
    if (changed > 0) check("update time", cycles, changed * (BUSY + 3));
    repeat (2) @(negedge clk);
    foreach (exp_ph[i]) begin
      check($sformatf("PLL %0d phase", i), int'(applied[i]), exp_ph[i]);
      check($sformatf("PLL %0d reloads", i), pulses[i] - prev_pulses[i],
            (exp_ph[i] != old_ph[i]) ? 1 : 0);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // after reset every PLL is loaded once
    while (!ready) @(negedge clk);
    repeat (2) @(negedge clk);
    foreach (pulses[i]) check($sformatf("PLL %0d loaded after reset", i), pulses[i], 1);
    check("reset phase mid", int'(applied[1]), 1);
    check("reset phase right", int'(applied[2]), 2);
    apply(1, 40);    // 5 ns
    apply(1, 41);    // only clk_right moves
    apply(1, 79);
    apply(1, 100);   // clipped to 79: nothing to do
    apply(1, 127);
    apply(0, 60);    // disabled: back to 0
    apply(1, 1);
    apply(1, 24);
    for (int i = 0; i < 10; i++) apply(1, $urandom_range(0, 90));
    if (clipped == 0 || disabled == 0) begin
      failures++;
      $display("clipping or disable not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
