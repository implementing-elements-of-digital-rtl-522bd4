// fine_delay_ctrl: sets the phases of the three fine-delay PLLs from T_fine.
//
// T_fine is the wanted fine delay in 125 ps steps.  It is clipped to
// 0 .. STEPS-1 (one clock period less one step; whole periods belong to the
// coarse delay) and forced to 0 when the fine delay is disabled.  The PLL
// phases (lag behind the main clock, in 125 ps steps) are then
//   clk_left  : 0
//   clk_right : T_fine + 2
//   clk_mid   : (T_fine + 2) / 2, rounded down
// so clk_mid always lies strictly between clk_left and clk_right and no two
// neighbouring clocks ever share an edge (the extra 2 steps, 250 ps, are a
// fixed part of the electronics delay).  Neighbouring clocks are at most
// 5 ns apart and the span is at most one 10 ns period, as in the original
// design, except at T_fine = 79 (5.125 ns and 10.125 ns), kept so that
// coarse and fine steps together reach every 125 ps delay.  The
// PLL-to-PLL split and the offset are choices of this implementation.
//
// Whenever a target differs from what the PLL was last loaded with, the
// controller loads the PLLs one at a time, lowest index first: it holds
// the phase on phase[i], pulses reconfig[i] for one clock cycle, waits one
// cycle and then waits until the reconfiguration logic drops busy[i].
// A PLL that is still busy (e.g. from before reset) is not sent a new
// request until it is idle.  ready is high while all three PLLs hold the
// current targets.  After reset
// all three PLLs are loaded.
`timescale 1ns / 1ps
module fine_delay_ctrl #(
  parameter int unsigned PW    = tfb_pkg::PHASE_W,
  parameter int unsigned STEPS = tfb_pkg::FINE_STEPS,
  parameter int unsigned NP    = tfb_pkg::N_PLL
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic [PW-1:0]       t_fine,
  output logic [NP-1:0][PW-1:0] phase,
  output logic [NP-1:0]       reconfig,
  input  logic [NP-1:0]       busy,
  output logic                ready
);

  typedef enum logic [1:0] {S_IDLE, S_PULSE, S_GAP, S_WAIT} state_e;

  state_e                  state;
  logic [PW-1:0]           eff;
  logic [NP-1:0][PW-1:0]   target;
  logic [NP-1:0][PW-1:0]   loaded;
  logic [NP-1:0]           loaded_ok;
  logic [NP-1:0]           stale;
  logic [$clog2(NP)-1:0]   sel;
  logic [$clog2(NP)-1:0]   next_sel;

  always_comb begin
    if (!en)                    eff = '0;
    else if (t_fine >= PW'(STEPS)) eff = PW'(STEPS - 1);
    else                        eff = t_fine;
    target         = '0;
    target[NP-1]   = eff + PW'(2);
    target[NP/2]   = target[NP-1] >> 1;
  end

  always_comb begin
    next_sel = '0;
    for (int i = NP - 1; i >= 0; i--) begin
      stale[i] = !loaded_ok[i] || (loaded[i] != target[i]);
      if (stale[i]) next_sel = ($clog2(NP))'(i);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      sel       <= '0;
      phase     <= '0;
      reconfig  <= '0;
      loaded    <= '0;
      loaded_ok <= '0;
    end else begin
      reconfig <= '0;
      unique case (state)
        S_IDLE: if (stale != '0 && !busy[next_sel]) begin
          sel             <= next_sel;
          phase[next_sel] <= target[next_sel];
          reconfig[next_sel] <= 1'b1;
          state           <= S_PULSE;
        end
        S_PULSE: state <= S_GAP;
        S_GAP:   state <= S_WAIT;
        S_WAIT: if (!busy[sel]) begin
          loaded[sel]    <= phase[sel];
          loaded_ok[sel] <= 1'b1;
          state          <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE) && (stale == '0);

  // A reconfiguration request is only issued to an idle PLL.
  a_reconfig_idle: assert property (@(posedge clk) disable iff (rst)
    reconfig[sel] |-> $past(!busy[sel]));
  // Only one PLL is reconfigured at a time.
  a_reconfig_onehot: assert property (@(posedge clk) disable iff (rst)
    $onehot0(reconfig));

endmodule
