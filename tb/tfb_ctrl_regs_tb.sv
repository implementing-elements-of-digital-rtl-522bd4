// tfb_ctrl_regs_tb: self-checking test of the memory-mapped control
// registers.
//
// Checks the reset values, then writes random values to every register in
// random order and checks both the outputs to the signal processing and
// the read-back (one-cycle read latency, B1/B2 sign-extended, unused bits
// zero, STATUS following fine_ready and ignoring writes).
`timescale 1ns / 1ps
module tfb_ctrl_regs_tb;
  import tfb_pkg::*;

  logic clk = 0, rst = 1;
  logic [2:0] address = '0;
  logic write = 0, read = 0;
  logic [31:0] writedata = '0, readdata;
  logic readdatavalid;
  logic fine_ready = 0;
  coef_t b1, b2;
  cycles_t t_rev, t_coarse, t_bpm;
  phase_t t_fine;
  enables_t enables;
  int checks = 0, failures = 0;
  logic [31:0] model [8];

  tfb_ctrl_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic bus_write(input int a, input logic [31:0] d);
    @(negedge clk);
    address = 3'(a); writedata = d; write = 1;
    @(negedge clk);
    write = 0;
  endtask

  task automatic bus_read(input int a, output logic [31:0] d);
    @(negedge clk);
    address = 3'(a); read = 1;
    @(negedge clk);
    read = 0;
    check("readdatavalid", 32'(readdatavalid), 1);
    d = readdata;
    @(negedge clk);
    check("readdatavalid drops", 32'(readdatavalid), 0);
  endtask

  function automatic logic [31:0] masked(int a, logic [31:0] d);
    case (a)
      0, 1: return 32'(signed'(d[17:0]));
      2, 3, 6: return 32'(d[9:0]);
      4: return 32'(d[6:0]);
      5: return 32'(d[2:0]);
      default: return '0;
    endcase
  endfunction

  initial begin
    logic [31:0] d;
    int a;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 7; i++) begin
      bus_read(i, d);
      check($sformatf("reset value %0d", i), d, 0);
    end
    foreach (model[i]) model[i] = '0;
    for (int it = 0; it < 400; it++) begin
      a = $urandom_range(0, 7);
      d = $urandom;
      fine_ready = $urandom_range(0, 1);
      if ($urandom_range(0, 1)) begin
        bus_write(a, d);
        if (a != 7) model[a] = masked(a, d);
      end else begin
        bus_read(a, d);
        check($sformatf("read %0d", a), d, (a == 7) ? 32'(fine_ready) : model[a]);
      end
      check("b1", 32'(signed'(b1)), model[0]);
      check("b2", 32'(signed'(b2)), model[1]);
      check("t_rev", 32'(t_rev), model[2]);
      check("t_coarse", 32'(t_coarse), model[3]);
      check("t_fine", 32'(t_fine), model[4]);
      check("enables", 32'(enables), model[5]);
      check("t_bpm", 32'(t_bpm), model[6]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
