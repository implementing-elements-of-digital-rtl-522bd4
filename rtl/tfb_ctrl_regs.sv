// tfb_ctrl_regs: memory-mapped I/O ports between the control processor and
// the signal processing.
//
// The control application running on the embedded processor computes the
// mixing coefficients and the delays for the present revolution frequency
// and writes them here; the signal processing reads them continuously.
// The bus is a simple Avalon-MM style slave: 32-bit words, word address,
// write and read strobes, read data valid one cycle after read.
//
// Register map (word address: contents, reset value):
//   0 B1        [17:0]  signed coefficient b1, 16 fraction bits   0
//   1 B2        [17:0]  signed coefficient b2, 16 fraction bits   0
//   2 T_REV     [9:0]   revolution period, clock cycles            0
//   3 T_COARSE  [9:0]   coarse delay, clock cycles                 0
//   4 T_FINE    [6:0]   fine delay, 125 ps steps                   0
//   5 ENABLE    [2:0]   bit 0 notch filters, bit 1 coarse delay,
//                       bit 2 fine delay                           0
//   6 T_BPM     [9:0]   delay of BPM 1 (time of flight between the
//                       two BPMs), clock cycles                    0
//   7 STATUS    [0]     read only: fine delay PLLs hold T_FINE
// B1 and B2 read back sign-extended, other unused bits read as zero.  The list of values (b1, b2, T_rev, T_coarse,
// T_fine) and the three enables follow the design description; the
// addresses, field widths, reset values, the T_BPM register and the bus
// protocol are choices of this implementation.
`timescale 1ns / 1ps
module tfb_ctrl_regs
  import tfb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // bus slave
  input  logic [2:0]  address,
  input  logic        write,
  input  logic [31:0] writedata,
  input  logic        read,
  output logic [31:0] readdata,
  output logic        readdatavalid,
  // status in
  input  logic        fine_ready,
  // settings out
  output coef_t       b1,
  output coef_t       b2,
  output cycles_t     t_rev,
  output cycles_t     t_coarse,
  output phase_t      t_fine,
  output enables_t    enables,
  output cycles_t     t_bpm
);

  always_ff @(posedge clk) begin
    if (rst) begin
      b1       <= '0;
      b2       <= '0;
      t_rev    <= '0;
      t_coarse <= '0;
      t_fine   <= '0;
      enables  <= '0;
      t_bpm    <= '0;
    end else if (write) begin
      unique case (reg_addr_e'(address))
        REG_B1:       b1       <= writedata[COEF_W-1:0];
        REG_B2:       b2       <= writedata[COEF_W-1:0];
        REG_T_REV:    t_rev    <= writedata[ADDR_W-1:0];
        REG_T_COARSE: t_coarse <= writedata[ADDR_W-1:0];
        REG_T_FINE:   t_fine   <= writedata[PHASE_W-1:0];
        REG_ENABLE:   enables  <= writedata[2:0];
        REG_T_BPM:    t_bpm    <= writedata[ADDR_W-1:0];
        REG_STATUS:   ;
        default:      ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      readdata      <= '0;
      readdatavalid <= 1'b0;
    end else begin
      readdatavalid <= read;
      readdata      <= '0;
      if (read) begin
        unique case (reg_addr_e'(address))
          REG_B1:       readdata <= 32'(signed'(b1));
          REG_B2:       readdata <= 32'(signed'(b2));
          REG_T_REV:    readdata <= 32'(t_rev);
          REG_T_COARSE: readdata <= 32'(t_coarse);
          REG_T_FINE:   readdata <= 32'(t_fine);
          REG_ENABLE:   readdata <= 32'(enables);
          REG_T_BPM:    readdata <= 32'(t_bpm);
          REG_STATUS:   readdata <= 32'(fine_ready);
          default:      readdata <= '0;
        endcase
      end
    end
  end

  // The bus master never reads and writes in the same cycle.
  a_no_rw: assert property (@(posedge clk) disable iff (rst) !(read && write));

endmodule
