// pulsed_latch_shift_reg: low-area N-bit shift register built from pulsed
// latches instead of flip-flops.
//
// A single pulsed clock cannot drive a chain of latches: while it is high,
// data would race through several transparent latches. Here every shift is
// done by K+1 short, non-overlapping pulses applied in the reverse order of
// the data flow, so each latch reads its neighbour before that neighbour is
// overwritten. To keep the number of pulses small, the N latches are split
// into M = N/K sub shift registers of K latches that share the same pulses;
// each sub shift register ends in one extra temporary storage latch that
// keeps its last word for the next sub shift register. Cost: N + N/K latches
// and K+1 clock-pulse circuits.
//
// The pulses come from one of two sources, chosen by PULSE_GEN:
//   PGEN_DELAY_LINE (default): the delay/inverter/AND clock-pulse chain of
//     the architecture. clk is the shift clock; each rising edge starts one
//     shift. This source is a timing model and is not synthesizable.
//   PGEN_SEQUENCER: a synthesizable counter-based sequencer. clk is then a
//     fast clock and one shift takes 2*(K+1) of its cycles.
//
// Interface: din is the serial input word; q[j] is data latch Q(j+1), q[0]
// the newest word; t[m] is the temporary latch of sub shift register m+1;
// dout = q[N-1]; pulse shows the pulsed clocks (pulse[0] = CLK_pulse<T>,
// pulse[i] = CLK_pulse<i>); main_clk is the shift clock (clk itself with the
// delay line, the derived slow clock with the sequencer). rst is an
// asynchronous, active-high clear of all latches and of the sequencer.
//
// Timing: a word on din appears in q[0] after one shift and at dout after N
// shifts. din is sampled while CLK_pulse<1> is high, the last pulse of a
// shift, and may change at the rising edge of main_clk. With the delay line
// the clk period must exceed (K+1)*(DELAY_PS + 2*INV_PS).
//
// N = 256 and K = 4 are the architecture's main configuration; the one-bit
// word, the reset and the sequencer option are this design's choices.
module pulsed_latch_shift_reg
  import pls_pkg::*;
#(
  parameter int unsigned N         = 256,
  parameter int unsigned K         = 4,
  parameter int unsigned WIDTH     = 1,
  parameter pulse_gen_e  PULSE_GEN = PGEN_DELAY_LINE,
  parameter int unsigned DELAY_PS  = 40,
  parameter int unsigned INV_PS    = 5,
  parameter int unsigned BUF_PS    = 5,
  localparam int unsigned M        = N / K
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [WIDTH-1:0]        din,
  output logic [N-1:0][WIDTH-1:0] q,
  output logic [M-1:0][WIDTH-1:0] t,
  output logic [WIDTH-1:0]        dout,
  output logic [K:0]              pulse,
  output logic                    main_clk
);
  timeunit 1ps;
  timeprecision 1ps;

  if (PULSE_GEN == PGEN_DELAY_LINE) begin : g_delay_line
    delayed_pulse_clock_gen #(
      .K       (K),
      .DELAY_PS(DELAY_PS),
      .INV_PS  (INV_PS),
      .BUF_PS  (BUF_PS)
    ) u_gen (
      .clk  (clk),
      .pulse(pulse)
    );
    assign main_clk = clk;
  end else begin : g_sequencer
    pulse_sequencer #(.K(K)) u_gen (
      .clk     (clk),
      .rst     (rst),
      .pulse   (pulse),
      .main_clk(main_clk)
    );
  end

  latch_shift_array #(.N(N), .K(K), .WIDTH(WIDTH)) u_array (
    .rst  (rst),
    .pulse(pulse),
    .din  (din),
    .q    (q),
    .t    (t),
    .dout (dout)
  );
endmodule
