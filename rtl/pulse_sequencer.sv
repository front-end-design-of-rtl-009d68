// pulse_sequencer: synchronous, synthesizable source of the K+1
// non-overlapping pulsed clocks, derived from a fast clock.
//
// A phase counter runs through 2*(K+1) fast-clock cycles per shift. In the
// even phases 0, 2, ..., 2K exactly one pulse is high, in the order
// CLK_pulse<T>, CLK_pulse<K>, ..., CLK_pulse<1>; the odd phases are gaps with
// every pulse low, so no two pulses are ever high in the same or in
// neighbouring cycles. All outputs come straight from flip-flops and are
// glitch-free.
//
// Interface: clk is the fast clock, rst an asynchronous active-high reset
// that stops all pulses and restarts at phase 0. pulse[0] is CLK_pulse<T>,
// pulse[i] is CLK_pulse<i>. main_clk is the resulting shift clock: high in
// phases 0..K, low in phases K+1..2K+1.
//
// Timing: one shift every 2*(K+1) cycles of clk. CLK_pulse<1>, which samples
// the shift register input, is high in phase 2K, so the input may change on
// the rising edge of main_clk. The pulse order follows the architecture;
// generating it from a fast clock with a counter (the simulated design runs
// from signals named Clk, Main_Clk and A1..A5) and the gap phases are this
// design's choices.
module pulse_sequencer #(
  parameter int unsigned K = 4,
  localparam int unsigned PHASES = 2 * (K + 1),
  localparam int unsigned PW     = $clog2(PHASES)
) (
  input  logic       clk,
  input  logic       rst,
  output logic [K:0] pulse,
  output logic       main_clk
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [PW-1:0] phase, phase_next;
  logic [K:0]    pulse_next;

  always_comb begin
    phase_next = (phase == PW'(PHASES - 1)) ? '0 : phase + 1'b1;
    pulse_next = '0;
    if (!phase_next[0]) begin
      // Step s of the sequence: s = 0 is T, s >= 1 is pulse K+1-s.
      if (phase_next == '0) pulse_next[0] = 1'b1;
      else                  pulse_next[K + 1 - 32'(phase_next >> 1)] = 1'b1;
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase    <= PW'(PHASES - 1);   // the first phase after reset is 0
      pulse    <= '0;
      main_clk <= 1'b0;
    end else begin
      phase    <= phase_next;
      pulse    <= pulse_next;
      main_clk <= (32'(phase_next) <= K);
    end
  end
endmodule
