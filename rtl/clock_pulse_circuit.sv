// clock_pulse_circuit: behavioural (timing) model of one clock-pulse circuit
// of the delayed pulsed clock generator. It is not synthesizable logic: its
// function rests on the propagation delays written here.
//
// The incoming clock passes through a delay element and two inverters. The
// node after the first inverter is the delayed, inverted clock; an AND gate
// combines it with the undelayed clock, so a pulse appears at each rising
// edge of clk_in and lasts DELAY_PS + INV_PS. The pulse drives its latches
// through a clock buffer. The node after the second inverter is the delayed
// clock handed to the next circuit of the chain; it rises one inverter delay
// after this circuit's AND output has fallen, so neighbouring pulses never
// overlap. Because the pulse is shaped by an AND gate from two delayed
// signals, it can be narrower than the summed edge times of the delay chain.
//
// Interface: clk_in (CLK or CLK<i>), pulse (CLK_pulse<...> after the clock
// buffer), clk_out (CLK<i+1>).
//
// Timing: pulse rises BUF_PS after clk_in rises and is DELAY_PS + INV_PS
// wide; clk_out follows clk_in by DELAY_PS + 2*INV_PS. clk_in must stay high
// and low for longer than DELAY_PS. The structure follows the architecture;
// the delay values are this model's own (the architecture gives none).
module clock_pulse_circuit #(
  parameter int unsigned DELAY_PS = 40,
  parameter int unsigned INV_PS   = 5,
  parameter int unsigned BUF_PS   = 5
) (
  input  logic clk_in,
  output logic pulse,
  output logic clk_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic clk_dly;     // output of the delay element
  logic clk_dly_n;   // after the first inverter
  logic and_out;     // AND gate output, before the clock buffer

  assign #(DELAY_PS) clk_dly   = clk_in;
  assign #(INV_PS)   clk_dly_n = ~clk_dly;
  assign #(INV_PS)   clk_out   = ~clk_dly_n;
  assign             and_out   = clk_in & clk_dly_n;
  assign #(BUF_PS)   pulse     = and_out;
endmodule
