// delayed_pulse_clock_gen: behavioural (timing) model of the delayed pulsed
// clock generator. Not synthesizable: it is a chain of delay-based
// clock-pulse circuits.
//
// K+1 clock-pulse circuits are chained: the first takes CLK, each later one
// takes the delayed clock CLK<i> of the one before. The first circuit makes
// CLK_pulse<T>, the following ones CLK_pulse<K>, CLK_pulse<K-1>, ...,
// CLK_pulse<1>. Every rising edge of clk therefore yields K+1 short pulses,
// one after the other and non-overlapping, in the reverse order of the
// latches they clock.
//
// Interface: pulse[0] is CLK_pulse<T>, pulse[i] is CLK_pulse<i> (1..K).
// The delayed clock leaving the last circuit drives nothing.
//
// Timing: the j-th pulse of a sequence (j = 0 for T) rises
// j*(DELAY_PS + 2*INV_PS) + BUF_PS after clk rises and lasts
// DELAY_PS + INV_PS. The whole sequence takes
// (K+1)*(DELAY_PS + 2*INV_PS) and must end before the next rising edge of
// clk; clk must stay high and low for longer than DELAY_PS. Assertions
// check these two rules on every clock edge.
module delayed_pulse_clock_gen #(
  parameter int unsigned K        = 4,
  parameter int unsigned DELAY_PS = 40,
  parameter int unsigned INV_PS   = 5,
  parameter int unsigned BUF_PS   = 5
) (
  input  logic       clk,
  output logic [K:0] pulse
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [K+1:0] clk_chain;   // clk_chain[j] feeds circuit j
  assign clk_chain[0] = clk;

  for (genvar j = 0; j <= K; j++) begin : g_stage
    // Circuit 0 drives CLK_pulse<T>; circuit j >= 1 drives CLK_pulse<K+1-j>.
    localparam int unsigned IDX = (j == 0) ? 0 : K + 1 - j;
    clock_pulse_circuit #(
      .DELAY_PS(DELAY_PS),
      .INV_PS  (INV_PS),
      .BUF_PS  (BUF_PS)
    ) u_cpc (
      .clk_in (clk_chain[j]),
      .pulse  (pulse[IDX]),
      .clk_out(clk_chain[j+1])
    );
  end

  // Timing rules of the chain, checked against simulation time.
  localparam int unsigned SWEEP_PS = (K + 1) * (DELAY_PS + 2 * INV_PS);
  localparam int unsigned PULSE_PS = DELAY_PS + INV_PS;
  time t_rise, t_fall;
  bit  seen_rise, seen_fall;

  initial begin
    seen_rise = 1'b0;
    seen_fall = 1'b0;
  end

  always @(posedge clk) begin
    if (seen_rise)
      assert ($time - t_rise >= time'(SWEEP_PS))
        else $error("delayed_pulse_clock_gen: clock period below the %0d ps sweep", SWEEP_PS);
    if (seen_fall)
      assert ($time - t_fall > time'(PULSE_PS))
        else $error("delayed_pulse_clock_gen: clock low phase too short");
    t_rise    <= $time;
    seen_rise <= 1'b1;
  end

  always @(negedge clk) begin
    if (seen_rise)
      assert ($time - t_rise > time'(PULSE_PS))
        else $error("delayed_pulse_clock_gen: clock high phase too short");
    t_fall    <= $time;
    seen_fall <= 1'b1;
  end
endmodule
