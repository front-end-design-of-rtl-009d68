// sub_shift_reg: a K-bit sub shift register built from K+1 pulsed latches.
//
// K data latches Q1..QK form the visible shift stages; an extra temporary
// storage latch T keeps a copy of QK so that QK may be overwritten before
// the next sub shift register has taken its old value. Latch Qi is loaded by
// CLK_pulse<i> and T by CLK_pulse<T>. The pulses arrive in the order
// T, K, ..., 1: first T <- QK, then QK <- Q(K-1), ..., and last Q1 <- din.
// Every latch therefore reads a neighbour that has not been updated yet in
// this shift, and one full pulse sequence moves all data one place along.
// In a chain of sub shift registers `din` of register m+1 is `t` of
// register m, which already holds the old QK when CLK_pulse<1> loads Q1.
//
// Interface: pulse[0] is CLK_pulse<T>, pulse[i] is CLK_pulse<i> (1..K).
// q[i-1] is latch Qi, `t` the temporary latch. `rst` clears all latches.
//
// Timing: the pulses must not overlap; din must be stable while pulse[1] is
// high. Structure and pulse order follow the architecture; the word width
// and the reset are this design's choices.
module sub_shift_reg #(
  parameter int unsigned K     = 4,
  parameter int unsigned WIDTH = 1
) (
  input  logic                      rst,
  input  logic [K:0]                pulse,
  input  logic [WIDTH-1:0]          din,
  output logic [K-1:0][WIDTH-1:0]   q,
  output logic [WIDTH-1:0]          t
);
  timeunit 1ps;
  timeprecision 1ps;

  // Data input of each data latch: din for Q1, the previous latch otherwise.
  logic [K-1:0][WIDTH-1:0] d_in;

  assign d_in[0] = din;
  for (genvar i = 1; i < K; i++) begin : g_link
    assign d_in[i] = q[i-1];
  end

  for (genvar i = 0; i < K; i++) begin : g_data
    pulsed_latch #(.WIDTH(WIDTH)) u_q (
      .rst  (rst),
      .pulse(pulse[i+1]),
      .d    (d_in[i]),
      .q    (q[i])
    );
  end

  pulsed_latch #(.WIDTH(WIDTH)) u_t (
    .rst  (rst),
    .pulse(pulse[pls_pkg::PULSE_T]),
    .d    (q[K-1]),
    .q    (t)
  );
endmodule
