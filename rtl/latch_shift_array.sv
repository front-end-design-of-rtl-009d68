// latch_shift_array: the N-bit data path of the pulsed-latch shift register.
//
// N = M*K data latches are grouped into M sub shift registers of K data
// latches each, every one followed by a temporary storage latch, so the array
// holds N + N/K latches. All sub shift registers share the same K+1 pulsed
// clocks. Sub register 1 takes `din`; sub register m+1 takes the temporary
// latch of sub register m. One pulse sequence (T, K, ..., 1) shifts every
// word one place: after the sequence, q[0] holds din and q[j] holds the old
// q[j-1].
//
// Interface: pulse[0] is CLK_pulse<T>, pulse[i] is CLK_pulse<i>. q[j] is
// data latch Q(j+1) of the whole register, t[m] the temporary latch of sub
// register m+1, dout = q[N-1], the word that entered N shifts ago.
//
// Timing: pulses must be non-overlapping (checked by an assertion); din must
// be stable while pulse[1] is high. N must be a multiple of K.
module latch_shift_array #(
  parameter int unsigned N     = 256,
  parameter int unsigned K     = 4,
  parameter int unsigned WIDTH = 1,
  localparam int unsigned M    = N / K
) (
  input  logic                    rst,
  input  logic [K:0]              pulse,
  input  logic [WIDTH-1:0]        din,
  output logic [N-1:0][WIDTH-1:0] q,
  output logic [M-1:0][WIDTH-1:0] t,
  output logic [WIDTH-1:0]        dout
);
  timeunit 1ps;
  timeprecision 1ps;

  if (N % K != 0 || K == 0) begin : g_bad_size
    $error("latch_shift_array: N must be a non-zero multiple of K");
  end

  for (genvar m = 0; m < M; m++) begin : g_sub
    logic [WIDTH-1:0] sub_in;
    if (m == 0) begin : g_first
      assign sub_in = din;
    end else begin : g_next
      assign sub_in = t[m-1];
    end

    sub_shift_reg #(.K(K), .WIDTH(WIDTH)) u_sub (
      .rst  (rst),
      .pulse(pulse),
      .din  (sub_in),
      .q    (q[m*K +: K]),
      .t    (t[m])
    );
  end

  assign dout = q[N-1];

  // The whole scheme relies on no two pulsed clocks being high together.
  always_comb begin
    if (!rst) assert ($onehot0(pulse))
      else $error("latch_shift_array: overlapping pulsed clocks %b", pulse);
  end
endmodule
