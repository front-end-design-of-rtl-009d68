// pulsed_latch: one level-sensitive storage latch of a pulsed-latch shift
// register.
//
// The latch is transparent while its pulsed clock `pulse` is high and holds
// its value while it is low. Because the pulse is short and only one pulse
// of a shift register is ever high at a time, the latch behaves like an
// edge-triggered stage at a fraction of a flip-flop's size.
//
// Interface: `d` is the data input, `q` the stored word. `rst` is an
// asynchronous, active-high clear that wins over the pulse. The word width
// is a parameter; the architecture draws one bit per latch.
//
// Timing: `q` follows `d` combinationally while `pulse` is high; `d` must be
// stable for the whole pulse and until the pulse has fallen.
//
// A level-sensitive latch is the intended circuit here, so the latch that
// synthesis infers from this module is not a mistake. When this module is
// linted inside a larger design, some lint tools report that they find no
// latch in the always_latch block; the block does hold q when neither rst
// nor pulse is high, and the report can be ignored.
module pulsed_latch #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             rst,
  input  logic             pulse,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_latch begin
    if (rst)        q = '0;
    else if (pulse) q = d;
  end
endmodule
