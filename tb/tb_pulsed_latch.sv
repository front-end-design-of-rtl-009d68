// tb_pulsed_latch: self-checking test of one pulsed latch.
//
// Drives an 8-bit latch with random data and random pulse levels and
// compares q after every step with a reference that applies the latch rule
// directly: clear while rst is high, follow d while pulse is high, hold
// otherwise. Also checks that a change of d while the pulse is low does not
// reach q, and that a change while it is high does.
module tb_pulsed_latch;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned WIDTH = 8;

  logic             rst, pulse;
  logic [WIDTH-1:0] d, q, expected;
  int checks = 0, failures = 0;

  pulsed_latch #(.WIDTH(WIDTH)) dut (.rst(rst), .pulse(pulse), .d(d), .q(q));

  task automatic check(string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: q=%h expected=%h", what, q, expected);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pulse = 0; d = 8'hA5;
    #10 expected = '0; check("reset clears");
    rst = 0; #10 check("hold after reset");
    d = 8'h3C; #10 check("d change with pulse low is not seen");
    pulse = 1; #10 expected = 8'h3C; check("transparent while pulse high");
    d = 8'h71; #10 expected = 8'h71; check("follows d while pulse high");
    pulse = 0; #10 d = 8'hFF; #10 check("holds after pulse falls");
    for (int i = 0; i < 500; i++) begin
      rst   = ($urandom_range(0, 19) == 0);
      pulse = $urandom_range(0, 1);
      d     = WIDTH'($urandom);
      if (rst)        expected = '0;
      else if (pulse) expected = d;
      #10 check("random step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
