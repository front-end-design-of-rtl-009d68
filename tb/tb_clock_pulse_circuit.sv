// tb_clock_pulse_circuit: self-checking test of one clock-pulse circuit.
//
// Runs a 400 ps clock into the circuit and measures, from the simulation
// time of every edge, when the pulse rises after a rising clock edge, how
// wide it is, and how late the delayed clock for the next circuit follows.
// Expected: pulse after BUF_PS, width DELAY_PS + INV_PS, delayed clock after
// DELAY_PS + 2*INV_PS, exactly one pulse per clock period and none on the
// falling edge.
module tb_clock_pulse_circuit;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DELAY_PS = 40;
  localparam int unsigned INV_PS   = 5;
  localparam int unsigned BUF_PS   = 5;
  localparam int unsigned PERIOD   = 400;
  localparam int unsigned CYCLES   = 20;

  logic clk = 1'b0;
  logic pulse, clk_out;
  int checks = 0, failures = 0;
  int pulses = 0;
  time t_clk_rise, t_pulse_rise;

  clock_pulse_circuit #(.DELAY_PS(DELAY_PS), .INV_PS(INV_PS), .BUF_PS(BUF_PS))
    dut (.clk_in(clk), .pulse(pulse), .clk_out(clk_out));

  task automatic expect_eq(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d expected %0d", what, got, want);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) t_clk_rise = $time;

  always @(posedge pulse) begin
    if ($time > PERIOD) begin
      pulses++;
      t_pulse_rise = $time;
      expect_eq("pulse delay after clk", $time - t_clk_rise, BUF_PS);
    end
  end

  always @(negedge pulse) begin
    if ($time > PERIOD)
      expect_eq("pulse width", $time - t_pulse_rise, DELAY_PS + INV_PS);
  end

  always @(posedge clk_out) begin
    if ($time > PERIOD)
      expect_eq("delayed clock", $time - t_clk_rise, DELAY_PS + 2 * INV_PS);
  end

  initial begin
    // settle the delay chain before measuring
    #(PERIOD);
    repeat (CYCLES) begin
      clk = 1'b1; #(PERIOD / 2);
      clk = 1'b0; #(PERIOD / 2);
    end
    expect_eq("pulses per clock", pulses, CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
