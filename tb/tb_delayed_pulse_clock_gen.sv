// tb_delayed_pulse_clock_gen: self-checking test of the delayed pulsed clock
// generator with K = 4.
//
// Runs a 400 ps clock and records, for every clock period, which pulse
// rises at what time. Expected per period: K+1 pulses in the order
// CLK_pulse<T>, <K>, ..., <1>; the j-th rising j*(DELAY_PS + 2*INV_PS) +
// BUF_PS after the clock edge and lasting DELAY_PS + INV_PS. At no time may
// two pulses be high together.
module tb_delayed_pulse_clock_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K        = 4;
  localparam int unsigned DELAY_PS = 40;
  localparam int unsigned INV_PS   = 5;
  localparam int unsigned BUF_PS   = 5;
  localparam int unsigned PERIOD   = 400;
  localparam int unsigned CYCLES   = 20;
  localparam int unsigned STAGE    = DELAY_PS + 2 * INV_PS;

  logic       clk = 1'b0;
  logic [K:0] pulse;
  int checks = 0, failures = 0;
  int order [$];            // pulse indices seen in the current period
  time t_clk_rise;
  time t_rise [K+1];

  delayed_pulse_clock_gen #(.K(K), .DELAY_PS(DELAY_PS), .INV_PS(INV_PS),
                            .BUF_PS(BUF_PS)) dut (.clk(clk), .pulse(pulse));

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

  // Expected index of the j-th pulse of a period: T first, then K down to 1.
  function automatic int expected_index(int j);
    return (j == 0) ? 0 : K + 1 - j;
  endfunction

  for (genvar i = 0; i <= K; i++) begin : g_mon
    always @(posedge pulse[i]) if ($time > PERIOD) begin
      t_rise[i] = $time;
      order.push_back(i);
    end
    always @(negedge pulse[i]) if ($time > PERIOD)
      expect_eq($sformatf("width of pulse %0d", i), $time - t_rise[i],
                DELAY_PS + INV_PS);
  end

  always @(pulse) if ($time > PERIOD) begin
    checks++;
    if (!$onehot0(pulse)) begin
      failures++;
      $display("FAIL overlapping pulses %b at %0t", pulse, $time);
    end
  end

  task automatic check_period();
    expect_eq("pulses in period", order.size(), K + 1);
    foreach (order[j]) begin
      expect_eq($sformatf("pulse #%0d index", j), order[j], expected_index(j));
      expect_eq($sformatf("pulse #%0d time", j), t_rise[order[j]] - t_clk_rise,
                j * STAGE + BUF_PS);
    end
    order.delete();
  endtask

  initial begin
    #(PERIOD);
    order.delete();
    repeat (CYCLES) begin
      t_clk_rise = $time;
      clk = 1'b1; #(PERIOD / 2);
      clk = 1'b0; #(PERIOD / 2);
      check_period();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
