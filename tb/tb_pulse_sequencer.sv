// tb_pulse_sequencer: self-checking test of the synchronous pulse sequencer
// with K = 4.
//
// After reset, cycle n (n = 0, 1, ...) of the fast clock must show phase
// n mod 2(K+1). A reference table lists, for each phase, which pulse is
// high: CLK_pulse<T> in phase 0, then <K>, ..., <1> in phases 2, 4, ..., 2K,
// and none in odd phases. main_clk must be high in phases 0..K. Also checks
// that a reset in mid-sequence restarts at phase 0 and that the shift rate
// is one CLK_pulse<1> per 2(K+1) cycles.
module tb_pulse_sequencer;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K      = 4;
  localparam int unsigned PHASES = 2 * (K + 1);

  logic       clk = 1'b0, rst;
  logic [K:0] pulse;
  logic       main_clk;
  logic [K:0] table_pulse [PHASES];
  int checks = 0, failures = 0;
  int shifts = 0;

  pulse_sequencer #(.K(K)) dut (.clk(clk), .rst(rst), .pulse(pulse),
                                .main_clk(main_clk));

  always #50 clk = ~clk;

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int cycles);
    for (int n = 0; n < cycles; n++) begin
      @(posedge clk); #10;
      checks++;
      if (pulse !== table_pulse[n % PHASES] || main_clk !== ((n % PHASES) <= K)) begin
        failures++;
        $display("FAIL cycle %0d: pulse=%b main_clk=%b expected %b %b", n, pulse,
                 main_clk, table_pulse[n % PHASES], (n % PHASES) <= K);
      end
      if (pulse[1]) shifts++;
    end
  endtask

  initial begin
    foreach (table_pulse[p]) table_pulse[p] = '0;
    table_pulse[0][0] = 1'b1;              // T
    for (int s = 1; s <= K; s++) table_pulse[2 * s][K + 1 - s] = 1'b1;

    rst = 1'b1;
    repeat (3) @(posedge clk);
    #10;
    checks++;
    if (pulse !== '0) begin
      failures++;
      $display("FAIL pulses during reset: %b", pulse);
    end
    rst = 1'b0;
    run(PHASES * 20 + 3);
    checks++;
    if (shifts != 20) begin
      failures++;
      $display("FAIL %0d shifts in %0d cycles, expected 20", shifts, PHASES * 20 + 3);
    end
    // reset in the middle of a sequence
    #20 rst = 1'b1;
    @(posedge clk); #10 rst = 1'b0;
    run(PHASES * 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
