// tb_full_size: the shift register at its default configuration: 256 one-bit
// stages in 64 sub shift registers of K = 4, clocked through the delay-line
// pulse generator.
//
// After a reset, random bits are shifted in for 2*256 + 16 clock periods of
// 400 ps. After every shift all 256 data latches, the 64 temporary latches
// and dout are compared with a reference list of the last 256 input bits.
// The test also checks that the first bit shifted in reaches dout after
// exactly 256 shifts, and that no two pulsed clocks are ever high together.
module tb_full_size;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N      = 256;
  localparam int unsigned K      = 4;
  localparam int unsigned M      = N / K;
  localparam int unsigned PERIOD = 400;
  localparam int unsigned SHIFTS = 2 * N + 16;

  logic           clk = 1'b0, rst;
  logic [0:0]     din, dout;
  logic [N-1:0]   q;
  logic [M-1:0]   t;
  logic [K:0]     pulse;
  logic           main_clk;

  logic [N-1:0] model;    // model[j]: expected q[j]
  logic [M-1:0] model_t;
  int checks = 0, failures = 0;
  int first_one_at = -1;

  pulsed_latch_shift_reg dut (
    .clk(clk), .rst(rst), .din(din), .q(q), .t(t), .dout(dout),
    .pulse(pulse), .main_clk(main_clk));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(pulse) if ($time > 2000) begin
    checks++;
    if (!$onehot0(pulse)) begin
      failures++;
      $display("FAIL overlapping pulses %b", pulse);
    end
  end

  task automatic compare(string tag);
    checks += 3;
    if (q !== model) begin
      failures++;
      $display("FAIL %s: q differs from the model", tag);
    end
    if (t !== model_t) begin
      failures++;
      $display("FAIL %s: t differs from the model", tag);
    end
    if (dout !== model[N-1]) begin
      failures++;
      $display("FAIL %s: dout=%b expected %b", tag, dout, model[N-1]);
    end
  endtask

  initial begin
    rst = 1'b1; din = '0;
    model = '0; model_t = '0;
    #2000 compare("reset");
    rst = 1'b0;
    for (int n = 1; n <= SHIFTS; n++) begin
      // the first bit is a 1 after 0s, so its arrival at dout is visible
      din = (n == 1) ? 1'b1 : (n <= N) ? 1'b0 : 1'($urandom);
      clk = 1'b1; #(PERIOD / 2);
      clk = 1'b0; #(PERIOD / 2 - 10);
      for (int m = 0; m < M; m++) model_t[m] = model[m * K + K - 1];
      model = {model[N-2:0], din};
      compare($sformatf("shift %0d", n));
      if (dout == 1'b1 && first_one_at < 0) first_one_at = n;
      #10;
    end
    checks++;
    if (first_one_at != N) begin
      failures++;
      $display("FAIL first bit reached dout after %0d shifts, expected %0d", first_one_at, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
