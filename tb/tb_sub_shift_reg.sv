// tb_sub_shift_reg: self-checking test of a K-bit sub shift register.
//
// Applies full pulse sequences (CLK_pulse<T>, <K>, ..., <1>, each pulse
// separated by a gap) with random input words. After every sequence the
// outputs are compared with a plain shift model: Q1 takes the input, Qi the
// old Q(i-1), and the temporary latch the old QK. After each single pulse
// only the latch that pulse addresses may have changed, which is checked as
// well. Also checks the reset and that a pulse-free period holds the data.
module tb_sub_shift_reg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K     = 4;
  localparam int unsigned WIDTH = 8;

  logic                    rst;
  logic [K:0]              pulse;
  logic [WIDTH-1:0]        din;
  logic [K-1:0][WIDTH-1:0] q;
  logic [WIDTH-1:0]        t;

  logic [WIDTH-1:0] m_q [K];   // shift model
  logic [WIDTH-1:0] m_t;
  int checks = 0, failures = 0;

  sub_shift_reg #(.K(K), .WIDTH(WIDTH)) dut (
    .rst(rst), .pulse(pulse), .din(din), .q(q), .t(t));

  task automatic compare(string what);
    for (int i = 0; i < K; i++) begin
      checks++;
      if (q[i] !== m_q[i]) begin
        failures++;
        $display("FAIL %s: Q%0d=%h expected %h", what, i + 1, q[i], m_q[i]);
      end
    end
    checks++;
    if (t !== m_t) begin
      failures++;
      $display("FAIL %s: T=%h expected %h", what, t, m_t);
    end
  endtask

  task automatic fire(int idx);
    pulse[idx] = 1'b1;
    #20;
    pulse[idx] = 1'b0;
    #10;
  endtask

  // One shift: pulses T, K, ..., 1 with the model updated the same way a
  // shift register of K+1 stages would move.
  task automatic shift(logic [WIDTH-1:0] word);
    logic [WIDTH-1:0] old_q [K];
    logic [K-1:0][WIDTH-1:0] q_prev;
    old_q  = m_q;
    din    = word;
    q_prev = q;
    fire(0);
    // only T may have moved
    for (int i = 0; i < K; i++) begin
      checks++;
      if (q[i] !== q_prev[i]) begin
        failures++;
        $display("FAIL pulse T changed Q%0d", i + 1);
      end
    end
    for (int p = K; p >= 1; p--) fire(p);
    m_t    = old_q[K-1];
    m_q[0] = word;
    for (int i = 1; i < K; i++) m_q[i] = old_q[i-1];
    compare("after shift");
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; pulse = '0; din = '0;
    for (int i = 0; i < K; i++) m_q[i] = '0;
    m_t = '0;
    #10 compare("reset");
    rst = 0;
    for (int n = 0; n < 200; n++) shift(WIDTH'($urandom));
    din = ~din; #100 compare("hold without pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
