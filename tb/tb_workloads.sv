// tb_workloads: the two register lengths the architecture was evaluated
// at, 4 bits (one sub shift register) and 256 bits (64 sub shift
// registers), both with K = 4, the delay-line pulse generator and 8-bit
// words.
//
// Both instances get the same input stream: first the words 8'b11110011 and
// 8'b11111111, then random words, for 256 + 8 shifts of a 400 ps clock.
// After every shift each instance is compared with a reference list of its
// last N inputs (all data latches, temporary latches and dout), and the
// first word must reach dout after exactly N shifts.
module tb_workloads;
  timeunit 1ps;
  timeprecision 1ps;
  import pls_pkg::*;

  localparam int unsigned K      = 4;
  localparam int unsigned WIDTH  = 8;
  localparam int unsigned NS     = 4;
  localparam int unsigned NL     = 256;
  localparam int unsigned PERIOD = 400;
  localparam int unsigned SHIFTS = NL + 8;

  logic clk = 1'b0, rst;
  logic [WIDTH-1:0] din, dout_s, dout_l;
  logic [NS-1:0][WIDTH-1:0]   q_s;
  logic [NS/K-1:0][WIDTH-1:0] t_s;
  logic [NL-1:0][WIDTH-1:0]   q_l;
  logic [NL/K-1:0][WIDTH-1:0] t_l;
  logic [K:0] pulse_s, pulse_l;
  logic mclk_s, mclk_l;

  logic [WIDTH-1:0] hist [$];   // hist[0] is the newest input word
  int checks = 0, failures = 0;

  pulsed_latch_shift_reg #(.N(NS), .K(K), .WIDTH(WIDTH)) u_4bit (
    .clk(clk), .rst(rst), .din(din), .q(q_s), .t(t_s), .dout(dout_s),
    .pulse(pulse_s), .main_clk(mclk_s));

  pulsed_latch_shift_reg #(.N(NL), .K(K), .WIDTH(WIDTH)) u_256bit (
    .clk(clk), .rst(rst), .din(din), .q(q_l), .t(t_l), .dout(dout_l),
    .pulse(pulse_l), .main_clk(mclk_l));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected content of stage j after the current shift (0 before input).
  function automatic logic [WIDTH-1:0] word(int j);
    return (j < hist.size()) ? hist[j] : '0;
  endfunction

  task automatic expect_eq(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, want);
    end
  endtask

  task automatic compare();
    for (int j = 0; j < NS; j++) expect_eq($sformatf("4-bit q[%0d]", j), q_s[j], word(j));
    for (int m = 0; m < NS / K; m++) expect_eq("4-bit t", t_s[m], word(m * K + K));
    expect_eq("4-bit dout", dout_s, word(NS - 1));
    for (int j = 0; j < NL; j++) expect_eq($sformatf("256-bit q[%0d]", j), q_l[j], word(j));
    for (int m = 0; m < NL / K; m++) expect_eq($sformatf("256-bit t[%0d]", m), t_l[m], word(m * K + K));
    expect_eq("256-bit dout", dout_l, word(NL - 1));
  endtask

  initial begin
    int arrive_s = -1, arrive_l = -1;
    rst = 1'b1; din = '0;
    #2000 compare();
    rst = 1'b0;
    for (int n = 1; n <= SHIFTS; n++) begin
      din = (n == 1) ? 8'b11110011 : (n == 2) ? 8'b11111111 : WIDTH'($urandom);
      clk = 1'b1; #(PERIOD / 2);
      clk = 1'b0; #(PERIOD / 2 - 10);
      hist.push_front(din);
      compare();
      if (arrive_s < 0 && dout_s == 8'b11110011) arrive_s = n;
      if (arrive_l < 0 && dout_l == 8'b11110011) arrive_l = n;
      #10;
    end
    checks += 2;
    if (arrive_s != NS) begin failures++; $display("FAIL 4-bit latency %0d", arrive_s); end
    if (arrive_l != NL) begin failures++; $display("FAIL 256-bit latency %0d", arrive_l); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
