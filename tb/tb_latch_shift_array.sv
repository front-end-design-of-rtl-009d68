// tb_latch_shift_array: self-checking test of the latch array with N = 16,
// K = 4 (four sub shift registers) and 8-bit words.
//
// Applies pulse sequences by hand and keeps a reference model that is just
// the list of the last N input words. After every shift q[j] must equal the
// word that entered j+1 shifts ago... i.e. model[j], dout the oldest of
// them, and each temporary latch t[m] the word that left the last data latch
// of sub register m in this shift. Words that cross the boundary between
// two sub registers do so through a temporary latch, so a wrong hand-over
// shows as a mismatch in q.
module tb_latch_shift_array;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N     = 16;
  localparam int unsigned K     = 4;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned M     = N / K;

  logic                    rst;
  logic [K:0]              pulse;
  logic [WIDTH-1:0]        din, dout;
  logic [N-1:0][WIDTH-1:0] q;
  logic [M-1:0][WIDTH-1:0] t;

  logic [WIDTH-1:0] model [N];     // model[j]: expected q[j]
  logic [WIDTH-1:0] model_t [M];
  int checks = 0, failures = 0;

  latch_shift_array #(.N(N), .K(K), .WIDTH(WIDTH)) dut (
    .rst(rst), .pulse(pulse), .din(din), .q(q), .t(t), .dout(dout));

  task automatic expect_eq(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, want);
    end
  endtask

  task automatic compare();
    for (int j = 0; j < N; j++) expect_eq($sformatf("q[%0d]", j), q[j], model[j]);
    for (int m = 0; m < M; m++) expect_eq($sformatf("t[%0d]", m), t[m], model_t[m]);
    expect_eq("dout", dout, model[N-1]);
  endtask

  task automatic fire(int idx);
    pulse[idx] = 1'b1; #20;
    pulse[idx] = 1'b0; #10;
  endtask

  task automatic shift(logic [WIDTH-1:0] word);
    din = word;
    fire(0);
    for (int p = K; p >= 1; p--) fire(p);
    for (int m = 0; m < M; m++) model_t[m] = model[m * K + K - 1];
    for (int j = N - 1; j > 0; j--) model[j] = model[j-1];
    model[0] = word;
    compare();
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; pulse = '0; din = '0;
    foreach (model[j]) model[j] = '0;
    foreach (model_t[m]) model_t[m] = '0;
    #10 compare();
    rst = 1'b0;
    for (int n = 0; n < 3 * N; n++) shift(WIDTH'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
