// tb_pulsed_latch_shift_reg: end-to-end test of the pulsed-latch shift
// register with both pulse sources, at N = 16, K = 4 (four sub shift
// registers) and 8-bit words.
//
// Instance u_dl uses the delay-line pulse generator and a 400 ps shift
// clock; instance u_seq uses the synchronous sequencer and a 100 ps fast
// clock. Each instance is fed random words and compared after every shift
// with a reference model that simply remembers the last N input words
// (q[j] is the word of j+1 shifts ago, dout the one of N shifts ago, t[m]
// the word that left sub register m). Both instances are reset once in the
// middle of the stream.
//
// Counted mechanisms, each of which must happen at least once: complete
// pulse sequences in the order T, K, ..., 1 (per source), shifts, words
// handed from one sub register to the next through a temporary latch, and
// resets in mid-stream. Overlapping pulses count as failures. Timing
// checks: with the delay line CLK_pulse<1> rises K*(DELAY+2*INV)+BUF ps after
// the clock edge; with the sequencer one shift takes 2*(K+1) fast cycles.
module tb_pulsed_latch_shift_reg;
  timeunit 1ps;
  timeprecision 1ps;
  import pls_pkg::*;

  localparam int unsigned N      = 16;
  localparam int unsigned K      = 4;
  localparam int unsigned WIDTH  = 8;
  localparam int unsigned M      = N / K;
  localparam int unsigned PERIOD = 400;   // delay-line shift clock
  localparam int unsigned FAST   = 100;   // sequencer fast clock
  localparam int unsigned SHIFTS = 4 * N;

  typedef logic [N-1:0][WIDTH-1:0] q_t;
  typedef logic [M-1:0][WIDTH-1:0] t_t;

  int checks = 0, failures = 0;
  int n_seq_order [2];    // complete, correctly ordered pulse sequences
  int n_shift     [2];
  int n_handover  [2];
  int n_reset     [2];
  bit done        [2];

  // ---------------- delay-line instance ----------------
  logic             clk_dl = 1'b0, rst_dl;
  logic [WIDTH-1:0] din_dl, dout_dl;
  q_t               q_dl;
  t_t               t_dl;
  logic [K:0]       pulse_dl;
  logic             mclk_dl;

  pulsed_latch_shift_reg #(.N(N), .K(K), .WIDTH(WIDTH), .PULSE_GEN(PGEN_DELAY_LINE))
    u_dl (.clk(clk_dl), .rst(rst_dl), .din(din_dl), .q(q_dl), .t(t_dl),
          .dout(dout_dl), .pulse(pulse_dl), .main_clk(mclk_dl));

  // ---------------- sequencer instance ----------------
  logic             clk_sq = 1'b0, rst_sq;
  logic [WIDTH-1:0] din_sq, dout_sq;
  q_t               q_sq;
  t_t               t_sq;
  logic [K:0]       pulse_sq;
  logic             mclk_sq;

  pulsed_latch_shift_reg #(.N(N), .K(K), .WIDTH(WIDTH), .PULSE_GEN(PGEN_SEQUENCER))
    u_seq (.clk(clk_sq), .rst(rst_sq), .din(din_sq), .q(q_sq), .t(t_sq),
           .dout(dout_sq), .pulse(pulse_sq), .main_clk(mclk_sq));

  always #(FAST / 2) clk_sq = ~clk_sq;

  // ---------------- reference model ----------------
  class shift_model;
    logic [WIDTH-1:0] w [N];
    logic [WIDTH-1:0] tw [M];
    function new(); clear(); endfunction
    function void clear();
      foreach (w[j]) w[j] = '0;
      foreach (tw[m]) tw[m] = '0;
    endfunction
    function void push(logic [WIDTH-1:0] word);
      for (int m = 0; m < M; m++) tw[m] = w[m * K + K - 1];
      for (int j = N - 1; j > 0; j--) w[j] = w[j-1];
      w[0] = word;
    endfunction
  endclass

  shift_model mdl [2];

  task automatic compare(int s, string tag, q_t q, t_t t, logic [WIDTH-1:0] dout);
    for (int j = 0; j < N; j++) begin
      checks++;
      if (q[j] !== mdl[s].w[j]) begin
        failures++;
        $display("FAIL %s q[%0d]=%h expected %h at %0t", tag, j, q[j], mdl[s].w[j], $time);
      end
    end
    for (int m = 0; m < M; m++) begin
      checks++;
      if (t[m] !== mdl[s].tw[m]) begin
        failures++;
        $display("FAIL %s t[%0d]=%h expected %h", tag, m, t[m], mdl[s].tw[m]);
      end
    end
    checks++;
    if (dout !== mdl[s].w[N-1]) begin
      failures++;
      $display("FAIL %s dout=%h expected %h", tag, dout, mdl[s].w[N-1]);
    end
    // a non-zero word in the first latch of sub register 2..M came through
    // a temporary latch
    for (int m = 1; m < M; m++) if (q[m * K] != '0) n_handover[s]++;
  endtask

  // ---------------- pulse order / overlap monitors ----------------
  task automatic watch_pulses(int s, ref logic [K:0] pulse);
    int step = 0;
    forever begin
      @(pulse);
      if ($time < 2000) continue;
      checks++;
      if (!$onehot0(pulse)) begin
        failures++;
        $display("FAIL source %0d overlapping pulses %b", s, pulse);
      end
      if (pulse != '0) begin
        int want = (step == 0) ? 0 : K + 1 - step;
        if (pulse == (K+1)'(1) << want) step++;
        else if (pulse == (K+1)'(1)) step = 1;   // a new sequence began
        else step = 0;
        if (step == K + 1) begin
          n_seq_order[s]++;
          step = 0;
        end
      end
    end
  endtask

  initial watch_pulses(0, pulse_dl);
  initial watch_pulses(1, pulse_sq);

  initial begin : watchdog
    #50_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- delay-line stimulus ----------------
  // CLK_pulse<1>, the last pulse of a shift, must follow the clock edge
  // after K stages of the delay chain plus the clock buffer.
  time t_edge_dl = 0;
  always @(posedge pulse_dl[1]) if (t_edge_dl != 0) begin
    checks++;
    if ($time - t_edge_dl != time'(K * 50 + 5)) begin
      failures++;
      $display("FAIL CLK_pulse<1> %0d ps after the clock edge", $time - t_edge_dl);
    end
  end

  initial begin
    rst_dl = 1'b1; din_dl = '0;
    #2000;
    compare(0, "dl reset", q_dl, t_dl, dout_dl);
    rst_dl = 1'b0;
    for (int n = 0; n < SHIFTS; n++) begin
      din_dl = WIDTH'($urandom);
      clk_dl = 1'b1; t_edge_dl = $time;
      #(PERIOD / 2) clk_dl = 1'b0;
      #(PERIOD / 2 - 10);
      mdl[0].push(din_dl);
      n_shift[0]++;
      compare(0, "dl", q_dl, t_dl, dout_dl);
      if (n == SHIFTS / 2) begin
        rst_dl = 1'b1; #5;
        mdl[0].clear();
        n_reset[0]++;
        compare(0, "dl mid reset", q_dl, t_dl, dout_dl);
        rst_dl = 1'b0;
      end
      #10;
    end
    done[0] = 1'b1;
  end

  // ---------------- sequencer stimulus ----------------
  initial begin
    time t_last;
    rst_sq = 1'b1; din_sq = '0;
    #2000;
    compare(1, "seq reset", q_sq, t_sq, dout_sq);
    @(negedge clk_sq) rst_sq = 1'b0;
    t_last = 0;
    for (int n = 0; n < SHIFTS; n++) begin
      @(posedge mclk_sq); #1 din_sq = WIDTH'($urandom);
      @(negedge pulse_sq[1]);
      if (t_last != 0) begin
        checks++;
        if ($time - t_last != time'(2 * (K + 1) * FAST)) begin
          failures++;
          $display("FAIL sequencer shift period %0d ps", $time - t_last);
        end
      end
      t_last = $time;
      #1;
      mdl[1].push(din_sq);
      n_shift[1]++;
      compare(1, "seq", q_sq, t_sq, dout_sq);
      if (n == SHIFTS / 2) begin
        @(negedge clk_sq) rst_sq = 1'b1;
        @(negedge clk_sq);
        mdl[1].clear();
        n_reset[1]++;
        compare(1, "seq mid reset", q_sq, t_sq, dout_sq);
        rst_sq = 1'b0;
        t_last = 0;
      end
    end
    done[1] = 1'b1;
  end

  initial begin
    mdl[0] = new();
    mdl[1] = new();
    wait (done[0] && done[1]);
    for (int s = 0; s < 2; s++) begin
      automatic string src = (s == 0) ? "delay line" : "sequencer";
      $display("%s: %0d ordered pulse sequences, %0d shifts, %0d hand-overs, %0d resets",
               src, n_seq_order[s], n_shift[s], n_handover[s], n_reset[s]);
      checks += 4;
      if (n_seq_order[s] == 0) begin failures++; $display("FAIL %s: no ordered pulse sequence", src); end
      if (n_shift[s] == 0)     begin failures++; $display("FAIL %s: no shift", src); end
      if (n_handover[s] == 0)  begin failures++; $display("FAIL %s: no hand-over", src); end
      if (n_reset[s] == 0)     begin failures++; $display("FAIL %s: no reset", src); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
