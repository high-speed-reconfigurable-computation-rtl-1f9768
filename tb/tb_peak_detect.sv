// tb_peak_detect: plays piecewise-linear slow/fast filter waveforms into the
// peak detection stage and checks, per scenario, whether a result is offered
// and with which peaks:
//   A clean event, fast filter falls before the slow one rises (0-1-2-4-E)
//   B clean event, slow filter rises before the fast one falls (0-1-3-4-E)
//   C second fast pulse while the slow filter is still up      (4 -> pile-up)
//   D second fast pulse before the slow filter rises          (2 -> pile-up)
//   E slow filter falls before the fast one                    (3 -> pile-up)
//   F two clean events while the first result is still unacknowledged: the
//     second is dropped
// It also checks that valid rises two clocks after the slow output crosses
// below its lower threshold, and that the result stays stable until ack.
module tb_peak_detect;
  import pd_pkg::*;
  logic      clk = 1'b0, rst;
  acc_t      slow_in, fast_in;
  filt_thr_t slow_thr, fast_thr;
  logic      ack, valid;
  result_t   result;
  int checks = 0, failures = 0;
  int cycle = 0;
  int ack_delay = 5;
  int n_results, n_pileups;
  int last_sf_cross;
  result_t held;

  peak_detect dut (.clk, .rst, .slow_in, .fast_in, .slow_thr, .fast_thr,
                   .ack, .valid, .result);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // triangle pulse: 0 before t0, linear rise to pk over r, linear fall over f
  function automatic int tri_p(int t, int t0, int r, int f, int pk);
    if (t < t0)          return 0;
    if (t < t0 + r)      return pk * (t - t0) / r;
    if (t < t0 + r + f)  return pk * (t0 + r + f - t) / f;
    return 0;
  endfunction

  // acknowledge responder (the bus side of the handshake)
  initial begin
    ack = 1'b0;
    forever begin
      @(posedge clk iff valid);
      held = result;
      repeat (ack_delay) begin
        @(posedge clk);
        checks++;
        if (result !== held || !valid) begin
          failures++;
          $display("result/valid not held before ack");
        end
      end
      #1 ack = 1'b1;
      @(posedge clk iff !valid);
      #1 ack = 1'b0;
    end
  end

  // count offers and check their latency
  always @(posedge valid) begin
    n_results++;
    checks++;
    if (cycle != last_sf_cross + 2) begin
      failures++;
      $display("valid at cycle %0d, slow crossed at %0d", cycle, last_sf_cross);
    end
  end
  always @(posedge clk) if (!rst && dut.state == PD_PILEUP) n_pileups++;

  typedef struct {int t0, r, f, pk;} tri_t;

  task automatic play(input tri_t s, input tri_t f1, input tri_t f2, input int len);
    int sv, prev_sv;
    prev_sv = 0;
    for (int t = 0; t < len; t++) begin
      sv = tri_p(t, s.t0, s.r, s.f, s.pk);
      slow_in = acc_t'(sv);
      fast_in = acc_t'(tri_p(t, f1.t0, f1.r, f1.f, f1.pk) + tri_p(t, f2.t0, f2.r, f2.f, f2.pk));
      if (prev_sv >= 1000 && sv < 1000) last_sf_cross = cycle;
      prev_sv = sv;
      @(posedge clk);
      #1;
    end
  endtask

  task automatic expect_outcome(input string name, input int results, input int pileups,
                                input int slow_pk, input int fast_pk);
    checks++;
    if (n_results != results || n_pileups != pileups) begin
      failures++;
      $display("%s: %0d results, %0d pile-ups; expected %0d, %0d", name, n_results,
               n_pileups, results, pileups);
    end
    if (results > 0) begin
      checks++;
      if (held.slow_peak !== acc_t'(slow_pk) || held.fast_peak !== acc_t'(fast_pk)) begin
        failures++;
        $display("%s: peaks %0d/%0d expected %0d/%0d", name, held.slow_peak, held.fast_peak,
                 slow_pk, fast_pk);
      end
    end
    n_results = 0;
    n_pileups = 0;
  endtask

  localparam tri_t NONE = '{0, 1, 1, 0};

  initial begin
    rst = 1'b1;
    slow_in = '0; fast_in = '0;
    slow_thr = '{upper: 16'sd1000, lower: 16'sd1000};
    fast_thr = '{upper: 16'sd512,  lower: 16'sd256};
    n_results = 0; n_pileups = 0; last_sf_cross = -100;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    #1;
    play('{5, 40, 40, 3000}, '{0, 10, 10, 800}, NONE, 150);
    expect_outcome("A", 1, 0, 3000, 800);
    play('{2, 20, 40, 2500}, '{0, 10, 30, 900}, NONE, 150);
    expect_outcome("B", 1, 0, 2500, 900);
    play('{5, 40, 60, 3000}, '{0, 10, 10, 800}, '{30, 5, 10, 700}, 150);
    expect_outcome("C", 0, 1, 0, 0);
    play('{20, 40, 40, 3000}, '{0, 10, 10, 800}, '{22, 10, 10, 800}, 150);
    expect_outcome("D", 0, 1, 0, 0);
    play('{2, 10, 10, 2000}, '{0, 10, 60, 900}, NONE, 150);
    expect_outcome("E", 0, 1, 0, 0);
    ack_delay = 400;
    play('{5, 40, 40, 3000}, '{0, 10, 10, 800}, NONE, 100);
    play('{5, 40, 40, 2000}, '{0, 10, 10, 700}, NONE, 100);
    repeat (400) @(posedge clk);
    #1;
    expect_outcome("F", 1, 0, 3000, 800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
