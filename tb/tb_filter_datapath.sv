// tb_filter_datapath: the ADC-clock half on its own. The testbench plays the
// bus side: it holds the soft reset, sends a configuration (slow window 100,
// gap 30; fast window 10, gap 5; thresholds 2048/1024 and 256/128) over
// the four-phase configuration handshake, raises start, feeds offset-binary
// ADC pulses with a little noise, and acknowledges results.
// Checks:
//  - every clock, both filter outputs against a model that sums the two
//    windows of a model FIFO (two clocks of latency from FIFO to output);
//  - each isolated pulse gives one result whose peaks are the maxima of the
//    modelled filter outputs;
//  - a second pulse arriving while the slow filter is still evaluating the
//    first is rejected as a pile-up (no result for the pair).
module tb_filter_datapath;
  import pd_pkg::*;
  localparam int DEPTH = 256;
  localparam int SW = 100, SG = 30, FW = 10, FG = 5;
  logic        clk = 1'b0;
  logic [7:0]  adc_data;
  logic        soft_reset, start, cfg_req, cfg_ack, res_valid, res_ack;
  logic [31:0] cfg_data, res_data;
  acc_t        slow_out, fast_out;
  int checks = 0, failures = 0;
  int model_fifo [DEPTH];
  int exp_slow_q [$], exp_fast_q [$];
  int slow_pk, fast_pk;
  result_t results [$];

  filter_datapath #(.DEPTH(DEPTH)) dut (
    .clk, .adc_data, .soft_reset, .start, .cfg_req, .cfg_data, .cfg_ack,
    .res_valid, .res_data, .res_ack, .slow_out, .fast_out
  );

  always #5 clk = ~clk;
  int n_pileups = 0;
  always @(posedge clk) if (dut.u_stage3.state == PD_PILEUP) n_pileups++;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wsum(int lo, int hi);  // sum of model_fifo[lo..hi-1]
    int s = 0;
    for (int i = lo; i < hi; i++) s += model_fifo[i];
    return s;
  endfunction

  // FIFO model, driven by the synchronised start and the clear pulse the DUT
  // sees at each edge; expected outputs appear two edges later.
  initial begin
    for (int i = 0; i < DEPTH; i++) model_fifo[i] = 0;
    forever begin
      logic st, clr, rs;
      logic [7:0] smp;
      @(negedge clk);
      st = dut.start_s; clr = dut.cfg_applied; rs = dut.rst; smp = adc_data;
      @(posedge clk);
      if (rs || clr) begin
        for (int i = 0; i < DEPTH; i++) model_fifo[i] = 0;
        exp_slow_q.delete(); exp_fast_q.delete();
        exp_slow_q.push_back(0); exp_fast_q.push_back(0);
      end else begin
        for (int i = DEPTH - 1; i > 0; i--) model_fifo[i] = model_fifo[i-1];
        model_fifo[0] = st ? int'($signed(smp ^ 8'h80)) : 0;
      end
      exp_slow_q.push_back(wsum(0, SW) - wsum(SW + SG, 2*SW + SG));
      exp_fast_q.push_back(wsum(0, FW) - wsum(FW + FG, 2*FW + FG));
      #1;
      if (exp_slow_q.size() > 2) begin
        int es, ef;
        es = exp_slow_q.pop_front();
        ef = exp_fast_q.pop_front();
        if (!rs && !dut.rst) begin
          checks++;
          if (slow_out !== acc_t'(es) || fast_out !== acc_t'(ef)) begin
            failures++;
            if (failures < 10)
              $display("t=%0t outputs %0d/%0d expected %0d/%0d", $time, slow_out, fast_out, es, ef);
          end
          if (es > slow_pk) slow_pk = es;
          if (ef > fast_pk) fast_pk = ef;
        end
      end
    end
  end

  // bus side of the result handshake (acknowledge through two flops there)
  initial begin
    res_ack = 1'b0;
    forever begin
      @(posedge clk iff res_valid);
      repeat (4) @(posedge clk);
      results.push_back(result_t'(res_data));
      #1 res_ack = 1'b1;
      @(posedge clk iff !res_valid);
      repeat (4) @(posedge clk);
      #1 res_ack = 1'b0;
    end
  end

  task automatic send_word(input logic [31:0] w);
    cfg_data = w;
    repeat (3) @(posedge clk);
    #1 cfg_req = 1'b1;
    @(posedge clk iff cfg_ack);
    repeat (3) @(posedge clk);
    #1 cfg_req = 1'b0;
    @(posedge clk iff !cfg_ack);
    #1;
  endtask

  // one detector pulse of len samples: 5-sample rise to amplitude a (ADC
// counts), 100-sample linear decay, then baseline; a short len cuts the tail
  task automatic pulse(input int a, input int len);
    int v;
    #1;
    for (int t = 0; t < len; t++) begin
      if (t < 5)        v = a * t / 5;
      else if (t < 105) v = a * (105 - t) / 100;
      else              v = 0;
      v = v + $urandom_range(0, 2) - 1;
      adc_data = 8'(v + 128);
      @(posedge clk);
      #1;
    end
  endtask

  task automatic expect_results(input int n, input string what);
    repeat (60) @(posedge clk);
    checks++;
    if (results.size() != n) begin
      failures++;
      $display("%s: %0d results, expected %0d", what, results.size(), n);
    end
    if (n == 1 && results.size() == 1) begin
      checks++;
      if (int'(results[0].slow_peak) != slow_pk || int'(results[0].fast_peak) != fast_pk) begin
        failures++;
        $display("%s: peaks %0d/%0d expected %0d/%0d", what, results[0].slow_peak,
                 results[0].fast_peak, slow_pk, fast_pk);
      end
    end
    results.delete();
    slow_pk = -100000; fast_pk = -100000;
  endtask

  initial begin
    soft_reset = 1'b1; start = 1'b0; cfg_req = 1'b0; cfg_data = '0; adc_data = 8'd128;
    slow_pk = -100000; fast_pk = -100000;
    repeat (10) @(posedge clk);
    #1 soft_reset = 1'b0;
    repeat (5) @(posedge clk);
    send_word({8'(2*SW + SG), 8'(SW + SG), 8'(SW), 8'd0});
    send_word({8'(2*FW + FG), 8'(FW + FG), 8'(FW), 8'd0});
    send_word({16'd2048, 16'd1024});
    send_word({16'd256, 16'd128});
    repeat (5) @(posedge clk);
    checks++;
    if (dut.cfg.slow_cfg.win2_old != 8'(SW) || dut.cfg.fast_thr.upper != 16'sd256) begin
      failures++;
      $display("configuration not in force");
    end
    start = 1'b1;
    repeat (20) @(posedge clk);
    #1;
    slow_pk = -100000; fast_pk = -100000;
    pulse(60, 600);  expect_results(1, "pulse 60");
    pulse(100, 600); expect_results(1, "pulse 100");
    pulse(45, 600);  expect_results(1, "pulse 45");
    pulse(80, 60);   pulse(80, 600); expect_results(0, "pile-up pair");
    pulse(90, 600);  expect_results(1, "pulse 90 after pile-up");
    checks++;
    if (n_pileups != 1) begin failures++; $display("%0d pile-ups, expected 1", n_pileups); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
