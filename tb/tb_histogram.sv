`timescale 1ns / 1ps
// tb_histogram: pulse-height measurement runs through the complete pulse
// detector at its default size (256-sample FIFO), one run per filter
// setting. The settings are the four dual-filter configurations used for
// the Cobalt-60 pulse-height histograms (fast 50/15, 50/15, 50/50, 25/15 and
// slow 100/15 or 100/50, window/gap, with the thresholds below) and the
// default host configuration (slow 100/30, fast 50/30).
//
// For each run the testbench acts as the host: it computes the FIFO
// pointers from window and gap, writes the four filter registers, issues
// RECONF and START, then feeds a train of isolated pulses of random height
// (5-sample rise, 100-sample linear decay, +-1 LSB noise, random spacing)
// into the 100 MHz ADC input while polling DATA_RDY over the 40 MHz APB.
// Every returned result must equal the maxima of an independent
// sample-by-sample model of both filters over that pulse, no pulse may be
// lost and none may be duplicated. The filter outputs are also compared
// with the model on every ADC clock, which checks the one-sample-per-clock
// rate with no dead time. The host divides each slow peak by the window
// width and bins it; the histogram of the hardware results must equal the
// histogram of the model peaks, and is printed.
//
// A last run sets both filters to window 48, gap 16 with thresholds out of
// reach and feeds a noise-free step of height 50: the output must trace the
// trapezoid exactly, rising 50 per sample for 48 samples, flat at 2400 for
// 16 samples, and falling back to 0 over 48 samples.
module tb_histogram;
  import pd_pkg::*;
  localparam int DEPTH  = 256;
  localparam int NPULSE = 150;   // pulses per run
  localparam int NBINS  = 16;    // histogram bins over 0..127 (peak / w)

  logic        pclk = 1'b0, adc_clk = 1'b0, presetn;
  logic        psel, penable, pwrite;
  logic [31:0] paddr, pwdata, prdata;
  logic [7:0]  adc_data;
  logic [15:0] slow_out, fast_out;
  int checks = 0, failures = 0;

  pulse_detector dut (
    .pclk, .presetn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .adc_clk, .adc_data, .slow_out, .fast_out
  );

  always #12.5 pclk    = ~pclk;
  always #5    adc_clk = ~adc_clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ model
  int sw2o, sw1n, sw1o, fw2o, fw1n, fw1o;
  int pend_s [3], pend_f [3];
  int model_fifo [DEPTH];
  int exp_s [$], exp_f [$];
  int slow_pk, fast_pk;
  bit model_check = 1'b0;

  function automatic int wsum(int lo, int hi);
    int s = 0;
    for (int i = lo; i < hi && i < DEPTH; i++) s += model_fifo[i];
    return s;
  endfunction

  initial begin
    for (int i = 0; i < DEPTH; i++) model_fifo[i] = 0;
    forever begin
      logic st, clr, rs;
      logic [7:0] smp;
      @(negedge adc_clk);
      st = dut.u_dp.start_s; clr = dut.u_dp.cfg_applied; rs = dut.u_dp.rst; smp = adc_data;
      @(posedge adc_clk);
      if (rs || clr) begin
        for (int i = 0; i < DEPTH; i++) model_fifo[i] = 0;
        exp_s.delete(); exp_f.delete();
        exp_s.push_back(0); exp_f.push_back(0);
        if (clr) begin
          sw2o = pend_s[0]; sw1n = pend_s[1]; sw1o = pend_s[2];
          fw2o = pend_f[0]; fw1n = pend_f[1]; fw1o = pend_f[2];
        end
      end else begin
        for (int i = DEPTH - 1; i > 0; i--) model_fifo[i] = model_fifo[i-1];
        model_fifo[0] = st ? int'($signed(smp ^ 8'h80)) : 0;
      end
      exp_s.push_back(wsum(0, sw2o) - wsum(sw1n, sw1o));
      exp_f.push_back(wsum(0, fw2o) - wsum(fw1n, fw1o));
      #1;
      if (exp_s.size() > 2) begin
        int es, ef;
        es = exp_s.pop_front();
        ef = exp_f.pop_front();
        if (model_check && !rs && !dut.u_dp.rst) begin
          checks++;
          if (slow_out !== 16'(es) || fast_out !== 16'(ef)) begin
            failures++;
            if (failures < 10)
              $display("t=%0t filter outputs %0d/%0d expected %0d/%0d", $time,
                       $signed(slow_out), $signed(fast_out), es, ef);
          end
          if (es > slow_pk) slow_pk = es;
          if (ef > fast_pk) fast_pk = ef;
        end
      end
    end
  end

  // -------------------------------------------------------------------- APB
  semaphore bus = new(1);

  task automatic apb_write(input logic [2:0] idx, input logic [31:0] d);
    bus.get(1);
    @(posedge pclk); #1;
    psel = 1'b1; pwrite = 1'b1; paddr = 32'h8000_0500 | {27'd0, idx, 2'b00}; pwdata = d;
    @(posedge pclk); #1;
    penable = 1'b1;
    @(posedge pclk); #1;
    psel = 1'b0; penable = 1'b0;
    bus.put(1);
  endtask

  task automatic apb_read(input logic [2:0] idx, output logic [31:0] d);
    bus.get(1);
    @(posedge pclk); #1;
    psel = 1'b1; pwrite = 1'b0; paddr = 32'h8000_0500 | {27'd0, idx, 2'b00};
    @(posedge pclk); #1;
    penable = 1'b1;
    @(posedge pclk);
    d = prdata;
    #1 psel = 1'b0; penable = 1'b0;
    bus.put(1);
  endtask

  task automatic wait_state(input ctrl_state_t s, input string what);
    logic [31:0] c;
    int n = 0;
    do begin apb_read(REG_CTRL, c); n++; end while (c[4:3] != s && n < 500);
    checks++;
    if (c[4:3] != s) begin failures++; $display("%s: state %0d", what, c[4:3]); end
  endtask

  // host polling of DATA_RDY / result
  result_t got [$];
  bit poll_en = 1'b0;
  initial begin
    logic [31:0] c, r;
    forever begin
      if (poll_en) begin
        apb_read(REG_CTRL, c);
        if (c[CTRL_DATA_RDY]) begin
          apb_read(REG_RESULT, r);
          got.push_back(result_t'(r));
        end
      end else begin
        @(posedge pclk);
      end
    end
  end

  // ------------------------------------------------------------------ ADC
  task automatic pulse(input int a, input int len);
    int v;
    @(posedge adc_clk); #1;
    for (int t = 0; t < len; t++) begin
      if (t < 5)        v = a * t / 5;
      else if (t < 105) v = a * (105 - t) / 100;
      else              v = 0;
      v = v + $urandom_range(0, 2) - 1;
      adc_data = 8'(v + 128);
      @(posedge adc_clk); #1;
    end
  endtask

  // ------------------------------------------------------------------- runs
  typedef struct {
    string name;
    int sw, sg, sup, sdn;
    int fw, fg, fup, fdn;
  } run_cfg_t;

  run_cfg_t runs [5];
  int total_results = 0;

  task automatic do_run(input run_cfg_t rc);
    logic [31:0] c;
    int hist_hw [NBINS], hist_model [NBINS];
    int nres = 0, nmiss = 0;
    for (int b = 0; b < NBINS; b++) begin hist_hw[b] = 0; hist_model[b] = 0; end

    // stop, load the pointers and thresholds, reconfigure, start
    poll_en = 1'b0;
    apb_write(REG_CTRL, 32'h0);
    wait_state(CS_IDLE, {rc.name, ": idle"});
    apb_write(REG_SLOW_CFG, {8'(2*rc.sw + rc.sg), 8'(rc.sw + rc.sg), 8'(rc.sw), 8'd0});
    apb_write(REG_FAST_CFG, {8'(2*rc.fw + rc.fg), 8'(rc.fw + rc.fg), 8'(rc.fw), 8'd0});
    apb_write(REG_SLOW_THR, {16'(rc.sup), 16'(rc.sdn)});
    apb_write(REG_FAST_THR, {16'(rc.fup), 16'(rc.fdn)});
    pend_s = '{rc.sw, rc.sw + rc.sg, 2*rc.sw + rc.sg};
    pend_f = '{rc.fw, rc.fw + rc.fg, 2*rc.fw + rc.fg};
    apb_write(REG_CTRL, 32'h4);
    wait_state(CS_IDLE, {rc.name, ": idle after reconfiguration"});
    apb_read(REG_CTRL, c);
    checks++;
    if (c[CTRL_RECONF]) begin failures++; $display("%s: RECONF did not clear", rc.name); end
    apb_write(REG_CTRL, 32'h2);
    wait_state(CS_RUNNING, {rc.name, ": running"});
    got.delete();
    poll_en = 1'b1;
    repeat (300) @(posedge adc_clk);

    for (int p = 0; p < NPULSE; p++) begin
      int amp;
      amp = $urandom_range(45, 115);
      slow_pk = -100000; fast_pk = -100000;
      pulse(amp, 420 + $urandom_range(0, 200));
      repeat (120) @(posedge pclk);       // result crosses and is read
      checks++;
      if (got.size() != 1) begin
        failures++; nmiss++;
        if (nmiss < 5)
          $display("%s: pulse %0d (amplitude %0d) gave %0d results", rc.name, p, amp, got.size());
      end else begin
        int b_hw, b_model;
        checks++;
        if (int'(got[0].slow_peak) != slow_pk || int'(got[0].fast_peak) != fast_pk) begin
          failures++;
          $display("%s: pulse %0d peaks %0d/%0d expected %0d/%0d", rc.name, p,
                   got[0].slow_peak, got[0].fast_peak, slow_pk, fast_pk);
        end
        // host side: divide by the window width, then bin
        b_hw    = (int'(got[0].slow_peak) / rc.sw) / (128 / NBINS);
        b_model = (slow_pk / rc.sw) / (128 / NBINS);
        if (b_hw >= 0 && b_hw < NBINS)       hist_hw[b_hw]++;
        if (b_model >= 0 && b_model < NBINS) hist_model[b_model]++;
        nres++;
      end
      got.delete();
    end

    checks++;
    if (nres != NPULSE) begin
      failures++; $display("%s: %0d results for %0d pulses", rc.name, nres, NPULSE);
    end
    $display("%s: %0d pulses, %0d results; histogram of slow peak / w:", rc.name, NPULSE, nres);
    for (int b = 0; b < NBINS; b++) begin
      checks++;
      if (hist_hw[b] != hist_model[b]) begin
        failures++;
        $display("  bin %0d: %0d, model %0d", b, hist_hw[b], hist_model[b]);
      end
      if (hist_hw[b] != 0)
        $display("  %3d..%3d  %0d", b * (128 / NBINS), (b + 1) * (128 / NBINS) - 1, hist_hw[b]);
    end
    total_results += nres;
  endtask

  // step response of both filters, window w and gap g
  task automatic step_run(input int w, g, a);
    logic [31:0] c;
    int seen [$];
    poll_en = 1'b0;
    apb_write(REG_CTRL, 32'h0);
    wait_state(CS_IDLE, "step: idle");
    apb_write(REG_SLOW_CFG, {8'(2*w + g), 8'(w + g), 8'(w), 8'd0});
    apb_write(REG_FAST_CFG, {8'(2*w + g), 8'(w + g), 8'(w), 8'd0});
    apb_write(REG_SLOW_THR, {16'd32767, 16'd32767});
    apb_write(REG_FAST_THR, {16'd32767, 16'd32767});
    pend_s = '{w, w + g, 2*w + g};
    pend_f = '{w, w + g, 2*w + g};
    apb_write(REG_CTRL, 32'h6);
    wait_state(CS_RUNNING, "step: running");
    @(posedge adc_clk); #1 adc_data = 8'd128;
    repeat (300) @(posedge adc_clk);
    #1 adc_data = 8'(128 + a);
    // collect the outputs from the first clock at which the step shows
    for (int t = 0; t < 3 * (2*w + g); t++) begin
      @(posedge adc_clk); #2;
      if (seen.size() > 0 || slow_out != 16'd0) seen.push_back(int'($signed(slow_out)));
      checks++;
      if (slow_out != fast_out) begin failures++; $display("step: slow and fast differ"); end
    end
    for (int k = 0; k < 2*w + g + 20; k++) begin
      int e;
      if (k < w)           e = a * (k + 1);
      else if (k < w + g)  e = a * w;
      else if (k < 2*w+g)  e = a * (2*w + g - 1 - k);
      else                 e = 0;
      checks++;
      if (k >= seen.size() || seen[k] != e) begin
        failures++;
        if (failures < 10) $display("step: sample %0d is %0d, expected %0d", k,
                                    k < seen.size() ? seen[k] : -1, e);
      end
    end
    $display("step response w=%0d g=%0d: %0d samples checked", w, g, 2*w + g + 20);
    @(posedge adc_clk); #1 adc_data = 8'd128;
    apb_write(REG_CTRL, 32'h0);
    wait_state(CS_IDLE, "step: idle at end");
  endtask

  initial begin
    presetn = 1'b0; psel = 1'b0; penable = 1'b0; pwrite = 1'b0; paddr = '0; pwdata = '0;
    adc_data = 8'd128;
    sw2o = 0; sw1n = 0; sw1o = 0; fw2o = 0; fw1n = 0; fw1o = 0;
    slow_pk = -100000; fast_pk = -100000;
    runs[0] = '{"F 50/15/256/128, S 100/15/1000/1000", 100, 15, 1000, 1000, 50, 15, 256, 128};
    runs[1] = '{"F 50/15/512/256, S 100/15/1000/1000", 100, 15, 1000, 1000, 50, 15, 512, 256};
    runs[2] = '{"F 50/50/512/256, S 100/50/1000/1000", 100, 50, 1000, 1000, 50, 50, 512, 256};
    runs[3] = '{"F 25/15/256/128, S 100/15/1000/1000", 100, 15, 1000, 1000, 25, 15, 256, 128};
    runs[4] = '{"F 50/30/1024/512, S 100/30/2048/1024", 100, 30, 2048, 1024, 50, 30, 1024, 512};
    repeat (4) @(posedge pclk);
    #1 presetn = 1'b1;
    wait_state(CS_IDLE, "idle after bus reset");
    model_check = 1'b1;

    foreach (runs[i]) do_run(runs[i]);
    step_run(48, 16, 50);

    checks++;
    if (total_results != NPULSE * 5) begin
      failures++; $display("total results %0d, expected %0d", total_results, NPULSE * 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
