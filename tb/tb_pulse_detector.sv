`timescale 1ns / 1ps
// tb_pulse_detector: end-to-end test of the pulse detector at its default
// size (256-sample FIFO), with a 100 MHz ADC clock and a 40 MHz APB clock.
// The testbench acts as the processor: it writes the filter registers,
// issues RECONF and START through the configuration/status register, and
// polls DATA_RDY and the result register, as host software would.
//
// Sequence and mechanisms exercised (each is counted; one that never
// happens is a failure):
//  1. bus reset, RESET -> IDLE; configuration A (slow 100/30, fast 50/30,
//     thresholds 2048/1024 and 1024/512) sent by RECONF from IDLE
//  2. START; isolated pulses each give one result whose peaks equal the
//     maxima of a model of both filters (clean events)
//  3. RECONF while RUNNING to configuration B (fast 10/5, 256/128): the
//     control block passes through RECONF and resumes RUNNING
//  4. two pulses 60 samples apart: rejected as a pile-up
//  5. two isolated pulses without the host reading: the newer result
//     overwrites the unread one and DATA_RDY stays set
//  6. STOP, then a pulse while stopped gives no result
//  7. soft reset, then START again; a pulse gives a result
// The filter outputs are also compared every ADC clock with the model.
module tb_pulse_detector;
  import pd_pkg::*;
  localparam int DEPTH = 256;
  logic        pclk = 1'b0, adc_clk = 1'b0, presetn;
  logic        psel, penable, pwrite;
  logic [31:0] paddr, pwdata, prdata;
  logic [7:0]  adc_data;
  logic [15:0] slow_out, fast_out;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_clean = 0, n_pileup = 0, n_reconf_idle = 0, n_reconf_run = 0;
  int n_overwrite = 0, n_stop = 0, n_soft_reset = 0, n_stopped_pulse = 0;

  pulse_detector dut (
    .pclk, .presetn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .adc_clk, .adc_data, .slow_out, .fast_out
  );

  always #12.5 pclk    = ~pclk;
  always #5    adc_clk = ~adc_clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ model
  // Filter settings currently in force in the model (copied when the DUT
  // applies a new configuration).
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

  always @(posedge adc_clk) if (dut.u_dp.u_stage3.state == PD_PILEUP) n_pileup++;

  // -------------------------------------------------------------------- APB
  // the script and the polling process share the bus, one transfer at a time
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

  // host: set filter registers from window width w and gap g (as the host
  // software computes the pointers), then reconfigure
  task automatic configure(input int sw, sg, int sup, sdn, input int fw, fg, int fup, fdn,
                           input logic keep_start);
    logic [31:0] c;
    apb_write(REG_SLOW_CFG, {8'(2*sw + sg), 8'(sw + sg), 8'(sw), 8'd0});
    apb_write(REG_FAST_CFG, {8'(2*fw + fg), 8'(fw + fg), 8'(fw), 8'd0});
    apb_write(REG_SLOW_THR, {16'(sup), 16'(sdn)});
    apb_write(REG_FAST_THR, {16'(fup), 16'(fdn)});
    pend_s = '{sw, sw + sg, 2*sw + sg};
    pend_f = '{fw, fw + fg, 2*fw + fg};
    apb_read(REG_CTRL, c);
    if (c[4:3] == CS_RUNNING) n_reconf_run++; else n_reconf_idle++;
    apb_write(REG_CTRL, keep_start ? 32'h6 : 32'h4);
    apb_read(REG_CTRL, c);
    checks++;
    if (c[4:3] != CS_RECONF && c[CTRL_RECONF]) begin
      failures++; $display("RECONF not entered");
    end
    wait_state(keep_start ? CS_RUNNING : CS_IDLE, "after reconfiguration");
    apb_read(REG_CTRL, c);
    checks++;
    if (c[CTRL_RECONF]) begin failures++; $display("RECONF did not clear"); end
  endtask

  // host polling of DATA_RDY / result, enabled by poll_en
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

  task automatic expect_results(input int n, input string what);
    repeat (200) @(posedge pclk);
    checks++;
    if (got.size() != n) begin
      failures++;
      $display("%s: %0d results, expected %0d", what, got.size(), n);
    end
    if (n == 1 && got.size() == 1) begin
      checks++;
      if (int'(got[0].slow_peak) != slow_pk || int'(got[0].fast_peak) != fast_pk) begin
        failures++;
        $display("%s: peaks %0d/%0d expected %0d/%0d", what, got[0].slow_peak,
                 got[0].fast_peak, slow_pk, fast_pk);
      end else n_clean++;
    end
    got.delete();
    slow_pk = -100000; fast_pk = -100000;
  endtask

  // ---------------------------------------------------------------- script
  logic [31:0] c, r;
  initial begin
    presetn = 1'b0; psel = 1'b0; penable = 1'b0; pwrite = 1'b0; paddr = '0; pwdata = '0;
    adc_data = 8'd128;
    sw2o = 0; sw1n = 0; sw1o = 0; fw2o = 0; fw1n = 0; fw1o = 0;
    slow_pk = -100000; fast_pk = -100000;
    repeat (4) @(posedge pclk);
    #1 presetn = 1'b1;
    wait_state(CS_IDLE, "idle after bus reset");
    model_check = 1'b1;

    // 1-2: configuration A from idle, then start, isolated pulses
    configure(100, 30, 2048, 1024, 50, 30, 1024, 512, 1'b0);
    apb_write(REG_CTRL, 32'h2);
    wait_state(CS_RUNNING, "running");
    poll_en = 1'b1;
    repeat (50) @(posedge adc_clk);
    slow_pk = -100000; fast_pk = -100000;
    pulse(60, 600);  expect_results(1, "A: pulse 60");
    pulse(100, 600); expect_results(1, "A: pulse 100");

    // 3: reconfiguration while running
    configure(100, 30, 2048, 1024, 10, 5, 256, 128, 1'b1);
    repeat (50) @(posedge adc_clk);
    slow_pk = -100000; fast_pk = -100000;
    pulse(70, 600);  expect_results(1, "B: pulse 70");

    // 4: pile-up
    begin
      int p0;
      p0 = n_pileup;
      pulse(80, 60); pulse(80, 600); expect_results(0, "B: pile-up pair");
      checks++;
      if (n_pileup != p0 + 1) begin failures++; $display("pile-up not flagged"); end
    end

    // 5: two results without reading
    poll_en = 1'b0;
    repeat (20) @(posedge pclk);
    pulse(50, 600);
    pulse(90, 600);
    begin
      int sp, fp;
      result_t rr;
      repeat (200) @(posedge pclk);
      sp = slow_pk; fp = fast_pk;       // maxima over both pulses = the second's
      apb_read(REG_CTRL, c);
      apb_read(REG_RESULT, r);
      rr = result_t'(r);
      checks++;
      if (!c[CTRL_DATA_RDY] || rr.slow_peak != 16'(sp) || rr.fast_peak != 16'(fp)) begin
        failures++;
        $display("overwrite: DATA_RDY=%0d result %h expected %0d/%0d", c[CTRL_DATA_RDY], r, sp, fp);
      end else n_overwrite++;
      apb_read(REG_CTRL, c);
      checks++;
      if (c[CTRL_DATA_RDY]) begin failures++; $display("DATA_RDY not cleared"); end
    end
    slow_pk = -100000; fast_pk = -100000;
    poll_en = 1'b1;

    // 6: stop, pulse while stopped
    apb_write(REG_CTRL, 32'h0);
    wait_state(CS_IDLE, "idle after stop");
    n_stop++;
    pulse(90, 600); expect_results(0, "pulse while stopped");
    n_stopped_pulse++;

    // 7: soft reset, configuration survives in the registers, restart
    poll_en = 1'b0;
    repeat (10) @(posedge pclk);
    apb_write(REG_CTRL, 32'h1);
    apb_read(REG_CTRL, c);
    checks++;
    if (c[4:3] != CS_RESET) begin failures++; $display("soft reset not entered"); end
    wait_state(CS_IDLE, "idle after soft reset");
    n_soft_reset++;
    configure(100, 30, 2048, 1024, 10, 5, 256, 128, 1'b0);
    apb_write(REG_CTRL, 32'h2);
    wait_state(CS_RUNNING, "running after soft reset");
    poll_en = 1'b1;
    repeat (50) @(posedge adc_clk);
    slow_pk = -100000; fast_pk = -100000;
    pulse(75, 600); expect_results(1, "pulse after soft reset");

    // every mechanism must have happened
    begin
      int counts [8];
      string names [8];
      counts = '{n_clean, n_pileup, n_reconf_idle, n_reconf_run,
                 n_overwrite, n_stop, n_soft_reset, n_stopped_pulse};
      names = '{"clean event", "pile-up", "reconf from idle", "reconf while running",
                           "result overwrite", "stop", "soft reset", "pulse while stopped"};
      for (int i = 0; i < 8; i++) begin
        checks++;
        $display("%s: %0d", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("mechanism never exercised: %s", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
