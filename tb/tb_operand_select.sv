// tb_operand_select: feeds random offset-binary samples into the operand
// selection stage and checks all eight registered operands against a model
// FIFO (position 0 newest, MSB of each sample inverted), for several random
// pointer sets, the start gating (zeros enter while start is low) and clear.
module tb_operand_select;
  import pd_pkg::*;
  localparam int unsigned DEPTH = 256;
  logic        clk = 1'b0, rst, clear, start;
  logic [7:0]  adc_data;
  filt_cfg_t   slow_cfg, fast_cfg;
  sample_t     s2n, s2o, s1n, s1o, f2n, f2o, f1n, f1o;
  sample_t     model [DEPTH];
  int checks = 0, failures = 0;

  operand_select #(.DEPTH(DEPTH)) dut (
    .clk, .rst, .clear, .start, .adc_data, .slow_cfg, .fast_cfg,
    .slow_w2new(s2n), .slow_w2old(s2o), .slow_w1new(s1n), .slow_w1old(s1o),
    .fast_w2new(f2n), .fast_w2old(f2o), .fast_w1new(f1n), .fast_w1old(f1o)
  );

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input sample_t got, input sample_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0; start = 1'b0; adc_data = '0;
    slow_cfg = '{win1_old: 8'd230, win1_new: 8'd130, win2_old: 8'd100, reserved: 8'd0};
    fast_cfg = '{win1_old: 8'd130, win1_new: 8'd80,  win2_old: 8'd50,  reserved: 8'd0};
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      // inputs for the coming edge
      start    = (n % 700) < 600;
      clear    = (n == 1500);
      adc_data = 8'($urandom);
      if (n % 500 == 0 && n > 0) begin
        slow_cfg = '{win1_old: 8'($urandom), win1_new: 8'($urandom), win2_old: 8'($urandom), reserved: 8'd0};
        fast_cfg = '{win1_old: 8'($urandom), win1_new: 8'($urandom), win2_old: 8'($urandom), reserved: 8'd0};
      end
      @(posedge clk);
      #1;
      // operands were taken from the model FIFO as it stood before this edge;
      // a clear zeroes them instead
      check(s2n, clear ? '0 : model[0], "slow w2new");
      check(s2o, clear ? '0 : model[slow_cfg.win2_old], "slow w2old");
      check(s1n, clear ? '0 : model[slow_cfg.win1_new], "slow w1new");
      check(s1o, clear ? '0 : model[slow_cfg.win1_old], "slow w1old");
      check(f2n, clear ? '0 : model[0], "fast w2new");
      check(f2o, clear ? '0 : model[fast_cfg.win2_old], "fast w2old");
      check(f1n, clear ? '0 : model[fast_cfg.win1_new], "fast w1new");
      check(f1o, clear ? '0 : model[fast_cfg.win1_old], "fast w1old");
      if (clear) begin
        for (int i = 0; i < DEPTH; i++) model[i] = '0;
      end else begin
        for (int i = DEPTH - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = start ? sample_t'(adc_data ^ 8'h80) : '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
