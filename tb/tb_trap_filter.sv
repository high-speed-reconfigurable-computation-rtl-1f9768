// tb_trap_filter: drives random operand quads into one trapezoidal filter
// and compares its output with an integer model of
//   O[n] = O[n-1] + WIN2_NEW - WIN2_OLD - WIN1_NEW + WIN1_OLD  (mod 2^16),
// including extreme operands (+127 / -128), a clear in the middle of the run
// and the one-clock latency from operand to output.
module tb_trap_filter;
  import pd_pkg::*;
  logic    clk = 1'b0, rst, clear;
  sample_t w2new, w2old, w1new, w1old;
  acc_t    out;
  int checks = 0, failures = 0;
  int model;

  trap_filter dut (.clk, .rst, .clear, .w2new, .w2old, .w1new, .w1old, .out);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_and_check(input sample_t a, b, c, d, input logic clr);
    w2new = a; w2old = b; w1new = c; w1old = d; clear = clr;
    @(posedge clk);
    #1;
    if (clr) model = 0;
    else     model = model + int'(a) - int'(b) - int'(c) + int'(d);
    checks++;
    if (out !== acc_t'(model)) begin
      failures++;
      $display("mismatch: out=%0d expected %0d", out, acc_t'(model));
    end
  endtask

  initial begin
    rst = 1'b1; clear = 1'b0;
    w2new = '0; w2old = '0; w1new = '0; w1old = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    model = 0;
    // large positive run, pushes the accumulator up to its range
    for (int i = 0; i < 100; i++) drive_and_check(8'sd127, -8'sd128, -8'sd128, 8'sd127, 1'b0);
    for (int i = 0; i < 100; i++) drive_and_check(-8'sd128, 8'sd127, 8'sd127, -8'sd128, 1'b0);
    for (int i = 0; i < 2000; i++)
      drive_and_check(sample_t'($urandom), sample_t'($urandom), sample_t'($urandom),
                      sample_t'($urandom), (i == 1000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
