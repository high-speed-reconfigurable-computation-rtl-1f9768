// tb_sync2: checks that the two-flop synchroniser delays its input by
// exactly two receiving-clock edges, for a random bit stream on 4 bits.
module tb_sync2;
  logic       clk = 1'b0;
  logic [3:0] d, q;
  logic [3:0] hist [3];
  int checks = 0, failures = 0;

  sync2 #(.WIDTH(4)) dut (.clk, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 3; i++) hist[i] = '0;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      // hist[0] holds the value d had two rising edges ago
      if (n >= 3) begin
        checks++;
        if (q !== hist[0]) begin
          failures++;
          $display("mismatch at %0d: q=%h expected %h", n, q, hist[0]);
        end
      end
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      d = 4'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
