// tb_cfg_receiver: sends random four-word configurations over the four-phase
// handshake (with random delays between phases), and checks that each word
// is acknowledged, that the active configuration changes only with the
// fourth word, all at once, and that "applied" pulses for exactly one clock.
module tb_cfg_receiver;
  import pd_pkg::*;
  logic        clk = 1'b0, rst, req, ack, applied;
  logic [31:0] data;
  dp_cfg_t     cfg, cfg_prev;
  logic [31:0] words [4];
  int checks = 0, failures = 0;
  int n_applied = 0;

  cfg_receiver dut (.clk, .rst, .req, .data, .ack, .cfg, .applied);

  always #5 clk = ~clk;
  always @(posedge clk) if (applied) n_applied++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic [31:0] w);
    data = w;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1 req = 1'b1;
    @(posedge clk iff ack);
    repeat ($urandom_range(0, 3)) @(posedge clk);
    #1 req = 1'b0;
    data = 32'($urandom);       // bus may change once the word is taken
    @(posedge clk iff !ack);
    #1;
  endtask

  initial begin
    rst = 1'b1; req = 1'b0; data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    checks++;
    if (cfg !== '0) begin failures++; $display("configuration not zero after reset"); end
    for (int k = 0; k < 20; k++) begin
      for (int i = 0; i < 4; i++) words[i] = 32'($urandom);
      cfg_prev = cfg;
      n_applied = 0;
      for (int i = 0; i < 3; i++) begin
        send(words[i]);
        checks++;
        if (cfg !== cfg_prev) begin failures++; $display("configuration changed early"); end
      end
      send(words[3]);
      checks++;
      if (cfg !== {words[0], words[1], words[2], words[3]}) begin
        failures++;
        $display("configuration %h expected %h", cfg, {words[0], words[1], words[2], words[3]});
      end
      checks++;
      if (n_applied != 1) begin failures++; $display("applied pulsed %0d times", n_applied); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
