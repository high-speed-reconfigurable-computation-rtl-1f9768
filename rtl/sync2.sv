// sync2: two-flip-flop synchroniser for one signal entering a clock domain.
//
// Every single-bit signal that crosses between the bus clock and the ADC
// clock passes through two flip-flops in series on the receiving side, which
// makes a metastable first stage very unlikely to reach the logic behind it.
// Multi-bit buses do not use this block per bit; they are guarded by a
// four-phase request/acknowledge pair whose two lines use it.
//
// Interface: clk is the receiving clock, d the asynchronous input, q the
// synchronised output. Latency: q follows d after two rising edges of clk.
// The two-flop scheme is the design's; the flops have no reset (their
// content is flushed after two clocks), which is this implementation's choice.
module sync2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end

endmodule
