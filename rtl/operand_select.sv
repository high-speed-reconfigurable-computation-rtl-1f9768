// operand_select: stage 1 of the filter datapath (operand selection).
//
// A shift-register FIFO of DEPTH samples, made of flip-flops, keeps the most
// recent ADC samples; position 0 is the newest. Each clock a new sample enters
// and the oldest is dropped. Before entering, the ADC's offset-binary code
// (all zeros = most negative) is turned into two's complement by inverting the
// MSB. While start is low, zeros are shifted in instead of the ADC sample.
//
// Each of the two filters (slow, fast) needs four operands per clock: the
// samples at the window edges WIN2_NEW, WIN2_OLD, WIN1_NEW, WIN1_OLD.
// WIN2_NEW is always FIFO position 0 and is forwarded directly; the other
// three per filter are picked by DEPTH:1 multiplexers steered by the pointers
// in the filter configuration (six multiplexers in all). Pointers are static
// during a measurement, so the wide multiplexers are not a timing path in
// operation. All eight operands are registered at the stage boundary.
//
// clear empties the FIFO (all zeros) and is used when a new configuration is
// applied or on reset; that clearing is this implementation's choice.
//
// Timing: an ADC sample presented at edge k enters FIFO position 0 at edge k
// and appears on the win2_new operand outputs after edge k+1.
module operand_select
  import pd_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                 clk,
  input  logic                 rst,        // synchronous, active high
  input  logic                 clear,      // synchronous FIFO clear
  input  logic                 start,      // 1: ADC samples enter; 0: zeros enter
  input  logic [SAMPLE_W-1:0]  adc_data,   // offset-binary ADC code
  input  filt_cfg_t            slow_cfg,
  input  filt_cfg_t            fast_cfg,
  // registered operands, two's complement
  output sample_t              slow_w2new, slow_w2old, slow_w1new, slow_w1old,
  output sample_t              fast_w2new, fast_w2old, fast_w1new, fast_w1old
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  sample_t fifo [DEPTH];
  sample_t sample_in;

  // offset binary -> two's complement; zero while stopped
  assign sample_in = start ? sample_t'({~adc_data[SAMPLE_W-1], adc_data[SAMPLE_W-2:0]})
                           : '0;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
    end else begin
      fifo[0] <= sample_in;
      for (int i = 1; i < DEPTH; i++) fifo[i] <= fifo[i-1];
    end
  end

  // DEPTH:1 selection; pointers beyond the FIFO read as zero.
  function automatic sample_t pick(input ptr_t p);
    sample_t v;
    v = '0;
    if (int'(p) < DEPTH) v = fifo[IDX_W'(p)];
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      slow_w2new <= '0; slow_w2old <= '0; slow_w1new <= '0; slow_w1old <= '0;
      fast_w2new <= '0; fast_w2old <= '0; fast_w1new <= '0; fast_w1old <= '0;
    end else begin
      slow_w2new <= fifo[0];
      slow_w2old <= pick(slow_cfg.win2_old);
      slow_w1new <= pick(slow_cfg.win1_new);
      slow_w1old <= pick(slow_cfg.win1_old);
      fast_w2new <= fifo[0];
      fast_w2old <= pick(fast_cfg.win2_old);
      fast_w1new <= pick(fast_cfg.win1_new);
      fast_w1old <= pick(fast_cfg.win1_old);
    end
  end

endmodule
