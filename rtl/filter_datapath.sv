// filter_datapath: the ADC-clock half of the pulse detector.
//
// A three-stage pipeline, one stage per clock:
//   1. operand_select - sample FIFO and the window-edge operand multiplexers
//   2. trap_filter x2 - slow and fast recursive trapezoidal filters
//   3. peak_detect    - thresholds, peak registers, pile-up rejection FSM
// so a sample reaches the filter outputs three clocks after it is offered.
// One new sample is accepted and one filter output pair is produced every
// clock: there is no dead time.
//
// Everything arriving from the bus clock domain is synchronised here: the
// soft reset and start bits through two-flop synchronisers, the configuration
// bus through a four-phase handshake (cfg_receiver), and the acknowledge of
// the result handshake. When a new configuration comes into force the FIFO
// and the filter feedback registers are cleared, so the recursive sums start
// from a consistent state (this implementation's choice).
//
// The two filter outputs are also brought out for a DAC, as in the design,
// at full 16-bit width; scaling them to the DAC's 8 bits is left outside.
module filter_datapath
  import pd_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                clk,          // ADC / filter clock
  input  logic [SAMPLE_W-1:0] adc_data,     // offset-binary samples
  // from the bus clock domain (asynchronous here)
  input  logic                soft_reset,
  input  logic                start,
  input  logic                cfg_req,
  input  logic [REG_W-1:0]    cfg_data,
  output logic                cfg_ack,
  output logic                res_valid,
  output logic [REG_W-1:0]    res_data,
  input  logic                res_ack,
  // filter outputs for the DAC
  output acc_t                slow_out,
  output acc_t                fast_out
);

  logic      rst, start_s, cfg_req_s, res_ack_s;
  dp_cfg_t   cfg;
  logic      cfg_applied;
  sample_t   s_w2new, s_w2old, s_w1new, s_w1old;
  sample_t   f_w2new, f_w2old, f_w1new, f_w1old;
  result_t   result;

  sync2 u_sync_rst   (.clk, .d(soft_reset), .q(rst));
  sync2 u_sync_start (.clk, .d(start),      .q(start_s));
  sync2 u_sync_req   (.clk, .d(cfg_req),    .q(cfg_req_s));
  sync2 u_sync_ack   (.clk, .d(res_ack),    .q(res_ack_s));

  cfg_receiver u_cfg (
    .clk, .rst, .req(cfg_req_s), .data(cfg_data), .ack(cfg_ack),
    .cfg, .applied(cfg_applied)
  );

  operand_select #(.DEPTH(DEPTH)) u_stage1 (
    .clk, .rst, .clear(cfg_applied), .start(start_s), .adc_data,
    .slow_cfg(cfg.slow_cfg), .fast_cfg(cfg.fast_cfg),
    .slow_w2new(s_w2new), .slow_w2old(s_w2old), .slow_w1new(s_w1new), .slow_w1old(s_w1old),
    .fast_w2new(f_w2new), .fast_w2old(f_w2old), .fast_w1new(f_w1new), .fast_w1old(f_w1old)
  );

  trap_filter u_slow (
    .clk, .rst, .clear(cfg_applied),
    .w2new(s_w2new), .w2old(s_w2old), .w1new(s_w1new), .w1old(s_w1old),
    .out(slow_out)
  );

  trap_filter u_fast (
    .clk, .rst, .clear(cfg_applied),
    .w2new(f_w2new), .w2old(f_w2old), .w1new(f_w1new), .w1old(f_w1old),
    .out(fast_out)
  );

  peak_detect u_stage3 (
    .clk, .rst, .slow_in(slow_out), .fast_in(fast_out),
    .slow_thr(cfg.slow_thr), .fast_thr(cfg.fast_thr),
    .ack(res_ack_s), .valid(res_valid), .result
  );

  assign res_data = result;

endmodule
