// pulse_detector: digital radiation pulse detector, an AMBA APB peripheral.
//
// 8-bit samples from an ADC are shaped by two trapezoidal filters running at
// the ADC rate: a slow one for a precise pulse height and a fast one that
// triggers on each particle and exposes pile-ups (two pulses too close for
// the slow filter to separate). Clean pulses yield one 32-bit result
// {slow peak, fast peak} that a processor reads over APB; the processor also
// sets the window/gap pointers and the thresholds, and divides the peaks by
// the window width (the hardware does not).
//
// Two clock domains: filter_datapath runs on the ADC clock (100 MHz in the
// design), amba_control on the bus clock (40 MHz in the design). Between them
// pass only: the soft-reset and start lines (two-flop synchronisers), the
// 32-bit configuration bus with a four-phase req/ack pair, and the 32-bit
// result bus with a four-phase valid/ack pair.
//
// Ports: the APB slave signals (PCLK domain), the ADC clock and samples, and
// the two 16-bit filter outputs (ADC clock domain) meant for a DAC. The bus
// reset presetn also resets the datapath, through the soft-reset line, which
// is high while the control block is in its RESET state.
module pulse_detector
  import pd_pkg::*;
#(
  parameter int unsigned DEPTH        = 256,
  parameter int unsigned RESET_CYCLES = 8
) (
  // APB slave
  input  logic                pclk,
  input  logic                presetn,
  input  logic                psel,
  input  logic                penable,
  input  logic                pwrite,
  input  logic [31:0]         paddr,
  input  logic [31:0]         pwdata,
  output logic [31:0]         prdata,
  // ADC
  input  logic                adc_clk,
  input  logic [SAMPLE_W-1:0] adc_data,
  // filter outputs, adc_clk domain
  output logic [ACC_W-1:0]    slow_out,
  output logic [ACC_W-1:0]    fast_out
);

  logic             soft_reset, start, cfg_req, cfg_ack, res_valid, res_ack;
  logic [REG_W-1:0] cfg_data, res_data;

  amba_control #(.RESET_CYCLES(RESET_CYCLES)) u_amba (
    .pclk, .presetn, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .soft_reset, .start, .cfg_req, .cfg_data, .cfg_ack,
    .res_valid, .res_data, .res_ack
  );

  filter_datapath #(.DEPTH(DEPTH)) u_dp (
    .clk(adc_clk), .adc_data,
    .soft_reset, .start, .cfg_req, .cfg_data, .cfg_ack,
    .res_valid, .res_data, .res_ack,
    .slow_out(slow_out), .fast_out(fast_out)
  );

endmodule
