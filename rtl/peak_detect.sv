// peak_detect: stage 3 of the filter datapath (peak detection and pile-up
// rejection).
//
// Each filter output is compared every clock with its two thresholds: above
// the upper threshold ("up") and below the lower threshold ("lo"). The FSM
// reacts to threshold crossings, i.e. to a comparator output that was 0 on
// the previous clock and is 1 now:
//   FF+ fast output crosses above its upper threshold
//   FF- fast output crosses below its lower threshold
//   SF+ / SF-  the same for the slow filter
// Event FSM:
//   0 --FF+--> 1;  1 --FF- --> 2;  1 --SF+--> 3;
//   2 --SF+--> 4;  2 --FF+--> pile-up;
//   3 --FF- --> 4;  3 --SF- --> pile-up;
//   4 --SF- --> event;  4 --FF+--> pile-up;
//   pile-up and event --> 0 on the next clock.
// A complete event means the fast filter triggered and fell back, and the
// slow filter rose and fell, in that interleaving; anything else is a pile-up
// and is discarded. Because state 0 waits for a fresh FF+ crossing, a pulse
// that caused a pile-up cannot start the next event by itself.
//
// A third comparator per filter checks the output against a running-maximum
// register, which is loaded when the output is both above the upper threshold
// and above the stored maximum, so it holds the pulse peak. The maxima are
// restarted when a new event begins (FF+ in state 0); that
// restart is this implementation's reading of "keeps it until a new event has
// started". If in state 1 both the slow filter rises and the fast filter falls
// in the same clock, the FSM goes straight to 4 (this implementation's choice;
// the event graph does not show a simultaneous case). Reading the arrows as
// crossings rather than levels is also this implementation's reading.
//
// For each clean event the two 16-bit peaks are copied into a result register
// ({slow, fast}) and offered over a four-phase handshake: valid rises, the
// receiver raises ack (ack arrives already synchronised), valid falls, ack
// falls. A clean event that completes while a previous result is still in
// its handshake is dropped, as a single result register is all there is.
// Thresholds are signed 16-bit values; the comparisons are signed.
//
// Timing: a filter output crossing a threshold at edge k changes the FSM
// state at edge k+1; valid rises one clock after the FSM reaches "event".
module peak_detect
  import pd_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  acc_t      slow_in,      // slow filter output (stage 2 register)
  input  acc_t      fast_in,      // fast filter output (stage 2 register)
  input  filt_thr_t slow_thr,
  input  filt_thr_t fast_thr,
  input  logic      ack,          // synchronised acknowledge from the bus side
  output logic      valid,
  output result_t   result
);

  localparam acc_t ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  pd_state_t state, state_nxt;
  acc_t      slow_max, fast_max;
  logic      slow_up, slow_lo, slow_newmax;
  logic      fast_up, fast_lo, fast_newmax;
  logic      slow_up_d, slow_lo_d, fast_up_d, fast_lo_d;
  logic      ff_rise, ff_fall, sf_rise, sf_fall;
  logic      ev_begin;

  // comparators
  always_comb begin
    slow_up     = slow_in > slow_thr.upper;
    slow_lo     = slow_in < slow_thr.lower;
    slow_newmax = slow_in > slow_max;
    fast_up     = fast_in > fast_thr.upper;
    fast_lo     = fast_in < fast_thr.lower;
    fast_newmax = fast_in > fast_max;
    ff_rise     = fast_up && !fast_up_d;
    ff_fall     = fast_lo && !fast_lo_d;
    sf_rise     = slow_up && !slow_up_d;
    sf_fall     = slow_lo && !slow_lo_d;
  end

  // event FSM
  always_comb begin
    state_nxt = state;
    unique case (state)
      PD_S0: if (ff_rise) state_nxt = PD_S1;
      PD_S1: begin
        if (sf_rise && ff_fall) state_nxt = PD_S4;
        else if (sf_rise)       state_nxt = PD_S3;
        else if (ff_fall)       state_nxt = PD_S2;
      end
      PD_S2: begin
        if (ff_rise)      state_nxt = PD_PILEUP;
        else if (sf_rise) state_nxt = PD_S4;
      end
      PD_S3: begin
        if (ff_fall)      state_nxt = PD_S4;
        else if (sf_fall) state_nxt = PD_PILEUP;
      end
      PD_S4: begin
        if (ff_rise)      state_nxt = PD_PILEUP;
        else if (sf_fall) state_nxt = PD_EVENT;
      end
      PD_PILEUP, PD_EVENT: state_nxt = PD_S0;
      default:             state_nxt = PD_S0;
    endcase
  end

  assign ev_begin = (state == PD_S0) && ff_rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= PD_S0;
      slow_up_d <= 1'b0;
      slow_lo_d <= 1'b0;
      fast_up_d <= 1'b0;
      fast_lo_d <= 1'b0;
      slow_max  <= ACC_MIN;
      fast_max <= ACC_MIN;
    end else begin
      state     <= state_nxt;
      slow_up_d <= slow_up;
      slow_lo_d <= slow_lo;
      fast_up_d <= fast_up;
      fast_lo_d <= fast_lo;
      if (ev_begin) begin
        fast_max <= fast_in;
        slow_max <= slow_up ? slow_in : ACC_MIN;
      end else begin
        if (fast_up && fast_newmax) fast_max <= fast_in;
        if (slow_up && slow_newmax) slow_max <= slow_in;
      end
    end
  end

  // result register and four-phase sender
  always_ff @(posedge clk) begin
    if (rst) begin
      valid  <= 1'b0;
      result <= '0;
    end else if (valid) begin
      if (ack) valid <= 1'b0;
    end else if (state == PD_EVENT && !ack) begin
      valid  <= 1'b1;
      result <= '{slow_peak: slow_max, fast_peak: fast_max};
    end
  end

  // Four-phase rule: valid may fall only after ack has risen.
  property p_valid_held;
    @(posedge clk) disable iff (rst) (valid && !ack) |=> valid;
  endproperty
  a_valid_held: assert property (p_valid_held);

endmodule
