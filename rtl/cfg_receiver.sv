// cfg_receiver: filter configuration block of the datapath (ADC clock side).
//
// The bus-side control block sends the four configuration words over one
// 32-bit bus guarded by a four-phase request/acknowledge handshake, in
// register order: slow filter pointers, fast filter pointers, slow filter
// thresholds, fast filter thresholds. This block receives them: when the
// synchronised request is high and acknowledge is low, it stores the bus
// word and raises acknowledge; when request falls, it lowers acknowledge.
// A word counter says which word is arriving. The first three words wait in
// shadow registers; with the fourth, all four are copied at once into the
// active configuration that steers the filters, and "applied" pulses for one
// clock.
//
// Interface: req must come from a synchroniser; data must be stable while
// req is high (the bundled-data rule of the handshake). ack is a register
// and goes through a synchroniser on the other side. Reset clears the
// counter and the active configuration to zero.
//
// The four-phase protocol, the 32-bit configuration bus and the word layouts
// follow the design. The word order, the counter and the atomic copy are
// this implementation's choices.
module cfg_receiver
  import pd_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             req,       // synchronised request
  input  logic [REG_W-1:0] data,      // configuration bus
  output logic             ack,
  output dp_cfg_t          cfg,       // active configuration
  output logic             applied    // one-clock pulse: new configuration in force
);

  logic [1:0]       word_idx;
  logic [REG_W-1:0] shadow [3];

  always_ff @(posedge clk) begin
    if (rst) begin
      ack      <= 1'b0;
      word_idx <= '0;
      applied  <= 1'b0;
      cfg      <= '0;
      for (int i = 0; i < 3; i++) shadow[i] <= '0;
    end else begin
      applied <= 1'b0;
      if (!ack && req) begin
        ack <= 1'b1;
        if (word_idx == 2'd3) begin
          cfg     <= '{slow_cfg: filt_cfg_t'(shadow[0]),
                       fast_cfg: filt_cfg_t'(shadow[1]),
                       slow_thr: filt_thr_t'(shadow[2]),
                       fast_thr: filt_thr_t'(data)};
          applied <= 1'b1;
        end else begin
          shadow[word_idx] <= data;
        end
        word_idx <= word_idx + 2'd1;
      end else if (ack && !req) begin
        ack <= 1'b0;
      end
    end
  end

endmodule
