// amba_control: the bus-clock half of the pulse detector, an AMBA APB slave.
//
// Six 32-bit registers form a word-aligned memory-mapped region (word index
// PADDR[4:2]):
//   0 configuration/status  [5] DATA_RDY (R), [4:3] STATE (R), [2] RECONF,
//                           [1] START, [0] RESET
//   1 slow filter pointers  [31:24] WIN1_OLD, [23:16] WIN1_NEW, [15:8] WIN2_OLD
//   2 fast filter pointers  same layout
//   3 slow thresholds       [31:16] upper, [15:0] lower
//   4 fast thresholds       same layout
//   5 result (R)            [31:16] slow peak, [15:0] fast peak
// A write happens in the access phase (PSEL, PENABLE and PWRITE high); read
// data is driven while PSEL is high and PWRITE low, zero otherwise. There is
// no PREADY: every transfer takes the two APB cycles. Reading the result
// register clears DATA_RDY. Words 6 and 7 read as zero. Reserved bits read as
// zero.
//
// Filter control FSM (its state is the STATE field): RESET -> IDLE after
// RESET_CYCLES clocks; IDLE -> RUNNING when START is 1; RUNNING -> IDLE when
// START is 0; IDLE or RUNNING -> RECONF when RECONF is set. In RECONF the four
// configuration words (registers 1-4) are sent one by one over the 32-bit
// configuration bus with a four-phase request/acknowledge handshake; then
// RECONF clears itself and the FSM returns to IDLE, from where it resumes
// RUNNING if START is still 1. The datapath's start line is high only in
// RUNNING, and its soft-reset line only in RESET (both registered, one
// clock after the state).
//
// Pulse retrieval FSM: IDLE -> RECEIVE when the synchronised valid is high
// while RUNNING; RECEIVE loads the result register and sets DATA_RDY;
// ACK raises acknowledge until valid falls, then back to IDLE. A new result
// overwrites an unread one.
//
// Register map, field layouts, STATE codes and both FSMs follow the design.
// This implementation's choices: RESET and RECONF are set-only from the bus
// (writing 0 has no effect; hardware clears them); writing RESET restarts the
// soft reset, which clears START, RECONF, DATA_RDY and both FSMs but keeps
// registers 1-5; the RESET state lasts RESET_CYCLES clocks; idle read data is
// zero rather than high impedance.
module amba_control
  import pd_pkg::*;
#(
  parameter int unsigned RESET_CYCLES = 8
) (
  input  logic             pclk,
  input  logic             presetn,
  input  logic             psel,
  input  logic             penable,
  input  logic             pwrite,
  input  logic [31:0]      paddr,
  input  logic [REG_W-1:0] pwdata,
  output logic [REG_W-1:0] prdata,
  // to / from the filter datapath (other clock domain)
  output logic             soft_reset,
  output logic             start,
  output logic             cfg_req,
  output logic [REG_W-1:0] cfg_data,
  input  logic             cfg_ack,
  input  logic             res_valid,
  input  logic [REG_W-1:0] res_data,
  output logic             res_ack
);

  localparam int unsigned CNT_W = $clog2(RESET_CYCLES + 1);

  ctrl_state_t      cstate;
  ret_state_t       rstate;
  logic             reset_bit, start_bit, reconf_bit, data_rdy;
  logic [REG_W-1:0] slow_cfg_q, fast_cfg_q, slow_thr_q, fast_thr_q, result_q;
  logic [CNT_W-1:0] rst_cnt;
  logic [2:0]       words_sent;
  logic             cfg_ack_s, res_valid_s;
  logic [2:0]       addr_word;
  logic             wr_en, rd_result;

  sync2 u_sync_cfg_ack   (.clk(pclk), .d(cfg_ack),   .q(cfg_ack_s));
  sync2 u_sync_res_valid (.clk(pclk), .d(res_valid), .q(res_valid_s));

  assign addr_word = paddr[4:2];
  assign wr_en     = psel && penable && pwrite;
  assign rd_result = psel && penable && !pwrite && (addr_word == REG_RESULT);

  // read multiplexer
  always_comb begin
    prdata = '0;
    if (psel && !pwrite) begin
      unique case (addr_word)
        REG_CTRL: begin
          prdata[CTRL_RESET]                      = reset_bit;
          prdata[CTRL_START]                      = start_bit;
          prdata[CTRL_RECONF]                     = reconf_bit;
          prdata[CTRL_STATE_LO +: $bits(cstate)]  = cstate;
          prdata[CTRL_DATA_RDY]                   = data_rdy;
        end
        REG_SLOW_CFG: prdata = {slow_cfg_q[31:8], 8'd0};
        REG_FAST_CFG: prdata = {fast_cfg_q[31:8], 8'd0};
        REG_SLOW_THR: prdata = slow_thr_q;
        REG_FAST_THR: prdata = fast_thr_q;
        REG_RESULT:   prdata = result_q;
        default:      prdata = '0;
      endcase
    end
  end

  // configuration word selected by the number of words already sent
  function automatic logic [REG_W-1:0] cfg_word(input logic [2:0] idx);
    unique case (idx)
      3'd0:    return slow_cfg_q;
      3'd1:    return fast_cfg_q;
      3'd2:    return slow_thr_q;
      default: return fast_thr_q;
    endcase
  endfunction

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      cstate     <= CS_RESET;
      rstate     <= RS_IDLE;
      reset_bit  <= 1'b0;
      start_bit  <= 1'b0;
      reconf_bit <= 1'b0;
      data_rdy   <= 1'b0;
      slow_cfg_q <= '0;
      fast_cfg_q <= '0;
      slow_thr_q <= '0;
      fast_thr_q <= '0;
      result_q   <= '0;
      rst_cnt    <= '0;
      words_sent <= '0;
      cfg_req    <= 1'b0;
      cfg_data   <= '0;
      res_ack    <= 1'b0;
    end else begin
      // ---- register writes
      if (wr_en) begin
        unique case (addr_word)
          REG_CTRL: begin
            if (pwdata[CTRL_RESET])  reset_bit  <= 1'b1;
            if (pwdata[CTRL_RECONF]) reconf_bit <= 1'b1;
            start_bit <= pwdata[CTRL_START];
          end
          REG_SLOW_CFG: slow_cfg_q <= {pwdata[31:8], 8'd0};
          REG_FAST_CFG: fast_cfg_q <= {pwdata[31:8], 8'd0};
          REG_SLOW_THR: slow_thr_q <= pwdata;
          REG_FAST_THR: fast_thr_q <= pwdata;
          default: ;
        endcase
      end
      if (rd_result) data_rdy <= 1'b0;

      // ---- filter control FSM
      if (cstate == CS_RESET) begin
        cfg_req <= 1'b0;
        if (rst_cnt == CNT_W'(RESET_CYCLES - 1)) begin
          cstate    <= CS_IDLE;
          reset_bit <= 1'b0;
        end else begin
          rst_cnt <= rst_cnt + 1'b1;
        end
      end else if (reset_bit) begin
        cstate     <= CS_RESET;
        rst_cnt    <= '0;
        start_bit  <= 1'b0;
        reconf_bit <= 1'b0;
        data_rdy   <= 1'b0;
        cfg_req    <= 1'b0;
      end else begin
        unique case (cstate)
          CS_IDLE: begin
            if (reconf_bit) begin
              cstate     <= CS_RECONF;
              words_sent <= '0;
            end else if (start_bit) begin
              cstate <= CS_RUNNING;
            end
          end
          CS_RUNNING: begin
            if (reconf_bit) begin
              cstate     <= CS_RECONF;
              words_sent <= '0;
            end else if (!start_bit) begin
              cstate <= CS_IDLE;
            end
          end
          CS_RECONF: begin
            if (!cfg_req && !cfg_ack_s) begin
              if (words_sent == 3'd4) begin
                reconf_bit <= 1'b0;
                cstate     <= CS_IDLE;
              end else begin
                cfg_data <= cfg_word(words_sent);
                cfg_req  <= 1'b1;
              end
            end else if (cfg_req && cfg_ack_s) begin
              cfg_req    <= 1'b0;
              words_sent <= words_sent + 3'd1;
            end
          end
          default: cstate <= CS_IDLE;
        endcase
      end

      // ---- pulse retrieval FSM
      if (cstate == CS_RESET || reset_bit) begin
        rstate  <= RS_IDLE;
        res_ack <= 1'b0;
      end else begin
        unique case (rstate)
          RS_IDLE: if (res_valid_s && cstate == CS_RUNNING) rstate <= RS_RECEIVE;
          RS_RECEIVE: begin
            result_q <= res_data;
            data_rdy <= 1'b1;
            res_ack  <= 1'b1;
            rstate   <= RS_ACK;
          end
          RS_ACK: begin
            if (!res_valid_s) begin
              res_ack <= 1'b0;
              rstate  <= RS_IDLE;
            end
          end
          default: rstate <= RS_IDLE;
        endcase
      end
    end
  end

  // Lines into the other clock domain come straight from flip-flops, so they
  // cannot glitch while the state register changes.
  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn) begin
      soft_reset <= 1'b1;
      start      <= 1'b0;
    end else begin
      soft_reset <= (cstate == CS_RESET);
      start      <= (cstate == CS_RUNNING);
    end
  end

  // APB rule: the access phase is always inside a selected transfer.
  a_apb_enable: assert property (@(posedge pclk) disable iff (!presetn) penable |-> psel);
  // Four-phase rule: request is not withdrawn before it is acknowledged.
  a_cfg_req_held: assert property (@(posedge pclk) disable iff (!presetn)
                                   (cfg_req && !cfg_ack_s && cstate == CS_RECONF) |=> cfg_req);

endmodule
