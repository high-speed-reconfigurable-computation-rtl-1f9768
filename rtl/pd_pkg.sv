// pd_pkg: types and constants shared by the pulse detector.
//
// The pulse detector filters 8-bit ADC samples with two trapezoidal filters
// (a "slow" one for pulse height and a "fast" one for triggering and pile-up
// rejection) and hands each clean pulse height to a host over AMBA APB.
// This package holds the widths, the register map, the state encodings and
// the carry-save adder function that the modules share.
//
// Register map, field layouts and the STATE encoding follow the register
// list of the design; the carry-save function is the standard 3:2 counter.
package pd_pkg;

  // Sample and filter arithmetic widths.
  localparam int unsigned SAMPLE_W = 8;    // ADC sample width
  localparam int unsigned ACC_W    = 16;   // filter output / threshold width
  localparam int unsigned PTR_W    = 8;    // FIFO pointer field width
  localparam int unsigned REG_W    = 32;   // APB register and crossing-bus width

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic        [PTR_W-1:0]    ptr_t;

  // Register indexes (word addresses, PADDR[4:2]).
  localparam logic [2:0] REG_CTRL      = 3'd0;
  localparam logic [2:0] REG_SLOW_CFG  = 3'd1;
  localparam logic [2:0] REG_FAST_CFG  = 3'd2;
  localparam logic [2:0] REG_SLOW_THR  = 3'd3;
  localparam logic [2:0] REG_FAST_THR  = 3'd4;
  localparam logic [2:0] REG_RESULT    = 3'd5;

  // Configuration/status register bit positions.
  localparam int unsigned CTRL_RESET    = 0;
  localparam int unsigned CTRL_START    = 1;
  localparam int unsigned CTRL_RECONF   = 2;
  localparam int unsigned CTRL_STATE_LO = 3;
  localparam int unsigned CTRL_DATA_RDY = 5;

  // Window pointers of one filter, as laid out in its configuration register:
  // [31:24] WIN1_OLD, [23:16] WIN1_NEW, [15:8] WIN2_OLD, [7:0] reserved.
  // WIN2_NEW is always FIFO position 0 and so has no field.
  typedef struct packed {
    ptr_t win1_old;
    ptr_t win1_new;
    ptr_t win2_old;
    ptr_t reserved;
  } filt_cfg_t;

  // Thresholds of one filter: [31:16] upper, [15:0] lower, two's complement.
  typedef struct packed {
    acc_t upper;
    acc_t lower;
  } filt_thr_t;

  // Complete filter configuration as carried to the datapath.
  typedef struct packed {
    filt_cfg_t slow_cfg;
    filt_cfg_t fast_cfg;
    filt_thr_t slow_thr;
    filt_thr_t fast_thr;
  } dp_cfg_t;

  // Result word: [31:16] slow filter peak, [15:0] fast filter peak.
  typedef struct packed {
    acc_t slow_peak;
    acc_t fast_peak;
  } result_t;

  // Filter control FSM; the encoding is the STATE field of the status register.
  typedef enum logic [1:0] {
    CS_RESET   = 2'b00,
    CS_IDLE    = 2'b01,
    CS_RUNNING = 2'b10,
    CS_RECONF  = 2'b11
  } ctrl_state_t;

  // Pulse retrieval FSM.
  typedef enum logic [1:0] {
    RS_IDLE    = 2'b00,
    RS_RECEIVE = 2'b01,
    RS_ACK     = 2'b10
  } ret_state_t;

  // Peak detection FSM: states 0..4 of the event graph, plus the two
  // one-cycle outcomes, pile-up (P) and clean event (E).
  typedef enum logic [2:0] {
    PD_S0     = 3'd0,
    PD_S1     = 3'd1,
    PD_S2     = 3'd2,
    PD_S3     = 3'd3,
    PD_S4     = 3'd4,
    PD_PILEUP = 3'd5,
    PD_EVENT  = 3'd6
  } pd_state_t;

  // One carry-save adder (3:2 counter) over ACC_W bits. The carry vector is
  // returned unshifted; the caller shifts it left by one.
  function automatic logic [2*ACC_W-1:0] csa(input logic [ACC_W-1:0] a,
                                              input logic [ACC_W-1:0] b,
                                              input logic [ACC_W-1:0] c);
    logic [ACC_W-1:0] s, cy;
    s  = a ^ b ^ c;
    cy = (a & b) | (a & c) | (b & c);
    return {s, cy};
  endfunction

endpackage
