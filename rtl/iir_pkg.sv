// iir_pkg: types shared by the resource-scheduled IIR filters.
//
// The first-order filter (iir_sched_filter) runs its five operations over
// five clock steps on two multipliers and one adder. Its controller
// (iir_sched_ctrl) tells the datapath (iir_sched_datapath) in every step
// which operands each multiplexer passes and which registers load; the
// bundle of those signals is sched_ctrl_t below. The names of the selected
// registers (R1, R2/R7, R3/R6, R5/R9, R8/R11, R4/R10) are the register
// names of the schedule: each physical register holds two of the eleven
// schedule values at different times.
//
// The high-pass filter (iir_hp_biquad) has its own five-step sequence,
// hp_state_e.
package iir_pkg;

  // Steps of the five-cycle schedule; IDLE waits for the next strobe.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_C1   = 3'd1,
    ST_C2   = 3'd2,
    ST_C3   = 3'd3,
    ST_C4   = 3'd4,
    ST_C5   = 3'd5
  } sched_step_e;

  // Multiplier 1, left operand: delay(0) or the fed-back adder register.
  typedef enum logic {M1A_DELAY0 = 1'b0, M1A_R4R10 = 1'b1} m1a_sel_e;
  // Multiplier 1, right operand.
  typedef enum logic {M1B_COEFFB0 = 1'b0, M1B_COEFFA1 = 1'b1} m1b_sel_e;
  // Multiplier 2, left operand.
  typedef enum logic {M2A_DELAY0 = 1'b0, M2A_DELAY1 = 1'b1} m2a_sel_e;
  // Multiplier 2, right operand.
  typedef enum logic {M2B_COEFFA0 = 1'b0, M2B_COEFFA1 = 1'b1} m2b_sel_e;
  // Adder, left operand.
  typedef enum logic [1:0] {
    ADDA_R1    = 2'd0,
    ADDA_R2R7  = 2'd1,
    ADDA_R4R10 = 2'd2
  } adda_sel_e;
  // Adder, right operand.
  typedef enum logic {ADDB_R2R7 = 1'b0, ADDB_R8R11 = 1'b1} addb_sel_e;

  // Control word for one clock step of the shared datapath.
  typedef struct packed {
    m1a_sel_e  m1a;
    m1b_sel_e  m1b;
    m2a_sel_e  m2a;
    m2b_sel_e  m2b;
    adda_sel_e adda;
    addb_sel_e addb;
    logic      ld_r1;        // capture the input sample
    logic      ld_r2r7;      // capture multiplier 1
    logic      ld_r3r6;      // capture multiplier 2
    logic      shift_chain;  // R3/R6 -> R5/R9 -> R8/R11
    logic      ld_r4r10;     // capture the adder
    logic      ld_delay;     // delay(0) <= delay(1), delay(1) <= adder
    logic      ld_out;       // output <= adder
  } sched_ctrl_t;

  localparam sched_ctrl_t SCHED_CTRL_NOP = '{
    m1a: M1A_DELAY0, m1b: M1B_COEFFB0, m2a: M2A_DELAY0, m2b: M2B_COEFFA0,
    adda: ADDA_R1, addb: ADDB_R2R7,
    ld_r1: 1'b0, ld_r2r7: 1'b0, ld_r3r6: 1'b0, shift_chain: 1'b0,
    ld_r4r10: 1'b0, ld_delay: 1'b0, ld_out: 1'b0
  };

  // Steps of the high-pass filter sequence.
  typedef enum logic [2:0] {
    HP_IDLE = 3'd0,
    HP_S1   = 3'd1,
    HP_S2   = 3'd2,
    HP_S3   = 3'd3,
    HP_S4   = 3'd4,
    HP_S5   = 3'd5
  } hp_state_e;

endpackage
