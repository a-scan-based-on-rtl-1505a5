// Shared types and constants of the scan-based on-line aging monitor.
//
// agmon_state_t is the state of the ECS controller / alarm generator. Its
// four states and their two-bit codes (00 idle, 01 capture, 10 shift,
// 11 alarm) are the ones the monitor reports on its AgMon_State output.
// tap_instr_t holds the instruction codes of the test access port through
// which the clock duty cycle and the monitor control are programmed; these
// codes are this design's own choice.

`timescale 1ps/1ps
package aging_mon_pkg;

  typedef enum logic [1:0] {
    ST_IDLE    = 2'b00,  // waiting for the next monitoring session
    ST_CAPTURE = 2'b01,  // ECSE1=1: comparison results stored in the ECFFs
    ST_SHIFT   = 2'b10,  // ECSE1=ECSE2=1: comparison results shifted out
    ST_ALARM   = 2'b11   // aging seen: Aging_Alarm held until a reset
  } agmon_state_t;

  localparam int unsigned TAP_IR_W = 3;

  typedef enum logic [TAP_IR_W-1:0] {
    IR_DUTY   = 3'b001,  // select the duty-cycle data register
    IR_AGMON  = 3'b010,  // select the aging-monitor control data register
    IR_BYPASS = 3'b111   // one-bit bypass register
  } tap_instr_t;

endpackage
