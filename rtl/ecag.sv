// ECS controller and alarm generator (EC/AG) of the aging monitor.
//
// A four-state machine on the rising edge of clk:
//   IDLE    -- agmon_en --------------------------> CAPTURE
//   CAPTURE -- (always, after one cycle) ----------> SHIFT
//   SHIFT   -- error seen -------------------------> ALARM
//   SHIFT   -- shift_done, no error ---------------> IDLE
//   ALARM   stays until agmon_rst
// agmon_rst returns the machine to IDLE from any state (this design also
// accepts it outside ALARM).
//
// Outputs are decoded from the state register, so they change just after a
// rising edge: ecse1 is high in CAPTURE and SHIFT (the ECFFs take their
// neighbour's output), ecse2 and shift_en are high in SHIFT (the ECFF chain
// shifts), aging_alarm is high in ALARM. state is the AgMon_State output.
//
// Error detection: scan_out is sampled on the falling edge of clk, the edge
// on which the ECFFs store and shift. The sample taken in CAPTURE is the last
// cell's comparison (the output mux still shows ECFF^DO); each sample in
// SHIFT is one stored comparison leaving the chain. Any 1 sets a sticky error
// flag, which is cleared on falling edges in IDLE. Sampling on the falling
// edge, so that no comparison is missed, is this design's choice.

`timescale 1ps/1ps
module ecag
  import aging_mon_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         agmon_en,
  input  logic         agmon_rst,
  input  logic         shift_done,
  input  logic         scan_out,
  output logic         ecse1,
  output logic         ecse2,
  output logic         shift_en,
  output logic         aging_alarm,
  output agmon_state_t state
);

  agmon_state_t state_d;
  logic         err_seen;

  always_comb begin
    state_d = state;
    unique case (state)
      ST_IDLE:    if (agmon_en) state_d = ST_CAPTURE;
      ST_CAPTURE: state_d = ST_SHIFT;
      ST_SHIFT: begin
        if (err_seen)        state_d = ST_ALARM;
        else if (shift_done) state_d = ST_IDLE;
      end
      ST_ALARM:   state_d = ST_ALARM;
      default:    state_d = ST_IDLE;
    endcase
    if (agmon_rst) state_d = ST_IDLE;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= ST_IDLE;
    else        state <= state_d;
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_seen <= 1'b0;
    end else if (state == ST_IDLE) begin
      err_seen <= 1'b0;
    end else if ((state == ST_CAPTURE || state == ST_SHIFT) && scan_out) begin
      err_seen <= 1'b1;
    end
  end

  assign ecse1       = (state == ST_CAPTURE) || (state == ST_SHIFT);
  assign ecse2       = (state == ST_SHIFT);
  assign shift_en    = (state == ST_SHIFT);
  assign aging_alarm = (state == ST_ALARM);

  // The early capture chain may only shift while its cells take ECSI.
  a_ecse2_needs_ecse1: assert property (@(posedge clk) ecse2 |-> ecse1);

endmodule
