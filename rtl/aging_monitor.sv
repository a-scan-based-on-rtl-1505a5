// Aging monitor: runs periodic on-line aging monitoring sessions.
//
// The programmable interval timer (pit) starts a session every `interval`
// clk cycles. The EC/AG state machine (ecag) then drives the early capture
// scan chain for one capture cycle (ecse1) and N shift cycles (ecse1, ecse2),
// counted by the ECS shift counter, while it watches scan_out for a 1. A 1
// means some path delivered its data inside the guard band and raises
// aging_alarm, which stays high until the reset generator (reset_gen) turns a
// 0->1 write of rst_req into an AgMon_Rst pulse. interval and rst_req are the
// monitor control information written through the test access port.
//
// Timing: a session takes N+2 cycles from agmon_en (one IDLE->CAPTURE edge,
// one CAPTURE cycle, N SHIFT cycles) when no error is seen; an error ends
// it early in ALARM. All state changes are on rising edges of clk; only the
// error sampling inside ecag uses the falling edge.
//
// The four blocks and their connections follow the published monitor; the
// widths and the reset generator's insides are this design's choices.

`timescale 1ps/1ps
module aging_monitor
  import aging_mon_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned INTERVAL_W = 16,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [INTERVAL_W-1:0] interval,
  input  logic                  rst_req,
  input  logic                  scan_out,
  output logic                  ecse1,
  output logic                  ecse2,
  output logic                  aging_alarm,
  output agmon_state_t          state,
  output logic [CW-1:0]         shift_count
);

  logic agmon_en;
  logic agmon_rst;
  logic shift_en;
  logic shift_done;

  pit #(.INTERVAL_W(INTERVAL_W)) u_pit (
    .clk      (clk),
    .rst_n    (rst_n),
    .interval (interval),
    .agmon_en (agmon_en)
  );

  reset_gen u_reset_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .rst_req   (rst_req),
    .agmon_rst (agmon_rst)
  );

  ecs_shift_counter #(.N(N)) u_shift_counter (
    .clk        (clk),
    .rst_n      (rst_n),
    .shift_en   (shift_en),
    .count      (shift_count),
    .shift_done (shift_done)
  );

  ecag u_ecag (
    .clk         (clk),
    .rst_n       (rst_n),
    .agmon_en    (agmon_en),
    .agmon_rst   (agmon_rst),
    .shift_done  (shift_done),
    .scan_out    (scan_out),
    .ecse1       (ecse1),
    .ecse2       (ecse2),
    .shift_en    (shift_en),
    .aging_alarm (aging_alarm),
    .state       (state)
  );

endmodule
