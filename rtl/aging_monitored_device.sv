// Device with a core under on-line aging monitoring.
//
// The adjustable duty cycle clock generator (adccg) turns the reference clock
// into the core's functional clock clk whose falling edge lies inside the
// timing guard band. The core's flip-flops form the modified scan chain: the
// normal scan cells capture the functional data di on rising edges, the
// early capture cells capture the same data on falling edges and compare.
// The aging monitor periodically runs a capture-and-shift session on the
// early capture chain and raises aging_alarm when a comparison fails, all
// while the core keeps running. The test access port (tap) sets the duty
// cycle code and the monitor control (session interval, alarm reset).
//
// Interface: di is the output of the core's combinational logic (not part of
// this design) and do_o its registered value; clk is brought out to clock
// that logic. scan_in, se and scan_out are the core's scan pins; with se=0
// scan_out shows the early capture chain. The first early capture cell's
// input is tied to 0. rst_n resets the aging monitor; trst_n the TAP.
// The monitor control values cross from the tck to the clk domain: the
// interval is taken as static while monitoring runs and the reset request
// is synchronised inside the monitor.
//
// The block structure and connections follow the published device; the
// tied-off first ECSI and the clock-domain handling are this design's choices.
//
// This module contains the clock generator's behavioural model, so it is a
// simulation model as a whole; every other block is synthesizable.

`timescale 1ps/1ps
module aging_monitored_device
  import aging_mon_pkg::*;
#(
  parameter int unsigned N          = 8,
  parameter int unsigned DUTY_W     = 8,
  parameter int unsigned INTERVAL_W = 16,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         ref_clk,
  input  logic         rst_n,
  // TAP control signals
  input  logic         tck,
  input  logic         trst_n,
  input  logic         tms,
  input  logic         tdi,
  output logic         tdo,
  // core
  output logic         clk,
  input  logic [N-1:0] di,
  output logic [N-1:0] do_o,
  input  logic         scan_in,
  input  logic         se,
  output logic         scan_out,
  // aging monitor
  output logic         aging_alarm,
  output agmon_state_t agmon_state,
  output logic [CW-1:0] shift_count
);

  logic [DUTY_W-1:0]     duty;
  logic [INTERVAL_W-1:0] interval;
  logic                  rst_req;
  logic                  ecse1;
  logic                  ecse2;

  tap #(.DUTY_W(DUTY_W), .INTERVAL_W(INTERVAL_W)) u_tap (
    .tck      (tck),
    .trst_n   (trst_n),
    .tms      (tms),
    .tdi      (tdi),
    .tdo      (tdo),
    .duty     (duty),
    .interval (interval),
    .rst_req  (rst_req)
  );

  adccg #(.DUTY_W(DUTY_W)) u_adccg (
    .ref_clk (ref_clk),
    .duty    (duty),
    .clk     (clk)
  );

  modified_scan_chain #(.N(N)) u_chain (
    .clk      (clk),
    .se       (se),
    .scan_in  (scan_in),
    .ecsi     (1'b0),
    .ecse1    (ecse1),
    .ecse2    (ecse2),
    .di       (di),
    .do_o     (do_o),
    .scan_out (scan_out)
  );

  aging_monitor #(.N(N), .INTERVAL_W(INTERVAL_W)) u_monitor (
    .clk         (clk),
    .rst_n       (rst_n),
    .interval    (interval),
    .rst_req     (rst_req),
    .scan_out    (scan_out),
    .ecse1       (ecse1),
    .ecse2       (ecse2),
    .aging_alarm (aging_alarm),
    .state       (agmon_state),
    .shift_count (shift_count)
  );

endmodule
