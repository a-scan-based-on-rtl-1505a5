// Testbench of aging_monitor (chain length 8, interval 20 cycles).
//
// A small model of the early capture chain answers the monitor's ecse1 and
// ecse2: for each session the testbench picks which cells see a late
// transition (a vector of comparison results), the model stores them one
// cell on at the capture edge and shifts them out on scan_out. Checked: a
// session starts every `interval` cycles, lasts one capture cycle and eight
// shift cycles with Shift_Count 0..7, ends in IDLE when no cell mismatched and
// in the alarm state otherwise (every single-cell position and random
// vectors), the alarm holds until rst_req is written 0->1 and is then gone
// within three cycles, and interval 0 stops all sessions.

`timescale 1ps/1ps
module tb_aging_monitor;
  import aging_mon_pkg::*;

  localparam int unsigned N        = 8;
  localparam int unsigned W        = 16;
  localparam int unsigned INTERVAL = 20;
  localparam int unsigned PERIOD   = 625;
  localparam int unsigned HIGH     = 547;

  logic         clk = 1'b0;
  logic         rst_n, rst_req, scan_out, ecse1, ecse2, aging_alarm;
  logic [W-1:0] interval;
  agmon_state_t state;
  logic [2:0]   shift_count;

  logic [N-1:0] cmp;      // cmp[k]: cell k's early and normal captures differ
  logic [N-1:0] ec;       // model of the ECFF chain, ec[k] = cell k
  int           checks = 0;
  int           failures = 0;
  int           cycle = 0;
  int           n_sessions = 0, n_alarms = 0, n_clean = 0, n_resets = 0;

  aging_monitor #(.N(N), .INTERVAL_W(W)) dut (
    .clk(clk), .rst_n(rst_n), .interval(interval), .rst_req(rst_req), .scan_out(scan_out),
    .ecse1(ecse1), .ecse2(ecse2), .aging_alarm(aging_alarm), .state(state),
    .shift_count(shift_count)
  );

  initial forever begin
    clk = 1'b1;
    #(HIGH);
    clk = 1'b0;
    #(PERIOD - HIGH);
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle++;

  // chain model
  always @(negedge clk) begin
    if (ecse1 && !ecse2) ec <= {cmp[N-2:0], 1'b0};
    else if (ecse1 && ecse2) ec <= {ec[N-2:0], 1'b0};
  end
  assign scan_out = ecse2 ? ec[N-1] : cmp[N-1];

  // Wait for a session to start; returns the cycle number of its capture cycle.
  task automatic wait_session(output int start);
    while (!ecse1) @(negedge clk);
    start = cycle;
    n_sessions++;
  endtask

  // Follow one session from its capture cycle; returns 1 if it raised the alarm.
  task automatic run_session(output logic alarmed);
    int shifts = 0;
    @(negedge clk);
    while (ecse2) begin
      checks++;
      if (shift_count !== 3'(shifts)) begin
        failures++;
        $display("shift %0d: Shift_Count=%0d", shifts, shift_count);
      end
      shifts++;
      @(negedge clk);
    end
    alarmed = aging_alarm;
    checks++;
    if (!alarmed && (shifts != int'(N) || state !== ST_IDLE)) begin
      failures++;
      $display("clean session: %0d shift cycles, state %b", shifts, state);
    end
  endtask

  task automatic clear_alarm();
    int waited = 0;
    rst_req = 1'b1;
    while (aging_alarm && waited < 10) begin
      @(negedge clk);
      waited++;
    end
    checks++;
    if (aging_alarm || waited > 3) begin
      failures++;
      $display("alarm reset took %0d cycles", waited);
    end
    n_resets++;
    rst_req = 1'b0;
  endtask

  initial begin
    int   start, prev_start;
    logic alarmed;
    rst_n = 1'b0;
    rst_req = 1'b0;
    interval = W'(INTERVAL);
    cmp = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    start = cycle;

    // clean sessions, spaced by the interval
    wait_session(prev_start);
    checks++;
    if (prev_start - start != int'(INTERVAL) + 1) begin
      failures++;
      $display("first session %0d cycles after reset", prev_start - start);
    end
    run_session(alarmed);
    for (int i = 0; i < 3; i++) begin
      wait_session(start);
      checks++;
      if (start - prev_start != int'(INTERVAL)) begin
        failures++;
        $display("sessions %0d cycles apart", start - prev_start);
      end
      prev_start = start;
      run_session(alarmed);
      checks++;
      if (alarmed) failures++;
      n_clean++;
    end

    // one late cell at every position, then random vectors
    for (int t = 0; t < int'(N) + 12; t++) begin
      logic [N-1:0] v;
      v = (t < int'(N)) ? (N'(1) << t) : N'($urandom);
      // set up the vector while the monitor is idle
      while (state !== ST_IDLE) @(negedge clk);
      cmp = v;
      wait_session(start);
      run_session(alarmed);
      checks++;
      if (alarmed !== (v != '0)) begin
        failures++;
        $display("vector %b: alarm=%b", v, alarmed);
      end
      if (alarmed) begin
        n_alarms++;
        // alarm holds across the next timer pulses
        repeat (2 * INTERVAL) @(negedge clk);
        checks++;
        if (!aging_alarm || ecse1) begin failures++; $display("alarm not held"); end
        clear_alarm();
      end else begin
        n_clean++;
      end
      @(negedge clk);
      cmp = '0;
    end

    // interval 0: no more sessions
    while (state !== ST_IDLE) @(negedge clk);
    interval = '0;
    for (int i = 0; i < 3 * int'(INTERVAL); i++) begin
      @(negedge clk);
      checks++;
      if (ecse1) failures++;
    end

    checks++;
    if (n_alarms == 0 || n_clean == 0 || n_resets == 0) failures++;
    $display("sessions %0d, clean %0d, alarms %0d, resets %0d", n_sessions, n_clean, n_alarms, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
