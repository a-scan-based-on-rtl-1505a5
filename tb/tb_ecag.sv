// Testbench of ecag, the ECS controller / alarm generator (chain length 8).
//
// The testbench plays the interval timer, the shift counter and the scan
// chain: it pulses agmon_en, raises shift_done in the 8th shift cycle and
// sets scan_out for each falling-edge sample of a session (sample 0 in the
// capture cycle, samples 1..8 in the shift cycles). For a clean session and
// for an error at every sample position it checks, cycle by cycle, the state
// code, ecse1, ecse2, shift_en and aging_alarm, the number of shift cycles,
// that the alarm holds through later agmon_en pulses and that agmon_rst
// clears it. A 1 on scan_out outside a session must not raise the alarm.

`timescale 1ps/1ps
module tb_ecag;
  import aging_mon_pkg::*;

  localparam int unsigned N      = 8;
  localparam int unsigned PERIOD = 625;
  localparam int unsigned HIGH   = 547;

  logic         clk = 1'b0;
  logic         rst_n, agmon_en, agmon_rst, shift_done, scan_out;
  logic         ecse1, ecse2, shift_en, aging_alarm;
  agmon_state_t state;
  int           checks = 0;
  int           failures = 0;
  int           n_alarm = 0, n_clean = 0;

  ecag dut (.clk(clk), .rst_n(rst_n), .agmon_en(agmon_en), .agmon_rst(agmon_rst),
            .shift_done(shift_done), .scan_out(scan_out), .ecse1(ecse1), .ecse2(ecse2),
            .shift_en(shift_en), .aging_alarm(aging_alarm), .state(state));

  initial forever begin
    clk = 1'b1;
    #(HIGH);
    clk = 1'b0;
    #(PERIOD - HIGH);
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next cycle: inputs change 50 ps after the rising edge
  task automatic next_cycle();
    @(posedge clk);
    #50;
  endtask

  task automatic expect_outputs(agmon_state_t st, string where);
    logic e1, e2, al;
    e1 = (st == ST_CAPTURE) || (st == ST_SHIFT);
    e2 = (st == ST_SHIFT);
    al = (st == ST_ALARM);
    checks++;
    if (state !== st || ecse1 !== e1 || ecse2 !== e2 || shift_en !== e2 || aging_alarm !== al) begin
      failures++;
      $display("%s at %0t: state=%b exp %b ecse1=%b ecse2=%b shift_en=%b alarm=%b",
               where, $time, state, st, ecse1, ecse2, shift_en, aging_alarm);
    end
  endtask

  // one session; err_at = -1: no error, else the sample that carries a 1
  task automatic session(int err_at);
    int shifts;
    shifts = (err_at < 0) ? N : ((err_at == 0) ? 1 : err_at);
    expect_outputs(ST_IDLE, "idle before");
    agmon_en = 1'b1;
    scan_out = 1'($urandom);                  // ignored while idle
    next_cycle();
    agmon_en = 1'b0;
    expect_outputs(ST_CAPTURE, "capture");
    scan_out = (err_at == 0);
    for (int s = 0; s < shifts; s++) begin
      next_cycle();
      expect_outputs(ST_SHIFT, "shift");
      shift_done = (s == N - 1);
      scan_out   = (err_at == s + 1);
    end
    next_cycle();
    shift_done = 1'b0;
    scan_out   = 1'b0;
    if (err_at < 0) begin
      expect_outputs(ST_IDLE, "end of clean session");
      n_clean++;
    end else begin
      expect_outputs(ST_ALARM, "alarm");
      // alarm holds, new sessions are not started
      repeat (3) begin
        agmon_en = 1'b1;
        next_cycle();
        agmon_en = 1'b0;
        expect_outputs(ST_ALARM, "alarm held");
      end
      agmon_rst = 1'b1;
      next_cycle();
      agmon_rst = 1'b0;
      expect_outputs(ST_IDLE, "after reset");
      n_alarm++;
    end
    repeat (2) next_cycle();
  endtask

  initial begin
    rst_n = 1'b0;
    agmon_en = 1'b0; agmon_rst = 1'b0; shift_done = 1'b0; scan_out = 1'b0;
    repeat (2) next_cycle();
    rst_n = 1'b1;
    next_cycle();
    // scan_out noise while idle
    for (int i = 0; i < 10; i++) begin
      scan_out = 1'($urandom);
      next_cycle();
      expect_outputs(ST_IDLE, "idle noise");
    end
    scan_out = 1'b0;
    session(-1);
    for (int j = 0; j <= int'(N); j++) begin
      session(j);
      session(-1);
    end
    // agmon_rst in the middle of a session aborts it
    agmon_en = 1'b1;
    next_cycle();
    agmon_en = 1'b0;
    repeat (3) next_cycle();
    expect_outputs(ST_SHIFT, "before abort");
    agmon_rst = 1'b1;
    next_cycle();
    agmon_rst = 1'b0;
    expect_outputs(ST_IDLE, "abort");
    checks++;
    if (n_alarm != int'(N) + 1 || n_clean == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
