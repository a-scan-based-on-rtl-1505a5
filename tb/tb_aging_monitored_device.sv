// End-to-end testbench of aging_monitored_device at its default parameters
// (8-bit chains, 8-bit duty code, 16-bit interval).
//
// A 1.6 GHz reference clock (625 ps) drives the device. The core's
// combinational logic is modelled by the testbench: after each rising edge
// of the functional clock a new random 8-bit value is launched, bit b
// settling dly[b] ps later; an aged path is one whose delay has grown past
// the falling edge of the duty-adjusted clock. Everything is programmed
// through the JTAG port.
//
// A reference model records di at each falling and rising edge. For every
// monitoring session it works out, at the capture edge, whether any bit's
// early and normal captures differ, and at the end of the session checks
// that aging_alarm matches. do_o must always equal di at the last rising
// edge: monitoring never disturbs the core's own flops.
//
// Scenario: default duty (falling edge inside the guard band); a fresh
// device gives clean sessions; an aged path on each of the 8 bits in turn
// raises the alarm, which a reset-request write through the TAP clears; a
// path just inside the guard band is missed at the default duty and caught
// after the duty code is lowered; a normal scan shift with monitoring off.
// Each of these must happen at least once.

`timescale 1ps/1ps
module tb_aging_monitored_device;
  import aging_mon_pkg::*;

  localparam int unsigned N      = 8;
  localparam int unsigned PERIOD = 625;
  localparam int unsigned FRESH  = 300;   // path delay of a fresh device, ps
  localparam int unsigned AGED   = 580;   // grown into the guard band
  localparam int unsigned IVAL   = 24;    // session interval, cycles

  logic         ref_clk = 1'b0;
  logic         rst_n;
  logic         clk;
  logic [N-1:0] di, do_o;
  logic         scan_in, se, scan_out, aging_alarm;
  agmon_state_t agmon_state;
  logic [2:0]   shift_count;

  jtag_bfm #(.HALF_PS(2000)) jt ();

  aging_monitored_device dut (
    .ref_clk(ref_clk), .rst_n(rst_n),
    .tck(jt.tck), .trst_n(jt.trst_n), .tms(jt.tms), .tdi(jt.tdi), .tdo(jt.tdo),
    .clk(clk), .di(di), .do_o(do_o), .scan_in(scan_in), .se(se), .scan_out(scan_out),
    .aging_alarm(aging_alarm), .agmon_state(agmon_state), .shift_count(shift_count)
  );

  int checks = 0;
  int failures = 0;
  int n_clean = 0, n_alarm = 0, n_reset = 0, n_duty_miss = 0, n_duty_catch = 0;
  int n_scan_test = 0;
  int n_bit_caught[N];

  initial forever begin
    #(PERIOD / 2) ref_clk = 1'b1;
    #(PERIOD - PERIOD / 2) ref_clk = 1'b0;
  end

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- core logic
  int unsigned  dly[N];
  logic [N-1:0] target;
  logic         logic_on = 1'b0;

  always @(posedge clk) if (logic_on) target <= target ^ N'($urandom | 1);

  for (genvar b = 0; b < N; b++) begin : g_path
    always @(posedge clk) begin
      logic v;
      #1;
      v = target[b];
      #(dly[b] - 1);
      di[b] = v;
    end
  end

  // ---------------------------------------------------------- reference model
  logic [N-1:0] e_ref, n_ref;
  logic         in_session = 1'b0;
  logic         exp_err;
  logic         check_do = 1'b0;

  always @(posedge clk) begin
    n_ref = di;
    #2;
    if (check_do && !se) begin
      checks++;
      if (do_o !== n_ref) begin
        failures++;
        $display("do_o %b, expected %b at %0t", do_o, n_ref, $time);
      end
    end
  end

  always @(negedge clk) begin
    if (agmon_state == ST_CAPTURE) begin
      exp_err    = |(e_ref ^ n_ref);
      in_session = 1'b1;
    end else if (in_session && (agmon_state == ST_IDLE || agmon_state == ST_ALARM)) begin
      in_session = 1'b0;
      checks++;
      if (aging_alarm !== exp_err) begin
        failures++;
        $display("session at %0t: alarm=%b expected %b", $time, aging_alarm, exp_err);
      end
      if (exp_err) n_alarm++; else n_clean++;
    end
    e_ref = di;
  end

  // ------------------------------------------------------------------ helpers
  task automatic write_duty(logic [7:0] d);
    logic [31:0] cap;
    jt.shift_ir(32'(IR_DUTY), 3, cap);
    jt.shift_dr(32'(d), 8, cap);
  endtask

  task automatic write_agmon(logic req, logic [15:0] iv);
    logic [31:0] cap;
    jt.shift_ir(32'(IR_AGMON), 3, cap);
    jt.shift_dr({15'b0, req, iv}, 17, cap);
  endtask

  task automatic wait_alarm(output logic seen);
    int n = 0;
    while (!aging_alarm && n < 200) begin
      @(negedge clk);
      n++;
    end
    seen = aging_alarm;
  endtask

  task automatic clear_alarm();
    write_agmon(1'b1, 16'(IVAL));
    repeat (4) @(negedge clk);
    checks++;
    if (aging_alarm) begin failures++; $display("alarm not cleared"); end
    else n_reset++;
    write_agmon(1'b0, 16'(IVAL));
  endtask

  // wait for n complete sessions
  task automatic wait_sessions(int n);
    int done;
    done = n_clean + n_alarm + n;
    while (n_clean + n_alarm < done) @(negedge clk);
  endtask

  task automatic measure_high(output time hi);
    time t0;
    @(posedge clk) t0 = $time;
    @(negedge clk) hi = $time - t0;
  endtask

  // ----------------------------------------------------------------- scenario
  initial begin
    logic seen;
    time  hi;
    int   n_prev;
    rst_n = 1'b0;
    se = 1'b0;
    scan_in = 1'b0;
    di = '0;
    target = '0;
    foreach (dly[b]) dly[b] = FRESH;
    jt.reset();
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    logic_on = 1'b1;
    repeat (4) @(posedge clk);
    check_do = 1'b1;

    // default duty code: falling edge inside the guard band
    measure_high(hi);
    checks++;
    if (!(hi > 500 && hi < time'(PERIOD))) begin failures++; $display("high time %0t", hi); end

    // fresh device: sessions come out clean
    write_agmon(1'b0, 16'(IVAL));
    n_prev = n_clean;
    wait_sessions(3);
    checks++;
    if (n_clean - n_prev != 3 || aging_alarm) begin failures++; $display("fresh device alarmed"); end

    // an aged path on each bit in turn
    for (int b = 0; b < int'(N); b++) begin
      dly[b] = AGED;
      wait_alarm(seen);
      checks++;
      if (!seen) begin failures++; $display("aged bit %0d not detected", b); end
      else n_bit_caught[b]++;
      dly[b] = FRESH;
      // the alarm stays through further timer intervals
      repeat (3 * IVAL) @(negedge clk);
      checks++;
      if (!aging_alarm) begin failures++; $display("alarm dropped"); end
      clear_alarm();
      wait_sessions(1);
    end

    // a path settling at 520 ps: beyond a 468 ps falling edge, not a 546 ps one
    dly[3] = 520;
    n_prev = n_clean;
    wait_sessions(3);
    checks++;
    if (n_clean - n_prev != 3 || aging_alarm) begin failures++; $display("520 ps path flagged at duty 224"); end
    else n_duty_miss++;
    write_duty(8'd192);
    measure_high(hi);
    checks++;
    if (hi != time'((PERIOD * 192) / 256)) begin failures++; $display("high time %0t at duty 192", hi); end
    wait_alarm(seen);
    checks++;
    if (!seen) begin failures++; $display("520 ps path missed at duty 192"); end
    else n_duty_catch++;
    dly[3] = FRESH;
    write_duty(8'd224);
    clear_alarm();

    // normal scan shift, monitoring switched off
    write_agmon(1'b0, 16'd0);
    while (agmon_state != ST_IDLE) @(negedge clk);
    begin
      logic [N-1:0] pat, got;
      pat = N'($urandom);
      @(negedge clk);
      se = 1'b1;
      for (int i = 0; i < int'(N); i++) begin
        scan_in = pat[i];
        @(negedge clk);
      end
      for (int i = 0; i < int'(N); i++) begin
        got[i] = scan_out;
        scan_in = 1'b0;
        @(negedge clk);
      end
      se = 1'b0;
      checks++;
      if (got !== pat) begin failures++; $display("scan shift %b -> %b", pat, got); end
      else n_scan_test++;
    end
    repeat (3 * IVAL) @(negedge clk);
    checks++;
    if (aging_alarm || agmon_state != ST_IDLE) begin failures++; $display("session with interval 0"); end

    // every mechanism must have happened
    checks++;
    if (n_clean == 0 || n_alarm < int'(N) || n_reset < int'(N) + 1 || n_duty_miss == 0 ||
        n_duty_catch == 0 || n_scan_test == 0) failures++;
    foreach (n_bit_caught[b]) begin
      checks++;
      if (n_bit_caught[b] == 0) failures++;
    end
    $display("clean sessions %0d, alarm sessions %0d, alarm resets %0d, duty miss/catch %0d/%0d, scan tests %0d",
             n_clean, n_alarm, n_reset, n_duty_miss, n_duty_catch, n_scan_test);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
