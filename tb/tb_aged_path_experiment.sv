// Aged-path experiment on the full device at its default parameters.
//
// Setup: 2 GHz test clock with a 20 % guard band, so the functional clock is
// 1.6 GHz (625 ps) and the guard band spans 500-625 ps after the rising
// edge; the default duty code puts the falling edge at 546 ps. The core's
// logic output alternates between 11001110 and 01001110 every cycle. Bit 7
// (the leftmost) is the aged path: it settles 580 ps after the rising edge,
// inside the guard band; the other bits settle after 200 ps.
//
// Expected, per session: the early capture cells hold 11001110 while the
// scan cells take 01001110 (do_o is checked), the comparison 10000000 is
// stored one cell on as 01000000, and the shift puts out, sample by sample
// from the capture edge on, 0 (last cell's own comparison), then
// 0,0,0,0,0,0,1 -- after which the monitor enters the alarm state. A second
// run with bit 7 as fast as the others must give clean sessions with eight
// shift samples of 0.

`timescale 1ps/1ps
module tb_aged_path_experiment;
  import aging_mon_pkg::*;

  localparam int unsigned N      = 8;
  localparam int unsigned PERIOD = 625;
  localparam int unsigned IVAL   = 16;

  logic         ref_clk = 1'b0;
  logic         rst_n;
  logic         clk;
  logic [N-1:0] di, do_o;
  logic         scan_out, aging_alarm;
  agmon_state_t agmon_state;
  logic [2:0]   shift_count;

  jtag_bfm #(.HALF_PS(2000)) jt ();

  aging_monitored_device dut (
    .ref_clk(ref_clk), .rst_n(rst_n),
    .tck(jt.tck), .trst_n(jt.trst_n), .tms(jt.tms), .tdi(jt.tdi), .tdo(jt.tdo),
    .clk(clk), .di(di), .do_o(do_o), .scan_in(1'b0), .se(1'b0), .scan_out(scan_out),
    .aging_alarm(aging_alarm), .agmon_state(agmon_state), .shift_count(shift_count)
  );

  int checks = 0;
  int failures = 0;

  initial forever begin
    #(PERIOD / 2) ref_clk = 1'b1;
    #(PERIOD - PERIOD / 2) ref_clk = 1'b0;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // core logic: alternating pattern, bit 7 with its own delay
  int unsigned  dly7 = 580;
  logic         phase = 1'b0;
  always @(posedge clk) begin
    logic [N-1:0] v;
    phase <= ~phase;
    v = phase ? 8'b11001110 : 8'b01001110;
    #200 di[6:0] = v[6:0];
    #(dly7 - 200) di[7] = v[7];
  end

  // samples of scan_out on the falling edges of one session
  task automatic record_session(output logic [15:0] samples, output int n);
    n = 0;
    samples = '0;
    do begin
      @(posedge clk);
      #10;
    end while (agmon_state != ST_CAPTURE);
    while (agmon_state == ST_CAPTURE || agmon_state == ST_SHIFT) begin
      #430;                           // 440 ps: before the falling edge
      samples[n] = scan_out;
      n++;
      @(posedge clk);
      #10;
    end
  endtask

  initial begin
    logic [31:0] cap;
    logic [15:0] s;
    int          n;
    rst_n = 1'b0;
    di = 8'b11001110;
    jt.reset();
    repeat (4) @(posedge ref_clk);
    rst_n = 1'b1;
    jt.shift_ir(32'(IR_AGMON), 3, cap);
    jt.shift_dr(32'(IVAL), 17, cap);

    // aged bit 7
    @(posedge clk);
    while (phase != 1'b0) @(posedge clk);       // this edge launches 01001110
    @(negedge clk);
    #1;
    checks++;
    if (do_o !== 8'b11001110) begin failures++; $display("DO %b", do_o); end
    @(posedge clk);
    #1;
    checks++;
    if (do_o !== 8'b01001110) begin failures++; $display("DO %b", do_o); end
    while (agmon_state != ST_IDLE) @(negedge clk);
    #1;
    record_session(s, n);
    $display("aged: %0d samples %b (first sample is bit 0), state %b, alarm %b",
             n, s, agmon_state, aging_alarm);
    checks++;
    if (n != 8 || s[7:0] !== 8'b1000_0000) begin
      failures++;
      $display("expected samples 0,0,0,0,0,0,0,1");
    end
    checks++;
    if (agmon_state !== ST_ALARM || !aging_alarm) failures++;

    // fresh bit 7: clear the alarm, sessions come out clean
    dly7 = 200;
    jt.shift_dr({15'b0, 1'b1, 16'(IVAL)}, 17, cap);
    jt.shift_dr(32'(IVAL), 17, cap);
    checks++;
    if (aging_alarm) failures++;
    repeat (2) begin
      while (agmon_state != ST_IDLE) @(negedge clk);
      #1;
      record_session(s, n);
      checks++;
      if (n != 9 || s !== '0 || aging_alarm) begin
        failures++;
        $display("fresh: %0d samples %b alarm %b", n, s, aging_alarm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
