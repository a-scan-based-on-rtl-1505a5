// Testbench of tap, driven through the JTAG bus-functional model.
//
// Checked: after trst_n the outputs hold their reset values and the
// instruction is BYPASS; Capture-IR shifts out 001; BYPASS delays tdi by one
// tck; writes of random duty codes and {rst_req, interval} words appear on
// the outputs after Update-DR and read back on tdo in the next scan; values
// survive a pass through Test-Logic-Reset; an unknown instruction acts as
// BYPASS and leaves the registers alone.

`timescale 1ps/1ps
module tb_tap;
  import aging_mon_pkg::*;

  localparam int unsigned DW = 8;
  localparam int unsigned IW = 16;

  logic [DW-1:0] duty;
  logic [IW-1:0] interval;
  logic          rst_req;
  int            checks = 0;
  int            failures = 0;

  jtag_bfm jt ();

  tap #(.DUTY_W(DW), .INTERVAL_W(IW)) dut (
    .tck(jt.tck), .trst_n(jt.trst_n), .tms(jt.tms), .tdi(jt.tdi), .tdo(jt.tdo),
    .duty(duty), .interval(interval), .rst_req(rst_req)
  );

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    logic [31:0] cap;
    logic [31:0] pat;
    logic [DW-1:0] d_last;
    logic [IW:0]   a_last;
    logic          b;

    jt.reset();
    check(duty == DW'(224) && interval == '0 && !rst_req, "reset values");

    // instruction capture value
    jt.shift_ir(32'(IR_BYPASS), 3, cap);
    check(cap[2:0] == 3'b001, "Capture-IR value");

    // bypass: one-bit delay, first bit is the captured 0
    pat = $urandom;
    jt.shift_dr(pat, 16, cap);
    check(cap[0] == 1'b0 && cap[15:1] == pat[14:0], "bypass");

    d_last = duty;
    a_last = {rst_req, interval};
    for (int i = 0; i < 20; i++) begin
      logic [DW-1:0] d;
      logic [IW:0]   a;
      d = DW'($urandom);
      a = (IW + 1)'($urandom);
      jt.shift_ir(32'(IR_DUTY), 3, cap);
      jt.shift_dr(32'(d), DW, cap);
      check(cap[DW-1:0] == d_last, "duty read-back");
      check(duty == d, "duty update");
      check({rst_req, interval} == a_last, "agmon untouched by duty write");
      d_last = d;
      jt.shift_ir(32'(IR_AGMON), 3, cap);
      jt.shift_dr(32'(a), IW + 1, cap);
      check(cap[IW:0] == a_last, "agmon read-back");
      check({rst_req, interval} == a, "agmon update");
      check(duty == d_last, "duty untouched by agmon write");
      a_last = a;
    end

    // Test-Logic-Reset keeps the programmed values, selects BYPASS
    repeat (5) jt.step(1'b1, 1'b0, b);
    jt.step(1'b0, 1'b0, b);
    check(duty == d_last && {rst_req, interval} == a_last, "values kept over TLR");
    pat = $urandom;
    jt.shift_dr(pat, 8, cap);
    check(cap[0] == 1'b0 && cap[7:1] == pat[6:0], "BYPASS after TLR");
    check(duty == d_last && {rst_req, interval} == a_last, "bypass write harmless");

    // unknown instruction behaves as bypass
    jt.shift_ir(32'b100, 3, cap);
    pat = $urandom;
    jt.shift_dr(pat, 8, cap);
    check(cap[7:1] == pat[6:0], "unknown instruction bypass");
    check(duty == d_last && {rst_req, interval} == a_last, "unknown instruction harmless");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
