// Testbench of pit: for several intervals the distance between agmon_en
// pulses must be exactly the interval, each pulse one cycle long, the first
// pulse `interval` cycles after the timer starts; interval 0 gives no pulse.

`timescale 1ps/1ps
module tb_pit;

  localparam int unsigned W = 16;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] interval;
  logic         agmon_en;
  int           checks = 0;
  int           failures = 0;

  pit #(.INTERVAL_W(W)) dut (.clk(clk), .rst_n(rst_n), .interval(interval), .agmon_en(agmon_en));

  always #500 clk = ~clk;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // After release, agmon_en must be high exactly after rising edges
  // iv, 2*iv, 3*iv, ... and low after every other edge.
  task automatic run_interval(int unsigned iv, int pulses);
    int seen = 0;
    rst_n = 1'b0;
    interval = W'(iv);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 1; k <= pulses * int'(iv); k++) begin
      @(negedge clk);
      checks++;
      if (agmon_en !== ((k % int'(iv)) == 0)) begin
        failures++;
        $display("interval %0d: agmon_en=%b after edge %0d", iv, agmon_en, k);
      end
      if (agmon_en) seen++;
    end
    checks++;
    if (seen != pulses) failures++;
  endtask

  initial begin
    rst_n = 1'b0;
    interval = '0;
    repeat (2) @(negedge clk);
    run_interval(5, 4);
    run_interval(1, 3);
    run_interval(2, 3);
    run_interval(37, 3);
    // interval 0 switches the timer off
    interval = '0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      checks++;
      if (agmon_en) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
