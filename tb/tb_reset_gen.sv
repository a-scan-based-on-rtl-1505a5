// Testbench of reset_gen: each 0->1 change of rst_req, made at random times
// relative to clk, must give exactly one agmon_rst pulse of one cycle, two
// or three rising edges later; a held or falling rst_req gives none.

`timescale 1ps/1ps
module tb_reset_gen;

  logic clk = 1'b0;
  logic rst_n, rst_req, agmon_rst;
  int   checks = 0;
  int   failures = 0;
  int   pulses = 0;

  reset_gen dut (.clk(clk), .rst_n(rst_n), .rst_req(rst_req), .agmon_rst(agmon_rst));

  always #500 clk = ~clk;
  always @(posedge clk) if (agmon_rst) pulses++;

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_before;
    int wait_edges;
    rst_n = 1'b0;
    rst_req = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    for (int i = 0; i < 20; i++) begin
      #($urandom % 1000);
      n_before = pulses;
      rst_req = 1'b1;
      wait_edges = 0;
      while (!agmon_rst && wait_edges < 6) begin
        @(posedge clk);
        #1;
        wait_edges++;
      end
      checks++;
      if (!agmon_rst || wait_edges < 2 || wait_edges > 3) begin
        failures++;
        $display("request %0d: pulse after %0d edges", i, wait_edges);
      end
      repeat (8) @(posedge clk);
      checks++;
      if (pulses != n_before + 1) begin failures++; $display("pulses %0d", pulses - n_before); end
      n_before = pulses;
      rst_req = 1'b0;
      repeat (8) @(posedge clk);
      checks++;
      if (pulses != n_before) begin failures++; $display("pulse on falling request"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
