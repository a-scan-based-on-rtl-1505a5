// Testbench of scan_cell: random se, di and si; after each rising edge the
// output must equal the value the mux selected just before the edge.

`timescale 1ps/1ps
module tb_scan_cell;

  logic clk = 1'b0;
  logic se, di, si, q;
  int   checks = 0;
  int   failures = 0;

  scan_cell dut (.clk(clk), .se(se), .di(di), .si(si), .q(q));

  always #500 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    int   n_scan = 0, n_func = 0;
    se = 1'b0; di = 1'b0; si = 1'b0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      se = 1'($urandom);
      di = 1'($urandom);
      si = 1'($urandom);
      expected = se ? si : di;
      if (se) n_scan++; else n_func++;
      @(posedge clk);
      #10;
      checks++;
      if (q !== expected) begin
        failures++;
        $display("mismatch at %0t: se=%b di=%b si=%b q=%b", $time, se, di, si, q);
      end
    end
    checks++;
    if (n_scan == 0 || n_func == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
