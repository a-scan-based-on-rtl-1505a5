// Testbench of ecsc: random data and enables. A reference ECFF is updated on
// each falling edge (di or ecsi by ecse1); ecso is checked against
// ecse2 ? ECFF : ECFF ^ do_i in both clock phases.

`timescale 1ps/1ps
module tb_ecsc;

  logic clk = 1'b0;
  logic ecse1, ecse2, di, do_i, ecsi, ecso;
  logic ecff_ref;
  int   checks = 0;
  int   failures = 0;
  int   seen[4];

  ecsc dut (.clk(clk), .ecse1(ecse1), .ecse2(ecse2), .di(di), .do_i(do_i),
            .ecsi(ecsi), .ecso(ecso));

  always #500 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out();
    logic expected;
    expected = ecse2 ? ecff_ref : (ecff_ref ^ do_i);
    checks++;
    if (ecso !== expected) begin
      failures++;
      $display("mismatch at %0t: ecse1=%b ecse2=%b ecff=%b do=%b ecso=%b",
               $time, ecse1, ecse2, ecff_ref, do_i, ecso);
    end
  endtask

  initial begin
    ecse1 = 1'b0; ecse2 = 1'b0; di = 1'b0; do_i = 1'b0; ecsi = 1'b0;
    @(negedge clk);
    ecff_ref = di;
    for (int i = 0; i < 400; i++) begin
      // inputs change while clk is low, then again while it is high
      #100;
      ecse1 = 1'($urandom);
      ecse2 = 1'($urandom);
      di    = 1'($urandom);
      ecsi  = 1'($urandom);
      do_i  = 1'($urandom);
      seen[{ecse1, ecse2}]++;
      #10 check_out();
      @(posedge clk);
      #100;
      do_i  = 1'($urandom);
      di    = 1'($urandom);
      ecsi  = 1'($urandom);
      #10 check_out();
      @(negedge clk);
      ecff_ref = ecse1 ? ecsi : di;
      #1 check_out();
    end
    foreach (seen[m]) begin
      checks++;
      if (seen[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
