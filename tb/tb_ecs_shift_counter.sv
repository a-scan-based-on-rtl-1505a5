// Testbench of ecs_shift_counter (N=8): with shift_en held high, shift_done
// must be high in exactly the 8th cycle, then the count starts again; the
// count must follow 0,1,..,7 and clear when shift_en drops.

`timescale 1ps/1ps
module tb_ecs_shift_counter;

  localparam int unsigned N = 8;

  logic       clk = 1'b0;
  logic       rst_n, shift_en, shift_done;
  logic [2:0] count;
  int         checks = 0;
  int         failures = 0;

  ecs_shift_counter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .shift_en(shift_en),
                                  .count(count), .shift_done(shift_done));

  always #500 clk = ~clk;

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    shift_en = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (shift_done || count != 0) failures++;
    shift_en = 1'b1;
    for (int c = 0; c < 3 * N; c++) begin
      checks++;
      if (count != 3'(c % N) || shift_done != ((c % N) == N - 1)) begin
        failures++;
        $display("shift cycle %0d: count=%0d done=%b", c, count, shift_done);
      end
      @(negedge clk);
    end
    // a partial run, then shift_en low clears the count
    repeat (3) @(negedge clk);
    shift_en = 1'b0;
    checks++;
    if (shift_done) failures++;
    @(negedge clk);
    checks++;
    if (count != 0) begin failures++; $display("count not cleared"); end
    shift_en = 1'b1;
    for (int c = 0; c < N; c++) begin
      checks++;
      if (shift_done != (c == N - 1)) failures++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
