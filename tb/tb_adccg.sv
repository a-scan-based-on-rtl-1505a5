// Testbench of the adccg clock generator model.
//
// A 1.6 GHz reference (625 ps period) is applied. For several duty codes the
// testbench measures the generated clock: its period must equal the
// reference period and its high time must be floor(625*duty/256) ps. Code
// 224 must put the falling edge inside the 500-625 ps guard band of a 2 GHz
// test clock; code 128 gives the plain 50 % clock.

`timescale 1ps/1ps
module tb_adccg;

  localparam int unsigned DW     = 8;
  localparam int unsigned PERIOD = 625;

  logic          ref_clk = 1'b0;
  logic [DW-1:0] duty;
  logic          clk;
  int            checks = 0;
  int            failures = 0;

  adccg #(.DUTY_W(DW)) dut (.ref_clk(ref_clk), .duty(duty), .clk(clk));

  initial forever begin
    #(PERIOD / 2) ref_clk = 1'b1;
    #(PERIOD - PERIOD / 2) ref_clk = 1'b0;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int codes[5] = '{224, 128, 205, 250, 64};
    time t_rise, t_fall, t_next;
    duty = DW'(224);
    foreach (codes[i]) begin
      duty = DW'(codes[i]);
      repeat (3) @(posedge ref_clk);
      for (int n = 0; n < 4; n++) begin
        @(posedge clk) t_rise = $time;
        @(negedge clk) t_fall = $time;
        @(posedge clk) t_next = $time;
        checks++;
        if (t_next - t_rise != PERIOD || t_fall - t_rise != (PERIOD * codes[i]) / 256) begin
          failures++;
          $display("code %0d: period %0t high %0t", codes[i], t_next - t_rise, t_fall - t_rise);
        end
        if (codes[i] == 224) begin
          checks++;
          if (!(t_fall - t_rise > 500 && t_fall - t_rise < PERIOD)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
