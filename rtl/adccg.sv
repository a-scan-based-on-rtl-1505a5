// Adjustable duty cycle clock generator (ADCCG) -- behavioural model.
//
// The real part is a mixed-signal duty-cycle-adjusting clock circuit; this
// file is a simulation model of it, not synthesizable logic. It generates the
// core's functional clock clk from the reference clock ref_clk: clk rises
// with every rising edge of ref_clk and falls duty/2^DUTY_W of a reference
// period later, the period being the time between the last two reference
// edges, in whole picoseconds rounded down. The duty code is written through the test access port and is chosen
// so that the falling edge lands in the guard band at the end of the period
// (for a 625 ps period and a 500 ps guard-banded test period, a high time
// between 500 ps and 625 ps, e.g. code 224 of 256 = 547 ps). clk stays low
// until two reference edges have been seen, and for duty=0. The fall delay
// is computed at run time, so Verilator warns that it might be zero; it is
// not zero for any reference period of 256 ps or more, as duty=0 is skipped.

`timescale 1ps/1ps
module adccg #(
  parameter int unsigned DUTY_W = 8
) (
  input  logic              ref_clk,
  input  logic [DUTY_W-1:0] duty,
  output logic              clk
);

  time     last_edge;
  time     period;
  time     high_time;
  logic    seen_edge;

  initial begin
    clk       = 1'b0;
    seen_edge = 1'b0;
    last_edge = 0;
    period    = 0;
  end

  initial forever begin
    @(posedge ref_clk);
    if (seen_edge) period = $time - last_edge;
    last_edge = $time;
    seen_edge = 1'b1;
    if (period > 0 && duty != '0) begin
      high_time = (period * time'(duty)) >> DUTY_W;
      clk = 1'b1;
      fork
        begin
          #(high_time) clk = 1'b0;
        end
      join_none
    end
  end

endmodule
