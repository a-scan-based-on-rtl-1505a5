// Programmable interval timer (PIT) of the aging monitor.
//
// Counts clk cycles and raises agmon_en for exactly one cycle every
// `interval` cycles; that pulse starts one aging monitoring session. The
// interval is programmed through the test access port. interval=0 stops the
// timer (no sessions) and clears the count; this off setting and the counter
// width INTERVAL_W are this design's choices.
//
// Timing: with a constant interval I>0, agmon_en is high in cycles
// I, 2I, 3I, ... counted from the end of reset (first rising edge = cycle 1).

`timescale 1ps/1ps
module pit #(
  parameter int unsigned INTERVAL_W = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [INTERVAL_W-1:0] interval,
  output logic                  agmon_en
);

  logic [INTERVAL_W-1:0] count;
  logic                  hit;

  // >= also recovers if the interval is lowered below the running count.
  assign hit = (interval != '0) && (count >= interval - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      agmon_en <= 1'b0;
    end else if (interval == '0) begin
      count    <= '0;
      agmon_en <= 1'b0;
    end else begin
      count    <= hit ? '0 : count + 1'b1;
      agmon_en <= hit;
    end
  end

endmodule
