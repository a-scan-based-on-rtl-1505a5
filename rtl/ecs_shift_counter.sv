// ECS shift counter of the aging monitor.
//
// While shift_en is high the counter advances by one per rising edge of clk;
// shift_done is high in the cycle in which the count is N-1, which is the
// N-th shift cycle of a session, so a session shifts the whole N-cell early
// capture chain. The counter clears whenever shift_en is low. count is the
// monitor's Shift_Count output. Clearing on shift_en=0 is this design's
// choice.

`timescale 1ps/1ps
module ecs_shift_counter #(
  parameter int unsigned N = 8,
  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          shift_en,
  output logic [CW-1:0] count,
  output logic          shift_done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else if (!shift_en || shift_done) begin
      count <= '0;
    end else begin
      count <= count + 1'b1;
    end
  end

  assign shift_done = shift_en && (count == CW'(N - 1));

endmodule
