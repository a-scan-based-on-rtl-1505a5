// Early capture scan cell (ECSC).
//
// Sits beside a normal scan cell and shares its functional input di. Its
// early capture flip-flop (ECFF) is clocked on the falling edge of clk, which
// the duty-cycle-adjusted clock places inside the timing guard band, so the
// ECFF holds the value di had shortly before the rising edge on which the
// scan cell captures it. An XOR compares the ECFF with the scan cell's output
// do_i: a 1 means the data arrived inside the guard band, i.e. the path has
// slowed down.
//
//   ecse1=0: ECFF <= di at every falling edge (normal operation)
//   ecse1=1: ECFF <= ecsi (the previous cell's ecso)
//   ecse2=0: ecso  = ECFF ^ do_i (comparison result)
//   ecse2=1: ecso  = ECFF (shift path)
//
// With ecse1=1, ecse2=0 the next cell stores this cell's comparison at the
// falling edge; with both at 1 the chain of ECFFs shifts one place per
// falling edge. The cell is one flop, one XOR and two muxes, as in the
// published cell; it has no reset.

`timescale 1ps/1ps
module ecsc (
  input  logic clk,
  input  logic ecse1,
  input  logic ecse2,
  input  logic di,
  input  logic do_i,
  input  logic ecsi,
  output logic ecso
);

  logic ecff;

  always_ff @(negedge clk) begin
    ecff <= ecse1 ? ecsi : di;
  end

  always_comb begin
    ecso = ecse2 ? ecff : (ecff ^ do_i);
  end

endmodule
