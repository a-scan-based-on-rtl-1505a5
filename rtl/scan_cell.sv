// Scan cell (SC) of the core's normal scan chain.
//
// A mux-D flip-flop: with scan enable se=0 the rising edge of clk loads the
// functional data di, with se=1 it loads the scan input si. The flop output q
// is both the functional output DO and the scan output SO. The structure is
// the ordinary scan cell the aging monitor is built around; se=1 selecting
// si is the usual scan convention. The cell has no reset, as functional scan
// flops usually have none.

`timescale 1ps/1ps
module scan_cell (
  input  logic clk,
  input  logic se,
  input  logic di,
  input  logic si,
  output logic q
);

  always_ff @(posedge clk) begin
    q <= se ? si : di;
  end

endmodule
