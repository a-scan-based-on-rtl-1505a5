// Modified scan chain: a normal scan chain and an early capture scan chain.
//
// N scan cells (SC) form the core's normal scan chain from scan_in to the
// last SO; N early capture scan cells (ECSC) form a second chain from ecsi to
// the last ECSO. Cell k of each chain takes the functional bit di[N-1-k], so
// cell 0 (next to scan_in) holds the leftmost bit of di and the ECFF vector
// read from cell 0 to cell N-1 has di's own bit order. Each ECSC compares its
// early (falling-edge) capture with the DO of its SC.
//
// Scan Out selects the normal chain's SO when se=1 (scan test) and the early
// capture chain's ECSO when se=0, so during normal operation the aging
// monitor sees the comparison results on scan_out. do_o gives the captured
// functional data (DO) to the rest of the core, in di's bit order.
//
// Timing: SCs load on the rising edge, ECSCs on the falling edge of clk.
//
// The two parallel chains and the scan-out mux follow the published
// architecture; the mux polarity and the bit order are this design's choices.

`timescale 1ps/1ps
module modified_scan_chain #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         se,
  input  logic         scan_in,
  input  logic         ecsi,
  input  logic         ecse1,
  input  logic         ecse2,
  input  logic [N-1:0] di,
  output logic [N-1:0] do_o,
  output logic         scan_out
);

  logic [N:0] so_link;    // so_link[k] feeds SI of cell k
  logic [N:0] ecs_link;   // ecs_link[k] feeds ECSI of cell k

  assign so_link[0]  = scan_in;
  assign ecs_link[0] = ecsi;

  for (genvar k = 0; k < N; k++) begin : g_cell
    scan_cell u_sc (
      .clk (clk),
      .se  (se),
      .di  (di[N-1-k]),
      .si  (so_link[k]),
      .q   (so_link[k+1])
    );

    ecsc u_ecsc (
      .clk   (clk),
      .ecse1 (ecse1),
      .ecse2 (ecse2),
      .di    (di[N-1-k]),
      .do_i  (so_link[k+1]),
      .ecsi  (ecs_link[k]),
      .ecso  (ecs_link[k+1])
    );

    assign do_o[N-1-k] = so_link[k+1];
  end

  assign scan_out = se ? so_link[N] : ecs_link[N];

endmodule
