// Reset generator of the aging monitor.
//
// The alarm is cleared by writing the reset-request bit of the monitor
// control register through the test access port. That bit lives in the test
// clock domain, so it is brought into the clk domain by two flip-flops, and
// every 0->1 change of the synchronised bit gives a one-cycle agmon_rst pulse
// (AgMon_Rst). The synchroniser and edge detector are this design's own
// realisation of the block.
//
// Timing: agmon_rst goes high just after the second rising clk edge that
// sees rst_req high, so the third edge acts on it; it lasts one cycle.

`timescale 1ps/1ps
module reset_gen (
  input  logic clk,
  input  logic rst_n,
  input  logic rst_req,
  output logic agmon_rst
);

  logic [2:0] sync;  // sync[0], sync[1]: synchroniser; sync[2]: previous value

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync <= '0;
    end else begin
      sync <= {sync[1:0], rst_req};
    end
  end

  assign agmon_rst = sync[1] && !sync[2];

endmodule
