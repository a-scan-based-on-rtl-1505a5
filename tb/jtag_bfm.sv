// JTAG bus-functional model used by the testbenches.
//
// Holds the five test-port signals and drives them with tasks: reset()
// pulses trst_n and walks the controller to Run-Test/Idle, shift_ir() and
// shift_dr() load an instruction or data register from Run-Test/Idle and
// return to it, giving back the bits shifted out of tdo (LSB first). One tck
// period is 2*HALF_PS picoseconds; tms and tdi change while tck is low and
// tdo is sampled just before the rising edge.

`timescale 1ps/1ps
interface jtag_bfm #(
  parameter int unsigned HALF_PS = 5000
);

  logic tck;
  logic trst_n;
  logic tms;
  logic tdi;
  logic tdo;

  initial begin
    tck    = 1'b0;
    trst_n = 1'b1;
    tms    = 1'b1;
    tdi    = 1'b0;
  end

  task automatic step(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    #(HALF_PS);
    tdo_v = tdo;
    tck = 1'b1;
    #(HALF_PS);
    tck = 1'b0;
  endtask

  task automatic reset();
    logic unused;
    trst_n = 1'b1;
    #(HALF_PS);
    trst_n = 1'b0;
    #(2 * HALF_PS);
    trst_n = 1'b1;
    repeat (5) step(1'b1, 1'b0, unused);
    step(1'b0, 1'b0, unused);
  endtask

  // Shift `width` bits of `data` into the register selected by the path
  // (ir=1: instruction register), from and back to Run-Test/Idle.
  task automatic shift_reg(input logic ir, input logic [31:0] data, input int width,
                           output logic [31:0] captured);
    logic b;
    captured = '0;
    step(1'b1, 1'b0, b);                 // Select-DR-Scan
    if (ir) step(1'b1, 1'b0, b);         // Select-IR-Scan
    step(1'b0, 1'b0, b);                 // Capture
    step(1'b0, 1'b0, b);                 // Shift
    for (int i = 0; i < width; i++) begin
      step((i == width - 1), data[i], b);  // last bit moves to Exit1
      captured[i] = b;
    end
    step(1'b1, 1'b0, b);                 // Update
    step(1'b0, 1'b0, b);                 // Run-Test/Idle
  endtask

  task automatic shift_ir(input logic [31:0] data, input int width, output logic [31:0] captured);
    shift_reg(1'b1, data, width, captured);
  endtask

  task automatic shift_dr(input logic [31:0] data, input int width, output logic [31:0] captured);
    shift_reg(1'b0, data, width, captured);
  endtask

endinterface
