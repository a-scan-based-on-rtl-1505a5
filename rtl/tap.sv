// Test access port (TAP) that programs the aging monitoring hardware.
//
// The clock duty cycle and the aging monitor control information are set
// through this port. It follows the IEEE 1149.1 scheme: the 16-state TAP
// controller advanced by tms on the rising edge of tck, a 3-bit instruction
// register, and data registers shifted LSB first from tdi to tdo, with tdo
// changing on the falling edge of tck. The instructions and registers are
// this design's own:
//   IR_DUTY   (001)  DUTY_W-bit duty-cycle code for the clock generator
//   IR_AGMON  (010)  {rst_req, interval}: INTERVAL_W-bit session interval of
//                    the interval timer and the alarm reset request bit
//   IR_BYPASS (111)  one-bit bypass; also any other code
// Capture-IR loads 3'b001 (the two fixed LSBs). A data register's shift
// stage captures the current value in Capture-DR; the outputs (update stage)
// take the shifted value on the rising tck edge that leaves Update-DR.
// trst_n resets the controller, the instruction (to BYPASS) and the outputs
// (to DUTY_RESET, INTERVAL_RESET and 0); the Test-Logic-Reset state resets
// only the instruction, so the programmed values stay in force.

`timescale 1ps/1ps
module tap
  import aging_mon_pkg::*;
#(
  parameter int unsigned          DUTY_W         = 8,
  parameter int unsigned          INTERVAL_W     = 16,
  parameter logic [DUTY_W-1:0]    DUTY_RESET     = DUTY_W'(224),
  parameter logic [INTERVAL_W-1:0] INTERVAL_RESET = '0
) (
  input  logic                  tck,
  input  logic                  trst_n,
  input  logic                  tms,
  input  logic                  tdi,
  output logic                  tdo,
  output logic [DUTY_W-1:0]     duty,
  output logic [INTERVAL_W-1:0] interval,
  output logic                  rst_req
);

  typedef enum logic [3:0] {
    TLR, RTI,
    SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_t;

  localparam int unsigned AG_W = INTERVAL_W + 1;

  tap_state_t            st, st_d;
  logic [TAP_IR_W-1:0]   ir, ir_sh;
  logic [DUTY_W-1:0]     duty_sh;
  logic [AG_W-1:0]       ag_sh;
  logic                  byp_sh;
  logic                  tdo_d;

  always_comb begin
    unique case (st)
      TLR:    st_d = tms ? TLR    : RTI;
      RTI:    st_d = tms ? SEL_DR : RTI;
      SEL_DR: st_d = tms ? SEL_IR : CAP_DR;
      CAP_DR: st_d = tms ? EX1_DR : SH_DR;
      SH_DR:  st_d = tms ? EX1_DR : SH_DR;
      EX1_DR: st_d = tms ? UPD_DR : PAU_DR;
      PAU_DR: st_d = tms ? EX2_DR : PAU_DR;
      EX2_DR: st_d = tms ? UPD_DR : SH_DR;
      UPD_DR: st_d = tms ? SEL_DR : RTI;
      SEL_IR: st_d = tms ? TLR    : CAP_IR;
      CAP_IR: st_d = tms ? EX1_IR : SH_IR;
      SH_IR:  st_d = tms ? EX1_IR : SH_IR;
      EX1_IR: st_d = tms ? UPD_IR : PAU_IR;
      PAU_IR: st_d = tms ? EX2_IR : PAU_IR;
      EX2_IR: st_d = tms ? UPD_IR : SH_IR;
      UPD_IR: st_d = tms ? SEL_DR : RTI;
      default: st_d = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) st <= TLR;
    else         st <= st_d;
  end

  // Instruction register: shift stage and update stage.
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sh <= '0;
      ir    <= IR_BYPASS;
    end else begin
      if (st == CAP_IR)     ir_sh <= TAP_IR_W'(1);
      else if (st == SH_IR) ir_sh <= {tdi, ir_sh[TAP_IR_W-1:1]};
      if (st == TLR)         ir <= IR_BYPASS;
      else if (st == UPD_IR) ir <= ir_sh;
    end
  end

  // Data registers: shift stages.
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      duty_sh <= '0;
      ag_sh   <= '0;
      byp_sh  <= 1'b0;
    end else if (st == CAP_DR) begin
      unique case (ir)
        IR_DUTY:  duty_sh <= duty;
        IR_AGMON: ag_sh   <= {rst_req, interval};
        default:  byp_sh  <= 1'b0;
      endcase
    end else if (st == SH_DR) begin
      unique case (ir)
        IR_DUTY:  duty_sh <= {tdi, duty_sh[DUTY_W-1:1]};
        IR_AGMON: ag_sh   <= {tdi, ag_sh[AG_W-1:1]};
        default:  byp_sh  <= tdi;
      endcase
    end
  end

  // Data registers: update stages, the values the hardware uses.
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      duty     <= DUTY_RESET;
      interval <= INTERVAL_RESET;
      rst_req  <= 1'b0;
    end else if (st == UPD_DR) begin
      if (ir == IR_DUTY)  duty <= duty_sh;
      if (ir == IR_AGMON) {rst_req, interval} <= ag_sh;
    end
  end

  always_comb begin
    if (st == SH_IR) begin
      tdo_d = ir_sh[0];
    end else begin
      unique case (ir)
        IR_DUTY:  tdo_d = duty_sh[0];
        IR_AGMON: tdo_d = ag_sh[0];
        default:  tdo_d = byp_sh;
      endcase
    end
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) tdo <= 1'b0;
    else         tdo <= tdo_d;
  end

endmodule
