// tap_controller: IEEE 1149.1 test access port that drives the IEEE 1500
// wrapper controls of every die, extended for at-speed transition tests.
//
// The 16-state TAP state machine advances on every rising edge of tck under
// tms. A 4-bit instruction register (tdf_pkg::tap_ir_e) selects what the DR
// states act on:
//   IR_WIR     select_wir = 1; Shift-DR shifts and Update-DR loads the WIRs.
//   IR_WDR     stuck-at timing: Capture-DR captures, Shift-DR shifts,
//              Update-DR updates the wrapper data registers.
//   IR_WDELAY  delay-test timing, using the otherwise idle DR states:
//                Exit1-DR  update   (first vector bit reaches the core)
//                Pause-DR  transfer (SC -> ST; harmless if repeated)
//                Exit2-DR  update + launch (second bit: the transition)
//                Update-DR capture  (one tck period after the launch)
//              Capture-DR does nothing, so the scan-out that follows keeps
//              the at-speed response.
//   IR_BYPASS  one-bit TAP bypass register between tdi and tdo.
// Each control is high while the machine is in the state and acts on the
// rising edge that leaves it. The wrapper reset wrstn is low in
// Test-Logic-Reset. tdo is combinational: IR shift bit in Shift-IR, bypass
// bit or the wrappers' serial output in Shift-DR.
//
// Generating update, transfer and capture from Exit1-DR, Exit2-DR and
// Pause-DR in delay-test mode follows the architecture; the assignment of
// each signal to each state, the extra launch strobe for the internal scan
// flops, the instruction codes, and a rising-edge tdo/update (the standard
// uses the falling edge) are this design's choices.
module tap_controller
  import tdf_pkg::*;
(
  input  logic tck,
  input  logic trst_n,     // asynchronous TAP reset, active low
  input  logic tms,
  input  logic tdi,
  output logic tdo,
  output logic wrstn,      // wrapper reset, active low
  output logic wsi,        // serial data into the wrappers
  input  logic wso,        // serial data back from the wrappers
  output wsc_t wsc,        // wrapper serial controls
  output logic delay_mode  // IR_WDELAY is active
);

  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PAU_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PAU_IR, EX2_IR, UPD_IR
  } tap_state_e;

  tap_state_e state, state_n;
  logic [IR_W-1:0] ir_sh;
  tap_ir_e         ir;
  logic            bypass_q;

  always_comb begin
    unique case (state)
      TLR:    state_n = tms ? TLR    : RTI;
      RTI:    state_n = tms ? SEL_DR : RTI;
      SEL_DR: state_n = tms ? SEL_IR : CAP_DR;
      CAP_DR: state_n = tms ? EX1_DR : SH_DR;
      SH_DR:  state_n = tms ? EX1_DR : SH_DR;
      EX1_DR: state_n = tms ? UPD_DR : PAU_DR;
      PAU_DR: state_n = tms ? EX2_DR : PAU_DR;
      EX2_DR: state_n = tms ? UPD_DR : SH_DR;
      UPD_DR: state_n = tms ? SEL_DR : RTI;
      SEL_IR: state_n = tms ? TLR    : CAP_IR;
      CAP_IR: state_n = tms ? EX1_IR : SH_IR;
      SH_IR:  state_n = tms ? EX1_IR : SH_IR;
      EX1_IR: state_n = tms ? UPD_IR : PAU_IR;
      PAU_IR: state_n = tms ? EX2_IR : PAU_IR;
      EX2_IR: state_n = tms ? UPD_IR : SH_IR;
      UPD_IR: state_n = tms ? SEL_DR : RTI;
      default: state_n = TLR;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TLR;
    else         state <= state_n;
  end

  // Instruction register: capture 0001, shift toward tdo, update to ir.
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sh <= '0;
      ir    <= IR_BYPASS;
    end else begin
      unique case (state)
        TLR:     ir <= IR_BYPASS;
        CAP_IR:  ir_sh <= IR_W'(1);
        SH_IR:   ir_sh <= {tdi, ir_sh[IR_W-1:1]};
        UPD_IR:  ir <= tap_ir_e'(ir_sh);
        default: ;
      endcase
    end
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                               bypass_q <= 1'b0;
    else if (state == CAP_DR)                  bypass_q <= 1'b0;
    else if (state == SH_DR)                   bypass_q <= tdi;
  end

  logic wrap_sel;  // a wrapper register is in the DR path
  assign wrap_sel   = (ir == IR_WIR) || (ir == IR_WDR) || (ir == IR_WDELAY);
  assign delay_mode = (ir == IR_WDELAY);

  always_comb begin
    wsc = '0;
    wsc.select_wir = (ir == IR_WIR);
    if (wrap_sel) begin
      wsc.shift_wr = (state == SH_DR);
      if (delay_mode) begin
        wsc.update_wr   = (state == EX1_DR) || (state == EX2_DR);
        wsc.transfer_wr = (state == PAU_DR);
        wsc.launch_wr   = (state == EX2_DR);
        wsc.capture_wr  = (state == UPD_DR);
      end else begin
        wsc.capture_wr  = (state == CAP_DR);
        wsc.update_wr   = (state == UPD_DR);
      end
    end
  end

  assign wrstn = (state != TLR);
  assign wsi   = tdi;

  always_comb begin
    if (state == SH_IR)                  tdo = ir_sh[0];
    else if (state == SH_DR && wrap_sel) tdo = wso;
    else if (state == SH_DR)             tdo = bypass_q;
    else                                 tdo = 1'b0;
  end

  // At most one wrapper action per clock edge (launch rides on update).
  a_one_action: assert property (@(posedge tck) disable iff (!wrstn)
    $onehot0({wsc.shift_wr, wsc.capture_wr, wsc.transfer_wr, wsc.update_wr}));

endmodule
