// die_wrapper: IEEE 1500 test wrapper of one die of the 3D stack, able to
// apply transition (two-pattern) tests before and after bonding.
//
// Contents: a wrapper instruction register (wir), a transition-capable
// boundary register with one cell per signal TSV (wbr_chain), a one-bit
// internal bypass per lane, the serial/parallel routing through the core's
// internal scan chains, and, on a die with a die above it (HAS_ELEVATOR), the
// elevator multiplexer that returns the data coming down from that die.
//
// Data paths selected by the instruction (tdf_pkg::wir_t) when select_wir is
// low:
//   serial intest:   wsi -> WBR -> core chain 0 -> ... -> chain N-1 -> out
//   serial extest:   wsi -> WBR -> out
//   serial bypass / functional: wsi -> bypass[0] -> out
//   parallel: lane k runs wpi[k] -> WBR segment k -> core chain k -> wpo[k]
//   (intest), WBR segment k alone (extest) or its bypass flop. The WBR is
//   cut into N_CHAINS near-equal segments, so each lane carries about
//   1/N_CHAINS of the boundary bits.
// With select_wir high the serial path is the WIR alone.
// "out" is sent up to the die above (up_wsi / up_wpi). wso / wpo return
// either this die's own out ("turn") or the data coming back from above
// (up_wso / up_wpo, "elevator"). The WIR path always uses the elevator in a
// post-bond instruction, so the WIRs of both dies form one chain; a pre-bond
// instruction always turns.
//
// Boundary cells: inbound cells (TSV -> core) drive the core in intest,
// outbound cells (core -> TSV) drive the TSVs in extest. With TSVtest set on a
// die whose cells face the die below (FACES_BELOW), all its cells become
// transparent, so the die below launches onto the TSVs straight into this
// core and captures what this core drives back.
//
// Core control: core_se shifts the internal chains in intest; core_ce is the
// clock enable of the internal flops: always on in functional mode, shift,
// capture and launch pulses in intest, off otherwise (the flops of a die not
// under test do not toggle).
//
// The blocks, the modes and the elevator follow the architecture; the
// even split of the boundary cells over the parallel lanes matches the test
// times reported for the architecture. The instruction encoding, the WIR chain
// through the elevator and the broadside (launch-off-capture) use of the
// internal scan flops are this design's choices. All state changes on the
// rising edge of clk.
module die_wrapper
  import tdf_pkg::*;
#(
  parameter int unsigned N_CHAINS     = 5,    // internal scan chains = parallel lanes
  parameter int unsigned N_IN         = 4,    // inbound signal TSVs (TSV -> core)
  parameter int unsigned N_OUT        = 4,    // outbound signal TSVs (core -> TSV)
  parameter bit          HAS_ELEVATOR = 1'b1, // a die is stacked on top of this one
  parameter bit          FACES_BELOW  = 1'b0  // the boundary cells face a die below
) (
  input  logic                clk,      // wrapper test clock
  input  logic                rst_n,    // synchronous, active low
  input  wsc_t                wsc,
  // test access from below (tester, or the die below)
  input  logic                wsi,
  output logic                wso,
  input  logic [N_CHAINS-1:0] wpi,
  output logic [N_CHAINS-1:0] wpo,
  // test access to the die above (elevator)
  output logic                up_wsi,
  input  logic                up_wso,
  output logic [N_CHAINS-1:0] up_wpi,
  input  logic [N_CHAINS-1:0] up_wpo,
  // functional signals through the boundary register
  input  logic [N_IN-1:0]     tsv_in,
  output logic [N_IN-1:0]     core_in,
  input  logic [N_OUT-1:0]    core_out,
  output logic [N_OUT-1:0]    tsv_out,
  // internal scan chains of the core
  output logic [N_CHAINS-1:0] core_si,
  input  logic [N_CHAINS-1:0] core_so,
  output logic                core_se,
  output logic                core_ce,
  output wir_t                instr     // active instruction, for observation
);

  logic [N_CHAINS-1:0] seg_si, seg_so;
  logic wir_so, wbr_so;
  logic is_func, is_intest, is_extest, data_sel, wbr_sel;

  wir u_wir (
    .clk       (clk),
    .rst_n     (rst_n),
    .select    (wsc.select_wir),
    .shift_en  (wsc.shift_wr),
    .update_en (wsc.update_wr),
    .si        (wsi),
    .so        (wir_so),
    .instr     (instr)
  );

  assign data_sel  = !wsc.select_wir;
  assign is_func   = (instr.mode == WM_FUNC);
  assign is_intest = (instr.mode == WM_INTEST);
  assign is_extest = (instr.mode == WM_EXTEST);
  assign wbr_sel   = data_sel && (is_intest || is_extest);

  // WBR segments: chained behind wsi in serial access, fed by the lanes in
  // parallel access.
  always_comb begin
    seg_si[0] = instr.parallel ? wpi[0] : wsi;
    for (int k = 1; k < int'(N_CHAINS); k++)
      seg_si[k] = instr.parallel ? wpi[k] : seg_so[k-1];
  end
  assign wbr_so = seg_so[N_CHAINS-1];

  wbr_chain #(.N_IN(N_IN), .N_OUT(N_OUT), .N_SEG(N_CHAINS)) u_wbr (
    .clk         (clk),
    .rst_n       (rst_n),
    .shift_en    (wbr_sel && wsc.shift_wr),
    .capture_en  (wbr_sel && wsc.capture_wr),
    .transfer_en (wbr_sel && wsc.transfer_wr),
    .update_en   (wbr_sel && wsc.update_wr),
    .drive_in    (is_intest),
    .drive_out   (is_extest),
    .transparent (FACES_BELOW && instr.tsvtest),
    .si          (seg_si),
    .so          (seg_so),
    .in_cfi      (tsv_in),
    .in_cfo      (core_in),
    .out_cfi     (core_out),
    .out_cfo     (tsv_out)
  );

  // Internal bypass, one flop per lane; lane 0 doubles as the serial bypass.
  logic [N_CHAINS-1:0] byp_q, byp_d;
  always_comb begin
    byp_d    = wpi;
    byp_d[0] = instr.parallel ? wpi[0] : wsi;
  end
  always_ff @(posedge clk) begin
    if (!rst_n)                          byp_q <= '0;
    else if (data_sel && wsc.shift_wr)   byp_q <= byp_d;
  end

  // Internal scan chains.
  always_comb begin
    for (int k = 0; k < int'(N_CHAINS); k++) begin
      if (instr.parallel) core_si[k] = seg_so[k];
      else if (k == 0)    core_si[k] = wbr_so;
      else                core_si[k] = core_so[k-1];
    end
  end
  assign core_se = data_sel && is_intest && wsc.shift_wr;
  assign core_ce = is_func ||
                   (data_sel && is_intest &&
                    (wsc.shift_wr || wsc.capture_wr || wsc.launch_wr));

  // This die's own outputs.
  logic                own_so;
  logic [N_CHAINS-1:0] lane_out;
  always_comb begin
    if (wsc.select_wir)   own_so = wir_so;
    else if (is_intest)   own_so = core_so[N_CHAINS-1];
    else if (is_extest)   own_so = wbr_so;
    else                  own_so = byp_q[0];
    for (int k = 0; k < int'(N_CHAINS); k++) begin
      if (is_intest)                lane_out[k] = core_so[k];
      else if (is_extest)           lane_out[k] = seg_so[k];
      else                          lane_out[k] = byp_q[k];
    end
  end

  // Turn or elevator.
  logic elev_s, elev_p;
  if (HAS_ELEVATOR) begin : g_elevator
    assign elev_s = instr.postbond && (wsc.select_wir || instr.elevator);
    assign elev_p = instr.postbond && !wsc.select_wir && instr.elevator;
  end else begin : g_no_elevator
    assign elev_s = 1'b0;
    assign elev_p = 1'b0;
  end

  assign up_wsi = own_so;
  assign up_wpi = lane_out;
  assign wso    = elev_s ? up_wso : own_so;
  assign wpo    = elev_p ? up_wpo : lane_out;

  // The TAP issues at most one wrapper action per clock edge.
  a_one_action: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({wsc.shift_wr, wsc.capture_wr, wsc.transfer_wr, wsc.update_wr}));

endmodule
