// wbr_chain: the boundary register of one die, one wbr_cell per signal TSV.
//
// Cells for inbound signals (TSV -> core) come first, followed by cells for
// outbound signals (core -> TSV): cell k is in[k] for k < N_IN, else
// out[k-N_IN]. The cells are cut into N_SEG segments of
// SEG_LEN = ceil((N_IN+N_OUT)/N_SEG) consecutive cells (the last one may be
// shorter); segment s runs from si[s] to so[s]. Chaining so[s] into si[s+1]
// gives the single serial register; in parallel access each segment sits in
// front of its own internal scan chain, so the boundary bits are spread
// evenly over the lanes. Each cell contributes two bits (SC then ST). Inbound cells drive the core when drive_in is
// set (intest); outbound cells drive the TSVs when drive_out is set
// (extest). `transparent` makes every cell pass cfi to cfo (TSVtest).
// All control inputs act on the next rising clock edge.
//
// One cell per TSV follows the architecture; spreading the cells evenly over
// the lanes matches the test times reported for the architecture; the
// in-then-out ordering is this design's choice.
module wbr_chain #(
  parameter int unsigned N_IN  = 4,  // inbound cells (TSV -> core)
  parameter int unsigned N_OUT = 4,  // outbound cells (core -> TSV)
  parameter int unsigned N_SEG = 1   // serial segments (one per parallel lane)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             capture_en,
  input  logic             transfer_en,
  input  logic             update_en,
  input  logic             drive_in,
  input  logic             drive_out,
  input  logic             transparent,
  input  logic [N_SEG-1:0] si,       // serial in of each segment
  output logic [N_SEG-1:0] so,       // serial out of each segment
  input  logic [N_IN-1:0]  in_cfi,   // from TSVs
  output logic [N_IN-1:0]  in_cfo,   // to core
  input  logic [N_OUT-1:0] out_cfi,  // from core
  output logic [N_OUT-1:0] out_cfo   // to TSVs
);

  localparam int unsigned N       = N_IN + N_OUT;
  localparam int unsigned SEG_LEN = (N + N_SEG - 1) / N_SEG;

  logic [N-1:0] cti, cto;
  logic [N-1:0] cfi_all, cfo_all, drive_all;

  assign cfi_all   = {out_cfi, in_cfi};
  assign drive_all = {{N_OUT{drive_out}}, {N_IN{drive_in}}};
  assign in_cfo    = cfo_all[N_IN-1:0];
  assign out_cfo   = cfo_all[N-1:N_IN];

  // Segment s holds cells s*SEG_LEN .. min((s+1)*SEG_LEN, N)-1.
  for (genvar s = 0; s < N_SEG; s++) begin : g_seg
    if (s * SEG_LEN < N) begin : g_cells
      localparam int unsigned LAST = ((s + 1) * SEG_LEN < N) ? (s + 1) * SEG_LEN - 1 : N - 1;
      assign so[s] = cto[LAST];
    end else begin : g_empty
      assign so[s] = si[s];
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_cell
    if (k % SEG_LEN == 0) begin : g_head
      assign cti[k] = si[k / SEG_LEN];
    end else begin : g_link
      assign cti[k] = cto[k-1];
    end
    wbr_cell u_cell (
      .clk         (clk),
      .rst_n       (rst_n),
      .shift_en    (shift_en),
      .capture_en  (capture_en),
      .transfer_en (transfer_en),
      .update_en   (update_en),
      .drive       (drive_all[k]),
      .transparent (transparent),
      .cti         (cti[k]),
      .cto         (cto[k]),
      .cfi         (cfi_all[k]),
      .cfo         (cfo_all[k])
    );
  end

endmodule
