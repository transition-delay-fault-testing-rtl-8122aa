// wbr_cell: transition-capable wrapper boundary register cell.
//
// A plain IEEE 1500 boundary cell can hold only one value for the functional
// output, but a transition test needs two consecutive values. This cell has
// three flip-flops, each enabled by its own combination of wrapper controls:
//   SC (shift or capture):  shift  -> SC <= cti,  capture -> SC <= cfi
//   ST (shift or transfer): shift or transfer -> ST <= SC
//   U  (update):            update -> U <= ST
// The serial path is cti -> SC -> ST -> cto, so one scan load places the
// first vector bit in ST and the second in SC. Update applies the first,
// transfer moves the second into ST, and a second update launches the
// transition on cfo. A capture then stores the response in SC; ST keeps the
// leftover second bit and is scanned out as a don't-care.
//
// cfo carries U when `drive` is set (the cell controls its functional net)
// and cfi otherwise. `transparent` (TSVtest) forces cfo = cfi regardless of
// drive, while the flip-flops stay in the scan path.
//
// The three flip-flops and their enables follow the architecture. Clocking
// all three on the rising edge of one test clock, an active-low synchronous
// reset, and the cfo multiplexer priority are this design's choices.
module wbr_cell (
  input  logic clk,         // wrapper test clock
  input  logic rst_n,       // synchronous, active low
  input  logic shift_en,
  input  logic capture_en,
  input  logic transfer_en,
  input  logic update_en,
  input  logic drive,       // 1: cfo <= U
  input  logic transparent, // TSVtest: cfo <= cfi
  input  logic cti,         // serial test in
  output logic cto,         // serial test out (ST)
  input  logic cfi,         // functional in
  output logic cfo          // functional out
);

  logic sc_q, st_q, u_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sc_q <= 1'b0;
      st_q <= 1'b0;
      u_q  <= 1'b0;
    end else begin
      if (shift_en)                    sc_q <= cti;
      else if (capture_en)             sc_q <= cfi;
      if (shift_en || transfer_en)     st_q <= sc_q;
      if (update_en)                   u_q  <= st_q;
    end
  end

  assign cto = st_q;

  always_comb begin
    if (transparent)  cfo = cfi;
    else if (drive)   cfo = u_q;
    else              cfo = cfi;
  end

endmodule
