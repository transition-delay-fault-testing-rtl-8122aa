// wir: wrapper instruction register of one die.
//
// A WIR_W-bit shift register in the serial path while select is set, with a
// parallel update stage that holds the active instruction (tdf_pkg::wir_t).
// shift_en & select shifts si in at the most significant end and presents the
// least significant bit on so; update_en & select copies the shift stage
// into the instruction. Both act on the rising clock edge. Reset loads
// WIR_RESET (post-bond, functional, serial, turn) into both stages.
//
// A per-die instruction register with serial load is the architecture's;
// the shift/update split, the field encoding and the reset value are this
// design's choices.
module wir
  import tdf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic select,     // SelectWIR
  input  logic shift_en,
  input  logic update_en,
  input  logic si,
  output logic so,
  output wir_t instr       // active instruction
);

  logic [WIR_W-1:0] shift_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shift_q <= WIR_RESET;
      instr   <= WIR_RESET;
    end else if (select) begin
      if (shift_en)  shift_q <= {si, shift_q[WIR_W-1:1]};
      if (update_en) instr   <= wir_t'(shift_q);
    end
  end

  assign so = shift_q[0];

endmodule
