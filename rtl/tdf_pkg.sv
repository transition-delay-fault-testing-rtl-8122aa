// tdf_pkg: types and constants shared by the transition-delay-fault test
// infrastructure of a two-die 3D stack.
//
// wir_t is the wrapper instruction held by each die. Its fields are the
// independent test modes of a die wrapper: serial or parallel access,
// pre-bond or post-bond, intest / extest / bypass (or functional), turn or
// elevator, and TSVtest. Packing the modes as separate fields, and their bit
// order, is this design's own encoding; the set of modes follows the
// architecture. wsc_t is the wrapper serial control bundle that the TAP
// controller drives into every die (all signals act on the rising edge of the
// test clock).
package tdf_pkg;

  // Test mode of a die's data path.
  typedef enum logic [1:0] {
    WM_FUNC   = 2'b00,  // functional: wrapper transparent, no test register selected
    WM_INTEST = 2'b01,  // WBR chain plus internal scan chains; inbound cells drive the core
    WM_EXTEST = 2'b10,  // WBR chain only; outbound cells drive the TSVs
    WM_BYPASS = 2'b11   // one-bit internal bypass register
  } wrap_mode_e;

  typedef struct packed {
    logic       tsvtest;   // cells facing the die below become transparent
    logic       elevator;  // bottom die returns data coming from the die above
    logic       parallel;  // parallel (one lane per scan chain) instead of serial access
    logic       postbond;  // die is stacked; pre-bond forces turn
    wrap_mode_e mode;
  } wir_t;

  localparam int unsigned WIR_W = $bits(wir_t);

  // Instruction after reset: post-bond, functional, serial, turn.
  localparam wir_t WIR_RESET = '{tsvtest: 1'b0, elevator: 1'b0, parallel: 1'b0,
                                 postbond: 1'b1, mode: WM_FUNC};

  // Wrapper serial control, one copy broadcast to all dies.
  typedef struct packed {
    logic select_wir;  // shift/update act on the WIR instead of a data register
    logic shift_wr;    // shift the selected register one bit
    logic capture_wr;  // capture responses into SC cells and the core flops
    logic transfer_wr; // copy SC into ST in every boundary cell
    logic update_wr;   // copy ST into the Update flip-flop (or WIR shift into WIR)
    logic launch_wr;   // broadside launch pulse for the internal scan flops
  } wsc_t;

  // TAP instruction register.
  localparam int unsigned IR_W = 4;
  typedef enum logic [IR_W-1:0] {
    IR_WIR    = 4'h1,  // access the wrapper instruction registers
    IR_WDR    = 4'h2,  // wrapper data registers, stuck-at timing
    IR_WDELAY = 4'h3,  // wrapper data registers, delay-test timing
    IR_BYPASS = 4'hF
  } tap_ir_e;

endpackage
