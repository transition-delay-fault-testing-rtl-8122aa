// stack3d_tdf_top: transition-delay-fault test infrastructure of a two-die
// 3D stack.
//
// The bottom die carries the IEEE 1149.1 TAP (tap_controller) on its package
// pins and a die_wrapper with an elevator; the top die carries a die_wrapper
// whose boundary cells face the bottom die. The signal TSVs between the dies
// are the nets up_tsv (bottom core -> top core) and dn_tsv (top core ->
// bottom core), each with a boundary cell on either side. The wrapper
// controls (including the transfer signal that the two-flop-per-cell scheme
// adds), the serial data and the parallel lanes also cross between the dies.
// The cores themselves, with their internal scan chains, are outside this
// module: their boundary and scan signals are ports (b_* bottom, t_* top).
//
// Typical instructions:
//   bottom die alone:   bottom post-bond intest serial turn
//   top die with TSVs:  bottom post-bond extest serial elevator,
//                       top    post-bond intest serial turn TSVtest
// In the second one the bottom die's outbound cells launch the transition
// onto the TSVs, the transparent top cells pass it into the top core, and the
// bottom die's inbound cells capture the top core's response, so the top
// die's patterns also test every signal TSV.
//
// Everything runs on tck; the test sequence timing is the TAP's (see
// tap_controller). Default sizes: five scan chains per die and 2879 signal
// TSVs, the larger of the two evaluated designs; the split of the TSVs into
// the two directions is this design's assumption.
module stack3d_tdf_top
  import tdf_pkg::*;
#(
  parameter int unsigned N_CHAINS = 5,
  parameter int unsigned N_TSV_UP = 1440, // bottom core -> top core
  parameter int unsigned N_TSV_DN = 1439  // top core -> bottom core
) (
  input  logic                tck,
  input  logic                trst_n,
  input  logic                tms,
  input  logic                tdi,
  output logic                tdo,
  input  logic [N_CHAINS-1:0] wpi,        // parallel test inputs (bottom die pins)
  output logic [N_CHAINS-1:0] wpo,
  output logic                delay_mode,
  // bottom die core
  output logic [N_TSV_DN-1:0] b_core_in,
  input  logic [N_TSV_UP-1:0] b_core_out,
  output logic [N_CHAINS-1:0] b_core_si,
  input  logic [N_CHAINS-1:0] b_core_so,
  output logic                b_core_se,
  output logic                b_core_ce,
  output wir_t                b_instr,
  // top die core
  output logic [N_TSV_UP-1:0] t_core_in,
  input  logic [N_TSV_DN-1:0] t_core_out,
  output logic [N_CHAINS-1:0] t_core_si,
  input  logic [N_CHAINS-1:0] t_core_so,
  output logic                t_core_se,
  output logic                t_core_ce,
  output wir_t                t_instr
);

  wsc_t                wsc;
  logic                wrstn, wsi, wso;
  logic                s_up, s_dn;          // serial data TSVs
  logic [N_CHAINS-1:0] p_up, p_dn;          // parallel lane TSVs
  logic [N_TSV_UP-1:0] up_tsv;              // signal TSVs
  logic [N_TSV_DN-1:0] dn_tsv;

  tap_controller u_tap (
    .tck        (tck),
    .trst_n     (trst_n),
    .tms        (tms),
    .tdi        (tdi),
    .tdo        (tdo),
    .wrstn      (wrstn),
    .wsi        (wsi),
    .wso        (wso),
    .wsc        (wsc),
    .delay_mode (delay_mode)
  );

  die_wrapper #(
    .N_CHAINS     (N_CHAINS),
    .N_IN         (N_TSV_DN),
    .N_OUT        (N_TSV_UP),
    .HAS_ELEVATOR (1'b1),
    .FACES_BELOW  (1'b0)
  ) u_bottom (
    .clk      (tck),
    .rst_n    (wrstn),
    .wsc      (wsc),
    .wsi      (wsi),
    .wso      (wso),
    .wpi      (wpi),
    .wpo      (wpo),
    .up_wsi   (s_up),
    .up_wso   (s_dn),
    .up_wpi   (p_up),
    .up_wpo   (p_dn),
    .tsv_in   (dn_tsv),
    .core_in  (b_core_in),
    .core_out (b_core_out),
    .tsv_out  (up_tsv),
    .core_si  (b_core_si),
    .core_so  (b_core_so),
    .core_se  (b_core_se),
    .core_ce  (b_core_ce),
    .instr    (b_instr)
  );

  logic                t_up_wsi;  // the top die has nothing above it
  logic [N_CHAINS-1:0] t_up_wpi;

  die_wrapper #(
    .N_CHAINS     (N_CHAINS),
    .N_IN         (N_TSV_UP),
    .N_OUT        (N_TSV_DN),
    .HAS_ELEVATOR (1'b0),
    .FACES_BELOW  (1'b1)
  ) u_top (
    .clk      (tck),
    .rst_n    (wrstn),
    .wsc      (wsc),
    .wsi      (s_up),
    .wso      (s_dn),
    .wpi      (p_up),
    .wpo      (p_dn),
    .up_wsi   (t_up_wsi),
    .up_wso   (1'b0),
    .up_wpi   (t_up_wpi),
    .up_wpo   ('0),
    .tsv_in   (up_tsv),
    .core_in  (t_core_in),
    .core_out (t_core_out),
    .tsv_out  (dn_tsv),
    .core_si  (t_core_si),
    .core_so  (t_core_so),
    .core_se  (t_core_se),
    .core_ce  (t_core_ce),
    .instr    (t_instr)
  );

endmodule
