// tb_workload_tsvtest: post-bond transition test of the top die with TSV
// test, in parallel access, for both reference designs:
//   FFT:  2,879 signal TSVs, 78,503 top-die scan flops, 55,656 patterns,
//         reference test time 1,002,271,254 cycles
//   Jpeg: 2,164 signal TSVs, 22,219 top-die scan flops, 5,200 patterns,
//         reference test time 32,136,977 cycles
// Each die has five scan chains; the top core model rounds the flop count up
// to a multiple of five. Two patterns are simulated per design, every bit
// checked, and the cycles per pattern scaled to the full pattern count.
module tb_workload_tsvtest;
  logic done_fft, done_jpeg;
  int   c_fft, f_fft, c_jpeg, f_jpeg;

  workload_harness #(.NC(5), .NUP(1440), .NDN(1439), .L(15701), .NPAT(2),
                     .REF_PATS(55656), .REF_CYCLES(1002271254)) u_fft (
    .done(done_fft), .checks(c_fft), .failures(f_fft));
  workload_harness #(.NC(5), .NUP(1082), .NDN(1082), .L(4444), .NPAT(2),
                     .REF_PATS(5200), .REF_CYCLES(32136977)) u_jpeg (
    .done(done_jpeg), .checks(c_jpeg), .failures(f_jpeg));

  initial begin
    repeat (200_000) @(posedge u_fft.tck);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_fft + c_jpeg, f_fft + f_jpeg + 1);
    $finish;
  end

  initial begin
    wait (done_fft === 1'b1 && done_jpeg === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", c_fft + c_jpeg, f_fft + f_jpeg);
    $finish;
  end
endmodule
