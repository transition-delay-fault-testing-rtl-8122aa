// tb_wbr_chain: self-checking test of a small boundary register chain
// (3 inbound and 2 outbound cells, 10 serial bits). It scans a random
// two-pattern load in, checks the serial order (in cells first, SC before ST
// in each cell), applies update / transfer / update and checks the driving
// cells' outputs after each, captures random functional inputs, scans them
// out and compares them bit by bit with the expected chain contents. It also
// checks the drive_in / drive_out selection and transparency.
module tb_wbr_chain;
  localparam int NI = 3, NO = 2, N = NI + NO, T = 2 * N;
  logic clk = 1'b0, rst_n;
  logic shift_en, capture_en, transfer_en, update_en;
  logic drive_in, drive_out, transparent, si, so;
  logic [NI-1:0] in_cfi, in_cfo;
  logic [NO-1:0] out_cfi, out_cfo;
  int checks = 0, failures = 0;

  wbr_chain #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  // same chain cut into 2 segments (3 + 2 cells)
  logic [1:0] si2, so2;
  logic [NI-1:0] in_cfo2;
  logic [NO-1:0] out_cfo2;
  wbr_chain #(.N_IN(NI), .N_OUT(NO), .N_SEG(2)) dut2 (
    .clk, .rst_n, .shift_en, .capture_en, .transfer_en, .update_en,
    .drive_in, .drive_out, .transparent, .si(si2), .so(so2),
    .in_cfi, .in_cfo(in_cfo2), .out_cfi, .out_cfo(out_cfo2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // chain position p: cell p/2, SC if p even, ST if odd; p = 0 nearest si
  logic [T-1:0] load, outv;
  logic [N-1:0] v1, v2, resp;

  initial begin
    rst_n = 0; {shift_en, capture_en, transfer_en, update_en} = '0;
    drive_in = 0; drive_out = 0; transparent = 0; si = 0; si2 = '0;
    in_cfi = '0; out_cfi = '0;
    tick(); tick(); rst_n = 1;
    repeat (20) begin
      v1 = N'($urandom); v2 = N'($urandom);
      for (int c = 0; c < N; c++) begin
        load[2*c]   = v2[c];   // SC
        load[2*c+1] = v1[c];   // ST
      end
      // shift in: last position first
      shift_en = 1;
      for (int p = T - 1; p >= 0; p--) begin si = load[p]; tick(); end
      shift_en = 0;
      drive_in = 1; drive_out = 1;
      update_en = 1; tick(); update_en = 0;
      check({out_cfo, in_cfo}, v1, "first vector");
      transfer_en = 1; tick(); transfer_en = 0;
      check({out_cfo, in_cfo}, v1, "transfer holds outputs");
      update_en = 1; tick(); update_en = 0;
      check({out_cfo, in_cfo}, v2, "launched vector");
      // drive selection
      in_cfi = NI'($urandom); out_cfi = NO'($urandom);
      drive_in = 0; #1;
      check(in_cfo, in_cfi, "inbound cells pass when not driving");
      check(out_cfo, v2[N-1:NI], "outbound still driving");
      drive_in = 1; drive_out = 0; #1;
      check(out_cfo, out_cfi, "outbound cells pass when not driving");
      transparent = 1; drive_out = 1; #1;
      check({out_cfo, in_cfo}, {out_cfi, in_cfi}, "transparent");
      transparent = 0;
      resp = {out_cfi, in_cfi};
      capture_en = 1; tick(); capture_en = 0;
      // scan out, compare
      shift_en = 1;
      for (int p = T - 1; p >= 0; p--) begin
        outv[p] = so; si = 1'($urandom); tick();
      end
      shift_en = 0;
      for (int c = 0; c < N; c++) begin
        check(outv[2*c], resp[c], "captured SC");
        check(outv[2*c+1], v2[c], "ST keeps second vector");
      end
    end
    // segment lengths of the 2-segment chain: a single 1 through each segment
    begin
      int lat [2];
      si2 = '0; shift_en = 1;
      repeat (T) tick();
      lat = '{-1, -1};
      si2 = 2'b11; tick(); si2 = '0;
      for (int t = 1; t <= T; t++) begin
        for (int g = 0; g < 2; g++) if (so2[g] && lat[g] < 0) lat[g] = t;
        tick();
      end
      shift_en = 0;
      check(lat[0], 6, "segment 0 is 3 cells");
      check(lat[1], 4, "segment 1 is 2 cells");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
