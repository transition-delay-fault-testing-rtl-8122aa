// tb_stack3d_tdf_top: end-to-end test of the two-die stack at its default
// sizes (5 scan chains per die, 1440 + 1439 signal TSVs), driven only through
// the TAP pins and the parallel test pins. Each die's logic is a behavioural
// core_model with 5 chains of 4 flops. A reference model of every boundary
// cell and core flop predicts each scan-out.
//   1  WIR chain through the elevator loads both dies' instructions.
//   2  Bottom die alone (post-bond intest serial turn, top die bypass):
//      transition patterns, every scanned-out bit compared.
//   3  Same die, stuck-at timing.
//   4  Top die with TSV test (bottom: post-bond extest serial elevator,
//      top: post-bond intest serial turn TSVtest): the bottom die launches
//      onto the TSVs, the top core responds, the bottom die captures.
//   5  Top die through its own cells (bottom bypass elevator, top intest).
//   6  Parallel intest of the bottom die, then parallel through the
//      elevator to the top die: lane lengths measured on the pins (each
//      lane carries an equal share of the boundary cells).
//   7  TAP bypass.
// Also: a pre-bond bottom die turns even with the elevator requested, and
// each transition pattern takes exactly chain length + 7 tck cycles from
// Run-Test/Idle to the end of its scan-out.
// Every mechanism (WIR load, intest, extest, bypass, elevator, turn,
// TSVtest, transfer, launch, delay capture, stuck-at capture, parallel, TAP
// bypass) is counted; one that never happens is a failure.
module tb_stack3d_tdf_top;
  import tdf_pkg::*;
  localparam int NC = 5, NUP = 1440, NDN = 1439, L = 4, NFF = NC * L;
  localparam int NCELL = NUP + NDN, WB = 2 * NCELL;
  localparam int MAXT = 2 * WB + 2 * NFF + 64;

  logic tck = 1'b0, trst_n, tms, tdi, tdo, delay_mode;
  logic [NC-1:0]  wpi, wpo;
  logic [NDN-1:0] b_core_in;  logic [NUP-1:0] b_core_out;
  logic [NUP-1:0] t_core_in;  logic [NDN-1:0] t_core_out;
  logic [NC-1:0]  b_core_si, b_core_so, t_core_si, t_core_so;
  logic b_core_se, b_core_ce, t_core_se, t_core_ce;
  wir_t b_instr, t_instr;
  int checks = 0, failures = 0;

  stack3d_tdf_top dut (.*);

  core_model #(.N_CHAINS(NC), .L(L), .N_IN(NDN), .N_OUT(NUP)) u_bcore (
    .clk(tck), .ce(b_core_ce), .se(b_core_se), .si(b_core_si), .so(b_core_so),
    .cin(b_core_in), .cout(b_core_out));
  core_model #(.N_CHAINS(NC), .L(L), .N_IN(NUP), .N_OUT(NDN)) u_tcore (
    .clk(tck), .ce(t_core_ce), .se(t_core_se), .si(t_core_si), .so(t_core_so),
    .cin(t_core_in), .cout(t_core_out));

  always #5 tck = ~tck;

  initial begin
    repeat (2_000_000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- cycle counter
  longint cyc;
  always @(posedge tck) cyc++;

  // ---------------- mechanism counters
  int n_wir, n_intest, n_extest, n_bypass, n_elev, n_turn, n_tsvtest;
  int n_transfer, n_launch, n_dcapture, n_scapture, n_parallel, n_tapbyp, n_prebond;
  always @(posedge tck) if (trst_n) begin
    if (dut.wsc.select_wir && dut.wsc.update_wr) n_wir++;
    if (dut.wsc.transfer_wr) n_transfer++;
    if (dut.wsc.launch_wr)   n_launch++;
    if (dut.wsc.capture_wr && delay_mode) n_dcapture++;
    if (dut.wsc.capture_wr && !delay_mode && !dut.wsc.select_wir) n_scapture++;
    if (dut.wsc.capture_wr && (b_instr.mode == WM_INTEST || t_instr.mode == WM_INTEST)) n_intest++;
    if (dut.wsc.capture_wr && b_instr.mode == WM_EXTEST) n_extest++;
    if (dut.wsc.shift_wr && !dut.wsc.select_wir &&
        (b_instr.mode == WM_BYPASS || t_instr.mode == WM_BYPASS)) n_bypass++;
    if (dut.wsc.shift_wr && !dut.wsc.select_wir && b_instr.elevator) n_elev++;
    if (dut.wsc.shift_wr && !dut.wsc.select_wir && !b_instr.elevator) n_turn++;
    if (dut.wsc.capture_wr && t_instr.tsvtest) n_tsvtest++;
    if (dut.wsc.shift_wr && b_instr.parallel) n_parallel++;
    if (dut.wsc.shift_wr && !dut.wsc.select_wir && !b_instr.postbond && b_instr.elevator) n_prebond++;
    if (dut.u_tap.state == dut.u_tap.SH_DR && dut.u_tap.ir == IR_BYPASS) n_tapbyp++;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask
  task automatic checkv(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // ---------------- TAP driving
  task automatic clk_tms(input logic t);
    tms = t; @(posedge tck); #1;
  endtask

  task automatic load_ir(input logic [IR_W-1:0] code);
    clk_tms(1); clk_tms(1); clk_tms(0); clk_tms(0);
    for (int b = 0; b < IR_W; b++) begin tdi = code[b]; clk_tms(b == IR_W - 1); end
    clk_tms(1); clk_tms(0);
  endtask

  // chain position p = 0 is nearest tdi
  logic vin [MAXT], vout [MAXT];

  // From Run-Test/Idle, enter Shift-DR and shift t bits, ending in Exit1-DR.
  task automatic scan(input int t);
    clk_tms(1); clk_tms(0); clk_tms(0);
    for (int p = t - 1; p >= 0; p--) begin
      tdi = vin[p]; #1; vout[p] = tdo; clk_tms(p == 0);
    end
  endtask

  // finish a stuck-at pattern: Exit1 -> Update-DR (update) -> RTI
  task automatic finish_stuck();
    clk_tms(1); clk_tms(0);
  endtask
  // finish a delay pattern: Exit1 (update) -> Pause (transfer) ->
  // Exit2 (update, launch) -> Update-DR (capture) -> RTI
  task automatic finish_delay();
    clk_tms(0); clk_tms(1); clk_tms(1); clk_tms(0);
  endtask

  logic prev_post;
  task automatic load_wirs(input wir_t wb, input wir_t wt);
    load_ir(IR_WIR);
    for (int q = 0; q < WIR_W; q++) begin
      vin[q] = wb[WIR_W-1-q];
      vin[WIR_W+q] = wt[WIR_W-1-q];
    end
    prev_post = b_instr.postbond;
    scan(prev_post ? 2 * WIR_W : WIR_W);
    finish_stuck();
    checkv(b_instr, wb, "bottom instruction");
    if (prev_post) checkv(t_instr, wt, "top instruction");
  endtask

  // ---------------- reference functions of the cores
  function automatic logic [NFF-1:0] fb(input logic [NFF-1:0] s, input logic [NDN-1:0] cin);
    for (int i = 0; i < NFF; i++) fb[i] = s[(i+1) % NFF] ^ cin[i % NDN];
  endfunction
  function automatic logic [NUP-1:0] gb(input logic [NFF-1:0] s);
    for (int o = 0; o < NUP; o++) gb[o] = s[o % NFF] ^ s[(o+1) % NFF];
  endfunction
  function automatic logic [NFF-1:0] ft(input logic [NFF-1:0] s, input logic [NUP-1:0] cin);
    for (int i = 0; i < NFF; i++) ft[i] = s[(i+1) % NFF] ^ cin[i % NUP];
  endfunction
  function automatic logic [NDN-1:0] gt(input logic [NFF-1:0] s);
    for (int o = 0; o < NDN; o++) gt[o] = s[o % NFF] ^ s[(o+1) % NFF];
  endfunction

  logic exp_bits [MAXT];
  int   tlen;

  task automatic random_load(input int t);
    for (int p = 0; p < t; p++) vin[p] = 1'($urandom);
  endtask
  task automatic compare(input int t, input string what);
    for (int p = 0; p < t; p++) check(vout[p], exp_bits[p], what);
  endtask

  // boundary cell c of a die whose cells start at chain position base
  function automatic logic sc_of(input int base, input int c); return vin[base + 2*c];   endfunction
  function automatic logic st_of(input int base, input int c); return vin[base + 2*c+1]; endfunction
  function automatic logic [NFF-1:0] core_of(input int base);
    for (int i = 0; i < NFF; i++) core_of[i] = vin[base + i];
  endfunction

  // ---- scenario 2/3: bottom die intest serial turn
  // chain: bottom inbound cells (NDN), outbound cells (NUP), bottom core
  task automatic bottom_intest(input bit delay, input int npat);
    logic [NDN-1:0] v1i, v2i;
    logic [NFF-1:0] s0, s1, s2;
    logic [NUP-1:0] out_resp;
    logic [NDN-1:0] in_resp;
    tlen = WB + NFF;
    load_ir(delay ? IR_WDELAY : IR_WDR);
    random_load(tlen);
    scan(tlen);
    for (int k = 0; k <= npat; k++) begin
      for (int c = 0; c < NDN; c++) begin v1i[c] = st_of(0, c); v2i[c] = sc_of(0, c); end
      s0 = core_of(WB);
      if (delay) begin
        finish_delay();
        // launch used v1 on the core inputs, capture saw v2
        s1 = fb(s0, v1i);
        s2 = fb(s1, v2i);
        in_resp  = dut.dn_tsv;        // top die drives through its own WBR (bypass: functional cfo)
        out_resp = gb(s1);
        for (int c = 0; c < NCELL; c++) begin
          exp_bits[2*c+1] = sc_of(0, c);
          exp_bits[2*c]   = (c < NDN) ? in_resp[c] : out_resp[c-NDN];
        end
        for (int i = 0; i < NFF; i++) exp_bits[WB+i] = s2[i];
      end else begin
        finish_stuck();   // update: U <= ST
        // next scan's Capture-DR captures with the core seeing v1 (ST)
        s1 = fb(s0, v1i);
        in_resp  = dut.dn_tsv;
        out_resp = gb(s0);
        for (int c = 0; c < NCELL; c++) begin
          exp_bits[2*c+1] = st_of(0, c);
          exp_bits[2*c]   = (c < NDN) ? in_resp[c] : out_resp[c-NDN];
        end
        for (int i = 0; i < NFF; i++) exp_bits[WB+i] = s1[i];
      end
      if (k < npat) random_load(tlen);
      scan(tlen);
      compare(tlen, delay ? "bottom intest transition scan-out" : "bottom intest stuck-at scan-out");
    end
    finish_stuck();
  endtask

  // ---- scenario 4: TSV test, chain bottom WBR, top WBR, top core
  task automatic tsv_test(input int npat);
    logic [NUP-1:0] v1o, v2o;
    logic [NFF-1:0] s0, s1, s2, sb;
    logic [NDN-1:0] dn_resp;
    logic [NUP-1:0] bout;
    longint c0;
    tlen = 2 * WB + NFF;
    load_ir(IR_WDELAY);
    random_load(tlen);
    scan(tlen);
    for (int k = 0; k <= npat; k++) begin
      for (int c = 0; c < NUP; c++) begin
        v1o[c] = st_of(0, NDN + c);
        v2o[c] = sc_of(0, NDN + c);
      end
      s0 = core_of(2 * WB);
      sb = u_bcore.ff;
      c0 = cyc;
      finish_delay();
      checkv(t_core_in[63:0], v2o[63:0], "TSV carries launched vector into top core");
      s1 = ft(s0, v1o);
      s2 = ft(s1, v2o);
      dn_resp = gt(s1);
      bout = gb(sb);
      // bottom cells: inbound capture top core response over the TSVs
      for (int c = 0; c < NCELL; c++) begin
        exp_bits[2*c+1] = sc_of(0, c);
        exp_bits[2*c]   = (c < NDN) ? dn_resp[c] : bout[c-NDN];
      end
      // top cells: inbound capture the TSVs, outbound the core outputs
      for (int c = 0; c < NCELL; c++) begin
        exp_bits[WB+2*c+1] = sc_of(WB, c);
        exp_bits[WB+2*c]   = (c < NUP) ? v2o[c] : dn_resp[c-NUP];
      end
      for (int i = 0; i < NFF; i++) exp_bits[2*WB+i] = s2[i];
      if (k < npat) random_load(tlen);
      scan(tlen);
      checkv(64'(cyc - c0), 64'(tlen + 7), "TSV test: tck cycles per pattern = chain + 7");
      compare(tlen, "TSV test scan-out");
      checkv(u_bcore.ff, sb, "bottom core clock gated in extest");
    end
    finish_stuck();
  endtask

  // ---- scenario 5: top die through its own cells, bottom bypass + elevator
  // chain: bottom bypass bit, top WBR, top core
  task automatic top_own(input int npat);
    logic [NUP-1:0] v1i, v2i;
    logic [NFF-1:0] s0, s1, s2;
    logic [NDN-1:0] o_resp;
    logic [NUP-1:0] tsvv;
    longint c0;
    tlen = 1 + WB + NFF;
    load_ir(IR_WDELAY);
    random_load(tlen);
    scan(tlen);
    for (int k = 0; k <= npat; k++) begin
      for (int c = 0; c < NUP; c++) begin v1i[c] = st_of(1, c); v2i[c] = sc_of(1, c); end
      s0 = core_of(1 + WB);
      tsvv = dut.up_tsv;
      c0 = cyc;
      finish_delay();
      checkv(t_core_in[63:0], v2i[63:0], "top cells drive launched vector");
      s1 = ft(s0, v1i);
      s2 = ft(s1, v2i);
      o_resp = gt(s1);
      exp_bits[0] = vin[0];
      for (int c = 0; c < NCELL; c++) begin
        exp_bits[1+2*c+1] = sc_of(1, c);
        exp_bits[1+2*c]   = (c < NUP) ? tsvv[c] : o_resp[c-NUP];
      end
      for (int i = 0; i < NFF; i++) exp_bits[1+WB+i] = s2[i];
      if (k < npat) random_load(tlen);
      scan(tlen);
      checkv(64'(cyc - c0), 64'(tlen + 7), "own-cell test: tck cycles per pattern = chain + 7");
      compare(tlen - 1, "top die own-WBR scan-out");
    end
    finish_stuck();
  endtask

  // ---- scenario 6: parallel lanes, latency measured on wpo
  // boundary bits on lane k: the cells are cut into segments of
  // ceil(NCELL/NC) cells, the last segment takes the rest
  function automatic int seg_bits(input int k);
    int sl, first, last;
    sl = (NCELL + NC - 1) / NC;
    first = k * sl;
    last = (first + sl < NCELL) ? first + sl : NCELL;
    return (last > first) ? 2 * (last - first) : 0;
  endfunction

  task automatic lane_latency(input int extra, input string what);
    int lat [NC];
    int maxl;
    maxl = extra + seg_bits(0);
    load_ir(IR_WDR);
    clk_tms(1); clk_tms(0); clk_tms(0);              // Shift-DR
    wpi = '0;
    repeat (maxl + 4) clk_tms(0);
    foreach (lat[k]) lat[k] = -1;
    wpi = '1;
    for (int t = 1; t <= maxl + 4; t++) begin
      clk_tms(0);
      for (int k = 0; k < NC; k++) if (wpo[k] && lat[k] < 0) lat[k] = t;
    end
    clk_tms(1); clk_tms(1); clk_tms(0);
    for (int k = 0; k < NC; k++)
      checkv(64'(lat[k]), 64'(seg_bits(k) + extra), what);
    wpi = '0;
  endtask

  wir_t wb, wt;
  initial begin
    trst_n = 0; tms = 1; tdi = 0; wpi = '0;
    #12 trst_n = 1;
    repeat (5) clk_tms(1);
    clk_tms(0);
    checkv(b_instr, WIR_RESET, "bottom reset instruction");

    // 2: bottom die, post-bond intest serial turn; top die bypass (clock gated)
    wb = '{tsvtest:0, elevator:0, parallel:0, postbond:1, mode:WM_INTEST};
    wt = '{tsvtest:0, elevator:0, parallel:0, postbond:1, mode:WM_BYPASS};
    load_wirs(wb, wt);
    check(t_core_ce, 1'b0, "top core clock gated while bottom die is tested");
    bottom_intest(1, 3);
    // 3: stuck-at timing
    bottom_intest(0, 2);

    // 4: top die with TSV test
    wb = '{tsvtest:0, elevator:1, parallel:0, postbond:1, mode:WM_EXTEST};
    wt = '{tsvtest:1, elevator:0, parallel:0, postbond:1, mode:WM_INTEST};
    load_wirs(wb, wt);
    tsv_test(3);

    // 5: top die through its own cells
    wb = '{tsvtest:0, elevator:1, parallel:0, postbond:1, mode:WM_BYPASS};
    wt = '{tsvtest:0, elevator:0, parallel:0, postbond:1, mode:WM_INTEST};
    load_wirs(wb, wt);
    top_own(2);

    // 5b: pre-bond bottom die: elevator requested but the die turns
    wb = '{tsvtest:0, elevator:1, parallel:0, postbond:0, mode:WM_BYPASS};
    load_wirs(wb, wt);
    load_ir(IR_WDR);
    for (int p = 0; p < 16; p++) vin[p] = 1'($urandom);
    scan(16);
    for (int p = 0; p < 15; p++) check(vout[p], vin[p+1], "pre-bond: bypass turns (one-bit path)");
    finish_stuck();
    // back to post-bond (WIR chain is the bottom WIR alone while pre-bond)
    wb = '{tsvtest:0, elevator:0, parallel:0, postbond:1, mode:WM_BYPASS};
    load_wirs(wb, wt);

    // 6: parallel
    wb = '{tsvtest:0, elevator:0, parallel:1, postbond:1, mode:WM_INTEST};
    wt = '{tsvtest:0, elevator:0, parallel:1, postbond:1, mode:WM_BYPASS};
    load_wirs(wb, wt);
    lane_latency(L, "parallel bottom intest: WBR segment + chain per lane");
    wb = '{tsvtest:0, elevator:1, parallel:1, postbond:1, mode:WM_BYPASS};
    wt = '{tsvtest:0, elevator:0, parallel:1, postbond:1, mode:WM_INTEST};
    load_wirs(wb, wt);
    lane_latency(1 + L, "parallel elevator: bypass + top WBR segment + chain");

    // 7: TAP bypass
    load_ir(IR_BYPASS);
    for (int p = 0; p < 16; p++) vin[p] = 1'($urandom);
    scan(16);
    for (int p = 0; p < 15; p++) check(vout[p], vin[p+1], "TAP bypass one-bit delay");
    finish_stuck();

    // mechanisms
    begin
      int n [14];
      string nm [14];
      n = '{n_wir, n_intest, n_extest, n_bypass, n_elev, n_turn, n_tsvtest,
            n_transfer, n_launch, n_dcapture, n_scapture, n_parallel, n_tapbyp, n_prebond};
      nm = '{"WIR load", "intest", "extest", "bypass", "elevator", "turn", "TSVtest",
             "transfer", "launch", "delay capture", "stuck-at capture", "parallel", "TAP bypass",
             "pre-bond turn"};
      for (int i = 0; i < 14; i++) begin
        $display("mechanism %-16s %0d", nm[i], n[i]);
        checks++;
        if (n[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
