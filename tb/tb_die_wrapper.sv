// tb_die_wrapper: self-checking test of one die wrapper (2 scan chains of 3
// flops, 3 inbound and 2 outbound TSVs, elevator and TSVtest enabled) with a
// behavioural core and a 6-bit shift register standing in for the die above.
// The wrapper controls are driven directly. Covered: the WIR chain through
// the elevator, a stuck-at test and a transition test in serial intest
// (scan-out compared with a reference model of boundary cells and core), a
// transition test in extest (values on the TSVs after each update, TSV
// inputs captured, core clock gated off), bypass with elevator, pre-bond
// forcing turn, parallel intest lane lengths, TSVtest transparency and
// functional mode.
module tb_die_wrapper;
  import tdf_pkg::*;
  localparam int NC = 2, L = 3, NI = 3, NO = 2, NCELL = NI + NO;
  localparam int WBR_BITS = 2 * NCELL, NFF = NC * L;
  localparam int UP_LEN = 6;
  localparam logic [63:0] MASK = (64'd1 << (WBR_BITS + NFF)) - 1;

  logic clk = 1'b0, rst_n;
  wsc_t wsc;
  logic wsi, wso, up_wsi, up_wso;
  logic [NC-1:0] wpi, wpo, up_wpi, up_wpo, core_si, core_so;
  logic [NI-1:0] tsv_in, core_in;
  logic [NO-1:0] core_out, tsv_out;
  logic core_se, core_ce;
  wir_t instr;
  int checks = 0, failures = 0;

  die_wrapper #(.N_CHAINS(NC), .N_IN(NI), .N_OUT(NO),
                .HAS_ELEVATOR(1'b1), .FACES_BELOW(1'b1)) dut (.*);

  core_model #(.N_CHAINS(NC), .L(L), .N_IN(NI), .N_OUT(NO)) u_core (
    .clk(clk), .ce(core_ce), .se(core_se), .si(core_si), .so(core_so),
    .cin(core_in), .cout(core_out));

  // die above: serial shift register and one flop per parallel lane
  logic [UP_LEN-1:0] up_sr;
  logic [NC-1:0]     up_pq;
  always @(posedge clk) if (wsc.shift_wr) begin
    up_sr <= {up_sr[UP_LEN-2:0], up_wsi};
    up_pq <= up_wpi;
  end
  assign up_wso = up_sr[UP_LEN-1];
  assign up_wpo = up_pq;

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  // one control pulse
  task automatic pulse(input string what);
    wsc.shift_wr = 0; wsc.capture_wr = 0; wsc.transfer_wr = 0;
    wsc.update_wr = 0; wsc.launch_wr = 0;
    case (what)
      "capture":  wsc.capture_wr = 1;
      "transfer": wsc.transfer_wr = 1;
      "update":   wsc.update_wr = 1;
      "launch":   begin wsc.update_wr = 1; wsc.launch_wr = 1; end
      default: ;
    endcase
    tick();
    wsc.capture_wr = 0; wsc.transfer_wr = 0; wsc.update_wr = 0; wsc.launch_wr = 0;
  endtask

  // shift n bits serially: vin[n-1] first; vout[n-1] is the first bit out
  task automatic shift(input int n, input logic [63:0] vin, output logic [63:0] vout);
    vout = '0;
    wsc.shift_wr = 1;
    for (int p = n - 1; p >= 0; p--) begin
      wsi = vin[p]; #1; vout[p] = wso; tick();
    end
    wsc.shift_wr = 0;
  endtask

  task automatic load_wir(input wir_t w);
    logic [63:0] o, v;
    // the WIR shifts in at its msb: the bit shifted last lands in the msb
    v = '0;
    for (int j = 0; j < WIR_W; j++) v[j] = w[WIR_W-1-j];
    wsc.select_wir = 1;
    if (instr.postbond) shift(WIR_W + UP_LEN, v, o);  // die above follows
    else                shift(WIR_W, v, o);
    wsc.select_wir = 0;
    pulse("none");
    wsc.select_wir = 1; pulse("update"); wsc.select_wir = 0;
    check(instr, w, "instruction loaded");
  endtask

  // drive random serial bits and check that wso repeats wsi d cycles later
  task automatic delay_check(input int d, input string what);
    logic [127:0] hist;
    wsc.shift_wr = 1;
    for (int t = 0; t < 64; t++) begin
      wsi = 1'($urandom); hist[t] = wsi; #1;
      if (t >= d) check(wso, hist[t-d], what);
      tick();
    end
    wsc.shift_wr = 0;
  endtask

  // reference functions of the core
  function automatic logic [NFF-1:0] f_next(input logic [NFF-1:0] s, input logic [NI-1:0] cin);
    for (int i = 0; i < NFF; i++) f_next[i] = s[(i+1) % NFF] ^ cin[i % NI];
  endfunction
  function automatic logic [NO-1:0] g_out(input logic [NFF-1:0] s);
    for (int o = 0; o < NO; o++) g_out[o] = s[o % NFF] ^ s[(o+1) % NFF];
  endfunction

  // serial intest chain position p: 0..WBR_BITS-1 boundary, then core flops
  logic [63:0] vin, vout, expv;
  logic [NCELL-1:0] v1, v2;
  logic [NFF-1:0] s0, s1, s2;
  logic [NI-1:0] tin;
  wir_t w;

  task automatic build_load();
    vin = 64'({$urandom, $urandom});
    for (int c = 0; c < NCELL; c++) begin
      v2[c] = vin[2*c]; v1[c] = vin[2*c+1];
    end
    s0 = vin[WBR_BITS +: NFF];
  endtask

  initial begin
    wsc = '0; wsi = 0; wpi = '0; tsv_in = '0; rst_n = 0; up_sr = '0; up_pq = '0;
    tick(); tick(); rst_n = 1; tick();
    check(instr, WIR_RESET, "reset instruction");

    // functional mode: wrapper transparent, core clock on
    tsv_in = NI'($urandom); #1;
    check(core_in, tsv_in, "functional: TSV to core");
    check(tsv_out, core_out, "functional: core to TSV");
    check(core_ce, 1'b1, "functional: core clock on");

    // ---- serial intest, turn: stuck-at and transition tests
    w = '{tsvtest:0, elevator:0, parallel:0, postbond:1, mode:WM_INTEST};
    load_wir(w);
    repeat (10) begin
      // stuck-at: shift, update, capture
      build_load();
      shift(WBR_BITS + NFF, vin, vout);
      pulse("update");
      check(core_in, v1[NI-1:0], "intest: inbound cells drive core");
      check(core_ce, 1'b0, "intest idle: core clock gated");
      tin = NI'($urandom); tsv_in = tin;
      pulse("capture");
      expv = vin;
      for (int c = 0; c < NI; c++) expv[2*c] = tin[c];
      for (int c = 0; c < NO; c++) expv[2*(NI+c)] = g_out(s0)[c];
      expv[WBR_BITS +: NFF] = f_next(s0, v1[NI-1:0]);
      build_load();
      shift(WBR_BITS + NFF, vin, vout);
      check(vout & MASK, expv & MASK, "stuck-at scan-out");
      // transition: update v1, transfer, launch v2, capture
      pulse("update");
      pulse("transfer");
      check(core_in, v1[NI-1:0], "transfer does not disturb core inputs");
      pulse("launch");
      check(core_in, v2[NI-1:0], "launch applies second vector");
      s1 = f_next(s0, v1[NI-1:0]);
      tin = NI'($urandom); tsv_in = tin;
      pulse("capture");
      s2 = f_next(s1, v2[NI-1:0]);
      for (int c = 0; c < NCELL; c++) begin
        expv[2*c+1] = v2[c];                               // ST keeps v2
        expv[2*c]   = (c < NI) ? tin[c] : g_out(s1)[c-NI]; // SC captured
      end
      expv[WBR_BITS +: NFF] = s2;
      build_load();
      shift(WBR_BITS + NFF, vin, vout);
      check(vout & MASK, expv & MASK, "transition scan-out");
    end

    // ---- TSVtest: cells transparent
    w.tsvtest = 1; load_wir(w);
    tsv_in = NI'($urandom); #1;
    check(core_in, tsv_in, "TSVtest: TSV drives core directly");
    check(tsv_out, core_out, "TSVtest: core drives TSV directly");

    // ---- serial extest, turn: outbound cells launch onto the TSVs
    w = '{tsvtest:0, elevator:0, parallel:0, postbond:1, mode:WM_EXTEST};
    load_wir(w);
    s0 = u_core.ff;
    repeat (10) begin
      vin = 64'($urandom);
      for (int c = 0; c < NCELL; c++) begin v2[c] = vin[2*c]; v1[c] = vin[2*c+1]; end
      shift(WBR_BITS, vin, vout);
      pulse("update");
      check(tsv_out, v1[NCELL-1:NI], "extest: first vector on TSVs");
      pulse("transfer");
      pulse("launch");
      check(tsv_out, v2[NCELL-1:NI], "extest: launched vector on TSVs");
      tin = NI'($urandom); tsv_in = tin;
      pulse("capture");
      shift(WBR_BITS, 64'(0), vout);
      for (int c = 0; c < NI; c++) check(vout[2*c], tin[c], "extest: TSV input captured");
      check(u_core.ff, s0, "extest: core flops untouched");
    end

    // ---- bypass with elevator: 1 bypass bit plus the die above
    w = '{tsvtest:0, elevator:1, parallel:0, postbond:1, mode:WM_BYPASS};
    load_wir(w);
    delay_check(1 + UP_LEN, "bypass + elevator path length");
    // pre-bond forces turn: only the bypass bit
    w.postbond = 0; load_wir(w);
    delay_check(1, "pre-bond bypass turns");
    check(up_wsi, wso, "die above sees the bypass output");

    // ---- parallel intest: lane 0 = WBR + chain 0, lane 1 = chain 1
    w = '{tsvtest:0, elevator:0, parallel:1, postbond:1, mode:WM_INTEST};
    load_wir(w);
    begin
      int lat0, lat1;
      lat0 = -1; lat1 = -1;
      wpi = '0; wsc.shift_wr = 1;
      repeat (WBR_BITS + NFF + 2) tick();
      wpi = 2'b11;
      for (int t = 1; t <= WBR_BITS + NFF; t++) begin
        tick();
        if (wpo[0] && lat0 < 0) lat0 = t;
        if (wpo[1] && lat1 < 0) lat1 = t;
      end
      wsc.shift_wr = 0;
      // 5 cells cut into segments of 3 and 2 cells
      check(lat0, 6 + L, "parallel lane 0: WBR segment 0 + chain 0");
      check(lat1, 4 + L, "parallel lane 1: WBR segment 1 + chain 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
