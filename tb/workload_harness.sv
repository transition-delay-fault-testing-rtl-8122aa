// workload_harness: runs parallel-access transition patterns with TSV test
// on a stack sized like one of the reference designs (testbench only).
// The bottom die is in post-bond extest parallel elevator, the top die in
// post-bond intest parallel turn TSVtest; the top core model has the design's
// scan flop count spread over N_CHAINS chains. For each pattern the harness
// loads every lane through wpi while unloading the previous response on wpo,
// compares every returned bit with a reference model, and checks that a
// pattern costs (longest lane + 7) tck cycles. The total for the design's
// pattern count is compared with a reference test time (within 0.5 %).
module workload_harness
  import tdf_pkg::*;
#(
  parameter int     NC         = 5,
  parameter int     NUP        = 1440,
  parameter int     NDN        = 1439,
  parameter int     L          = 4,          // top core flops per chain
  parameter int     NPAT       = 2,
  parameter longint REF_PATS   = 1,          // patterns of the reference test
  parameter longint REF_CYCLES = 1           // reference test time in cycles
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int NCELL = NUP + NDN, NFF = NC * L, LB = 4, NFB = NC * LB;
  localparam int SL = (NCELL + NC - 1) / NC;

  logic tck = 1'b0, trst_n, tms, tdi, tdo, delay_mode;
  logic [NC-1:0]  wpi, wpo;
  logic [NDN-1:0] b_core_in;  logic [NUP-1:0] b_core_out;
  logic [NUP-1:0] t_core_in;  logic [NDN-1:0] t_core_out;
  logic [NC-1:0]  b_core_si, b_core_so, t_core_si, t_core_so;
  logic b_core_se, b_core_ce, t_core_se, t_core_ce;
  wir_t b_instr, t_instr;

  stack3d_tdf_top #(.N_CHAINS(NC), .N_TSV_UP(NUP), .N_TSV_DN(NDN)) dut (.*);

  core_model #(.N_CHAINS(NC), .L(LB), .N_IN(NDN), .N_OUT(NUP)) u_bcore (
    .clk(tck), .ce(b_core_ce), .se(b_core_se), .si(b_core_si), .so(b_core_so),
    .cin(b_core_in), .cout(b_core_out));
  core_model #(.N_CHAINS(NC), .L(L), .N_IN(NUP), .N_OUT(NDN)) u_tcore (
    .clk(tck), .ce(t_core_ce), .se(t_core_se), .si(t_core_si), .so(t_core_so),
    .cin(t_core_in), .cout(t_core_out));

  always #5 tck = ~tck;
  longint cyc;
  always @(posedge tck) cyc++;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic clk_tms(input logic t);
    tms = t; @(posedge tck); #1;
  endtask
  task automatic load_ir(input logic [IR_W-1:0] code);
    clk_tms(1); clk_tms(1); clk_tms(0); clk_tms(0);
    for (int b = 0; b < IR_W; b++) begin tdi = code[b]; clk_tms(b == IR_W - 1); end
    clk_tms(1); clk_tms(0);
  endtask
  task automatic load_wirs(input wir_t wb, input wir_t wt);
    logic [2*WIR_W-1:0] v;
    load_ir(IR_WIR);
    for (int q = 0; q < WIR_W; q++) begin v[q] = wb[WIR_W-1-q]; v[WIR_W+q] = wt[WIR_W-1-q]; end
    clk_tms(1); clk_tms(0); clk_tms(0);
    for (int p = 2 * WIR_W - 1; p >= 0; p--) begin tdi = v[p]; clk_tms(p == 0); end
    clk_tms(1); clk_tms(0);
    check(64'(b_instr), 64'(wb), "bottom instruction");
    check(64'(t_instr), 64'(wt), "top instruction");
  endtask

  // cells of lane k: k*SL .. min((k+1)*SL, NCELL)-1 on both dies
  function automatic int first_cell(input int k); return k * SL; endfunction
  function automatic int n_cells(input int k);
    int f, l;
    f = k * SL; l = (f + SL < NCELL) ? f + SL : NCELL;
    return (l > f) ? l - f : 0;
  endfunction
  function automatic int lane_len(input int k); return 4 * n_cells(k) + L; endfunction

  // chain contents: boundary SC/ST of both dies and the top core flops
  logic [NCELL-1:0] bsc, bst, tsc, tst, ebsc, ebst, etsc, etst;
  logic [NFF-1:0]   tff, etff;

  // lane k position p (0 nearest wpi)
  function automatic logic get_bit(input int k, input int p);
    int nc, c;
    nc = n_cells(k);
    if (p < 2 * nc) begin
      c = first_cell(k) + p / 2;
      return (p % 2 == 0) ? bsc[c] : bst[c];
    end
    p -= 2 * nc;
    if (p < 2 * nc) begin
      c = first_cell(k) + p / 2;
      return (p % 2 == 0) ? tsc[c] : tst[c];
    end
    p -= 2 * nc;
    return tff[k * L + p];
  endfunction
  function automatic logic get_exp(input int k, input int p);
    int nc, c;
    nc = n_cells(k);
    if (p < 2 * nc) begin
      c = first_cell(k) + p / 2;
      return (p % 2 == 0) ? ebsc[c] : ebst[c];
    end
    p -= 2 * nc;
    if (p < 2 * nc) begin
      c = first_cell(k) + p / 2;
      return (p % 2 == 0) ? etsc[c] : etst[c];
    end
    p -= 2 * nc;
    return etff[k * L + p];
  endfunction

  int lmax;
  // From Run-Test/Idle: Shift-DR for lmax cycles on all lanes, ending in
  // Exit1-DR. Loads the current contents, compares the output with the
  // expected contents when cmp is set.
  task automatic scan_lanes(input bit cmp);
    clk_tms(1); clk_tms(0); clk_tms(0);
    for (int t = 0; t < lmax; t++) begin
      for (int k = 0; k < NC; k++) begin
        int lk, p;
        lk = lane_len(k);
        p = lmax - 1 - t;                 // position this bit will reach
        wpi[k] = (p < lk) ? get_bit(k, p) : 1'b0;
      end
      #1;
      if (cmp)
        for (int k = 0; k < NC; k++)
          if (t < lane_len(k)) check(64'(wpo[k]), 64'(get_exp(k, lane_len(k) - 1 - t)), "lane scan-out");
      clk_tms(t == lmax - 1);
    end
  endtask

  function automatic logic [NFF-1:0] ft(input logic [NFF-1:0] s, input logic [NUP-1:0] cin);
    for (int i = 0; i < NFF; i++) ft[i] = s[(i+1) % NFF] ^ cin[i % NUP];
  endfunction
  function automatic logic [NDN-1:0] gt(input logic [NFF-1:0] s);
    for (int o = 0; o < NDN; o++) gt[o] = s[o % NFF] ^ s[(o+1) % NFF];
  endfunction
  function automatic logic [NUP-1:0] gb(input logic [NFB-1:0] s);
    for (int o = 0; o < NUP; o++) gb[o] = s[o % NFB] ^ s[(o+1) % NFB];
  endfunction

  task automatic randomize_load();
    for (int c = 0; c < NCELL; c++) begin
      bsc[c] = 1'($urandom); bst[c] = 1'($urandom);
      tsc[c] = 1'($urandom); tst[c] = 1'($urandom);
    end
    for (int i = 0; i < NFF; i++) tff[i] = 1'($urandom);
  endtask

  initial begin
    logic [NUP-1:0] v1o, v2o;
    logic [NFF-1:0] s1;
    logic [NDN-1:0] resp;
    logic [NUP-1:0] bout;
    longint c0, per;
    wir_t wb, wt;
    done = 0; checks = 0; failures = 0;
    trst_n = 0; tms = 1; tdi = 0; wpi = '0;
    #12 trst_n = 1;
    repeat (5) clk_tms(1);
    clk_tms(0);
    wb = '{tsvtest:0, elevator:1, parallel:1, postbond:1, mode:WM_EXTEST};
    wt = '{tsvtest:1, elevator:0, parallel:1, postbond:1, mode:WM_INTEST};
    load_wirs(wb, wt);
    load_ir(IR_WDELAY);
    lmax = 0;
    for (int k = 0; k < NC; k++) if (lane_len(k) > lmax) lmax = lane_len(k);
    randomize_load();
    scan_lanes(0);
    per = 0;
    for (int n = 0; n < NPAT; n++) begin
      for (int c = 0; c < NUP; c++) begin v1o[c] = bst[NDN + c]; v2o[c] = bsc[NDN + c]; end
      bout = gb(u_bcore.ff);
      c0 = cyc;
      clk_tms(0); clk_tms(1); clk_tms(1); clk_tms(0);   // update, transfer, launch, capture
      s1 = ft(tff, v1o);
      resp = gt(s1);
      etff = ft(s1, v2o);
      for (int c = 0; c < NCELL; c++) begin
        ebst[c] = bsc[c];
        ebsc[c] = (c < NDN) ? resp[c] : bout[c - NDN];
        etst[c] = tsc[c];
        etsc[c] = (c < NUP) ? v2o[c] : resp[c - NUP];
      end
      randomize_load();
      scan_lanes(1);
      per = cyc - c0;
      check(64'(per), 64'(lmax + 7), "tck cycles per pattern = longest lane + 7");
    end
    clk_tms(1); clk_tms(0);
    // test time for the reference pattern count against the reference figure
    begin
      longint total, diff;
      total = per * REF_PATS;
      diff = (total > REF_CYCLES) ? total - REF_CYCLES : REF_CYCLES - total;
      $display("lanes %0d cycles/pattern -> %0d cycles for %0d patterns (reference %0d)",
               per, total, REF_PATS, REF_CYCLES);
      check(64'(diff * 200 < REF_CYCLES), 64'(1), "test time within 0.5 % of reference");
    end
    done = 1;
  end
endmodule
