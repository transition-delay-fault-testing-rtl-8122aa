// tb_tap_controller: self-checking test of the TAP controller. It walks the
// state machine with tms and checks, in every state visited, the wrapper
// controls expected for that state and instruction: the stuck-at timing
// (capture in Capture-DR, update in Update-DR), the delay-test timing (update
// in Exit1-DR, transfer in Pause-DR, update+launch in Exit2-DR, capture in
// Update-DR, nothing in Capture-DR), WIR selection, the IR capture value,
// the one-bit TAP bypass, tdo routing and the wrapper reset.
module tb_tap_controller;
  import tdf_pkg::*;
  logic tck = 1'b0, trst_n, tms, tdi, tdo, wrstn, wsi, wso, delay_mode;
  wsc_t wsc;
  int checks = 0, failures = 0;

  tap_controller dut (.*);

  always #5 tck = ~tck;

  initial begin
    repeat (20000) @(posedge tck);
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

  // controls as {select_wir, shift, capture, transfer, update, launch}
  function automatic logic [5:0] ctl();
    return {wsc.select_wir, wsc.shift_wr, wsc.capture_wr, wsc.transfer_wr,
            wsc.update_wr, wsc.launch_wr};
  endfunction

  task automatic clk_tms(input logic t);
    tms = t; @(posedge tck); #1;
  endtask

  // From Run-Test/Idle: load an instruction, return to Run-Test/Idle.
  task automatic load_ir(input logic [IR_W-1:0] code);
    logic [IR_W-1:0] cap;
    clk_tms(1); clk_tms(1); clk_tms(0); clk_tms(0);   // Shift-IR
    for (int b = 0; b < IR_W; b++) begin
      tdi = code[b];
      cap[b] = tdo;
      clk_tms(b == IR_W - 1);                       // last bit -> Exit1-IR
    end
    check(cap, IR_W'(1), "IR capture value 0001");
    clk_tms(1); clk_tms(0);                          // Update-IR, Run-Test/Idle
  endtask

  logic [7:0] pat, got;
  logic [5:0] c_sel;

  initial begin
    trst_n = 0; tms = 1; tdi = 0; wso = 0;
    #12 trst_n = 1;
    repeat (5) clk_tms(1);
    check(wrstn, 1'b0, "wrapper reset in Test-Logic-Reset");
    clk_tms(0);
    check(wrstn, 1'b1, "wrapper reset released");
    check(ctl(), 6'b0, "idle controls");

    // TAP bypass: one-bit delay from tdi to tdo
    load_ir(IR_BYPASS);
    check(delay_mode, 1'b0, "bypass is not delay mode");
    clk_tms(1); clk_tms(0); clk_tms(0);             // Shift-DR
    pat = 8'($urandom);
    for (int b = 0; b < 8; b++) begin
      tdi = pat[b]; got[b] = tdo; clk_tms(0);
    end
    check(got[7:1], pat[6:0], "bypass register delays by one bit");
    check(ctl(), 6'b0, "no wrapper action in bypass");
    clk_tms(1); clk_tms(1); clk_tms(0);             // Exit1, Update, RTI

    // stuck-at timing
    load_ir(IR_WDR);
    clk_tms(1);                                     // Select-DR
    check(ctl(), 6'b0, "select-DR");
    clk_tms(0);                                     // Capture-DR
    check(ctl(), 6'b001000, "WDR capture in Capture-DR");
    clk_tms(0);                                     // Shift-DR
    check(ctl(), 6'b010000, "WDR shift");
    for (int b = 0; b < 4; b++) begin
      wso = 1'($urandom); #1; check(tdo, wso, "tdo follows wso");
      check(wsi, tdi, "wsi follows tdi");
    end
    clk_tms(1);                                     // Exit1-DR
    check(ctl(), 6'b0, "WDR exit1 idle");
    clk_tms(0);                                     // Pause-DR
    check(ctl(), 6'b0, "WDR pause idle");
    clk_tms(1);                                     // Exit2-DR
    check(ctl(), 6'b0, "WDR exit2 idle");
    clk_tms(1);                                     // Update-DR
    check(ctl(), 6'b000010, "WDR update in Update-DR");
    clk_tms(0);

    // delay-test timing
    load_ir(IR_WDELAY);
    check(delay_mode, 1'b1, "delay mode");
    clk_tms(1); clk_tms(0);                         // Capture-DR
    check(ctl(), 6'b0, "no capture in Capture-DR (delay)");
    clk_tms(0);                                     // Shift-DR
    check(ctl(), 6'b010000, "delay shift");
    clk_tms(0);
    clk_tms(1);                                     // Exit1-DR
    check(ctl(), 6'b000010, "update in Exit1-DR");
    clk_tms(0);                                     // Pause-DR
    check(ctl(), 6'b000100, "transfer in Pause-DR");
    clk_tms(0);
    check(ctl(), 6'b000100, "transfer held in Pause-DR");
    clk_tms(1);                                     // Exit2-DR
    check(ctl(), 6'b000011, "update + launch in Exit2-DR");
    clk_tms(1);                                     // Update-DR
    check(ctl(), 6'b001000, "capture in Update-DR, next cycle after launch");
    clk_tms(0);
    check(ctl(), 6'b0, "RTI idle");

    // WIR access
    load_ir(IR_WIR);
    c_sel = 6'b100000;
    check(ctl(), c_sel, "select_wir in RTI");
    clk_tms(1); clk_tms(0); clk_tms(0);
    check(ctl(), 6'b110000, "WIR shift");
    clk_tms(1); clk_tms(1);
    check(ctl(), 6'b100010, "WIR update");
    clk_tms(0);

    // back to reset: instruction returns to bypass
    repeat (5) clk_tms(1);
    check(wrstn, 1'b0, "reset again");
    check(ctl(), 6'b0, "reset selects no wrapper register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
