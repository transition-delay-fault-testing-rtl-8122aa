// tb_wir: self-checking test of the wrapper instruction register. Checks the
// reset instruction, that shifting without select or update changes nothing,
// that a shifted word appears on so in order and becomes the instruction
// only on an update with select set, for random instructions.
module tb_wir;
  import tdf_pkg::*;
  logic clk = 1'b0, rst_n, select, shift_en, update_en, si, so;
  wir_t instr;
  int checks = 0, failures = 0;

  wir dut (.*);

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

  logic [WIR_W-1:0] w, prev, seen;

  initial begin
    rst_n = 0; select = 0; shift_en = 0; update_en = 0; si = 0;
    tick(); tick(); rst_n = 1;
    check(instr, WIR_RESET, "reset instruction");
    check(instr.mode, WM_FUNC, "reset mode functional");
    check(instr.postbond, 1'b1, "reset post-bond");
    prev = WIR_RESET;
    // shift without select: nothing moves
    shift_en = 1; si = 1; repeat (WIR_W) tick(); shift_en = 0;
    update_en = 1; tick(); update_en = 0;
    check(instr, prev, "no change without select");
    repeat (50) begin
      w = WIR_W'($urandom);
      select = 1; shift_en = 1;
      for (int b = 0; b < WIR_W; b++) begin
        si = w[b];
        seen[b] = so;
        tick();
      end
      shift_en = 0;
      check(seen, prev, "previous shift contents leave lsb first");
      check(instr, prev, "instruction holds until update");
      update_en = 1; tick(); update_en = 0;
      check(instr, w, "updated instruction");
      prev = w;
      select = 0; tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
