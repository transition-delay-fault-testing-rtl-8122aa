// tb_wbr_cell: self-checking test of the transition-capable boundary cell.
// A reference model of the three flip-flops (SC, ST, U) is stepped alongside
// the cell with random controls and data; cto and cfo are compared on every
// cycle. A directed two-pattern sequence (scan 2 bits, update, transfer,
// update, capture) then checks that cfo shows the 0->1 transition on
// consecutive update edges and that SC holds the captured response.
module tb_wbr_cell;
  logic clk = 1'b0, rst_n;
  logic shift_en, capture_en, transfer_en, update_en, drive, transparent;
  logic cti, cto, cfi, cfo;
  int   checks = 0, failures = 0;
  logic m_sc, m_st, m_u, exp_cfo;

  wbr_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  task automatic step();
    @(posedge clk);
    if (!rst_n) begin m_sc = 0; m_st = 0; m_u = 0; end
    else begin
      logic sc_old, st_old;
      sc_old = m_sc; st_old = m_st;
      if (shift_en) m_sc = cti; else if (capture_en) m_sc = cfi;
      if (shift_en || transfer_en) m_st = sc_old;
      if (update_en) m_u = st_old;
    end
    #1;
  endtask

  task automatic idle();
    {shift_en, capture_en, transfer_en, update_en} = '0;
  endtask

  initial begin
    rst_n = 0; idle(); drive = 0; transparent = 0; cti = 0; cfi = 0;
    step(); step();
    rst_n = 1;
    // random controls, compare with model
    repeat (1000) begin
      {shift_en, capture_en, transfer_en, update_en} = 4'($urandom);
      {drive, transparent, cti, cfi} = 4'($urandom);
      #1;
      exp_cfo = transparent ? cfi : (drive ? m_u : cfi);
      check(cfo, exp_cfo, "cfo");
      check(cto, m_st, "cto");
      step();
      check(cto, m_st, "cto after edge");
    end
    // directed transition launch: v1=0 into ST, v2=1 into SC
    idle(); drive = 1; transparent = 0; cfi = 0;
    shift_en = 1; cti = 1; step();   // SC=1
    cti = 0; step();                 // SC=0, ST=1
    cti = 1; step();                 // SC=1, ST=0
    shift_en = 0;
    update_en = 1; step(); update_en = 0;
    check(cfo, 1'b0, "first vector on cfo");
    transfer_en = 1; step(); transfer_en = 0;
    check(cfo, 1'b0, "transfer leaves cfo");
    check(cto, 1'b1, "transfer moves SC into ST");
    update_en = 1; step(); update_en = 0;
    check(cfo, 1'b1, "launched transition on cfo");
    cfi = 0; capture_en = 1; step(); capture_en = 0;
    shift_en = 1; step(); shift_en = 0;   // SC (captured 0) -> ST
    check(cto, 1'b0, "captured response reaches cto");
    transparent = 1; cfi = 1; #1;
    check(cfo, 1'b1, "transparent passes cfi");
    cfi = 0; #1;
    check(cfo, 1'b0, "transparent passes cfi 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
