// tb_inject_scan_cell: self-checking test of the injection scan cell.
// Shifts bits through the cell, checks that the cell holds while scan_en
// is low, and that logic_in follows the stored bit with Test_Enable high
// and the via with Test_Enable low.
module tb_inject_scan_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scan_en = 1'b0, si = 1'b0, test_en = 1'b0, via_in = 1'b0;
  logic so, logic_in;
  int checks = 0, failures = 0;

  inject_scan_cell dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic q;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    q = 1'b0;
    check(so, 1'b0, "reset value");
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      scan_en = 1'($urandom_range(0, 1));
      si      = 1'($urandom_range(0, 1));
      test_en = 1'($urandom_range(0, 1));
      via_in  = 1'($urandom_range(0, 1));
      #1;
      check(logic_in, test_en ? q : via_in, "logic_in select");
      @(posedge clk);
      if (scan_en) q = si;
      #1;
      check(so, q, scan_en ? "shift" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
