// tb_observe_scan_cell: self-checking test of the observation scan cell.
// Random shift/capture/hold cycles are compared with a reference model:
// shift has priority over capture, and with neither the cell holds.
module tb_observe_scan_cell;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scan_en = 1'b0, capture_en = 1'b0, si = 1'b0, via_out = 1'b0;
  logic so;
  int checks = 0, failures = 0;
  int n_shift = 0, n_capture = 0, n_hold = 0;

  observe_scan_cell dut (.*);

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
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      scan_en    = 1'($urandom_range(0, 1));
      capture_en = 1'($urandom_range(0, 1));
      si         = 1'($urandom_range(0, 1));
      via_out    = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (scan_en) begin q = si; n_shift++; end
      else if (capture_en) begin q = via_out; n_capture++; end
      else n_hold++;
      #1;
      check(so, q, "cell value");
    end
    checks++;
    if (n_shift == 0 || n_capture == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
