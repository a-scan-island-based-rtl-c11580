// tb_adder_island: scan test of the staggered adder island.
// Before-bonding use: operands are shifted into the injection cells with
// the vias held at unrelated values, the pipeline runs two cycles, the
// observation cells capture, and the response is shifted out and compared
// with the sum and flags computed here. The capture edge is checked too:
// capturing one cycle early must not yet show the result. Finally, with
// Test_Enable low, the vias drive the adder and result_via is checked.
module tb_adder_island;
  import scan_island_pkg::*;
  localparam int W = 32;
  localparam int L = 3 * W + 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic test_en = 1'b0, scan_en = 1'b0, capture_en = 1'b0, si = 1'b0, so;
  logic [W-1:0] a_via = '0, b_via = '0;
  logic [W+3:0] result_via;
  int checks = 0, failures = 0;

  adder_island #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W+3:0] expected(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] s;
    logic ov;
    s  = {1'b0, x} + {1'b0, y};
    ov = (x[W-1] == y[W-1]) && (s[W-1] != x[W-1]);
    return {s[W], ov, s[W-1], (s[W-1:0] == '0), s[W-1:0]};
  endfunction

  // Shift the operands into the 2W injection cells (cell i holds bit i of
  // {b, a}), so the bit for cell 2W-1 goes in first.
  task automatic load(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [2*W-1:0] v;
    v = {y, x};
    for (int t = 0; t < 2 * W; t++) begin
      @(negedge clk);
      scan_en = 1'b1;
      si = v[2*W-1-t];
    end
    @(negedge clk);
    scan_en = 1'b0;
  endtask

  // Read the observation cells: so shows cell L-1 first.
  task automatic unload(output logic [W+3:0] r);
    for (int t = 0; t < W + 4; t++) begin
      @(negedge clk);
      r[W+3-t] = so;
      scan_en = 1'b1;
      si = 1'b0;
    end
    @(negedge clk);
    scan_en = 1'b0;
  endtask

  initial begin
    logic [W-1:0] x, y;
    logic [W+3:0] r, e;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 12; n++) begin
      case (n)
        0: begin x = 32'hFFFF_FFFF; y = 32'h1; end
        1: begin x = 32'h7FFF_FFFF; y = 32'h1; end
        2: begin x = 32'h0000_FFFF; y = 32'h1; end
        default: begin x = $urandom; y = $urandom; end
      endcase
      test_en = 1'b1;
      a_via = ~x;            // the vias are dangling: they must not matter
      b_via = $urandom;
      load(x, y);
      // scan_en is low from here: edge 1 fills stage 2, edge 2 stage 3.
      // Capture on edge 2 must still miss the result of this pattern
      // (it would show the previous pattern's sum).
      @(posedge clk);
      @(negedge clk); capture_en = 1'b1;
      @(posedge clk);
      @(negedge clk); capture_en = 1'b0;
      unload(r);
      checks++;
      if (r === expected(x, y) && !(n == 0)) begin
        failures++;
        $display("FAIL early capture already shows the result");
      end
      // Reload and capture at the right edge (third edge after loading).
      load(x, y);
      @(posedge clk);
      @(posedge clk);
      @(negedge clk); capture_en = 1'b1;
      @(posedge clk);
      @(negedge clk); capture_en = 1'b0;
      unload(r);
      e = expected(x, y);
      checks++;
      if (r !== e) begin
        failures++;
        $display("FAIL scan test %h + %h: got %h expected %h", x, y, r, e);
      end
    end
    // Functional path with Test_Enable low.
    test_en = 1'b0;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      a_via = $urandom; b_via = $urandom;
      x = a_via; y = b_via;
      @(posedge clk); @(posedge clk);
      @(negedge clk);
      checks++;
      if (result_via !== expected(x, y)) begin
        failures++;
        $display("FAIL functional %h + %h: got %h", x, y, result_via);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
