// tb_staggered_adder: self-checking test of the three-stage adder.
// A new operand pair enters every cycle; the sum and flags are compared,
// two rising edges later, with values computed in the testbench. Corner
// cases (carry out, signed overflow, zero, carry across the halves) come
// first, then random operands.
module tb_staggered_adder;
  import scan_island_pkg::*;
  localparam int W = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] a = '0, b = '0, sum;
  add_flags_t flags;
  int checks = 0, failures = 0;

  staggered_adder #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] qa[$], qb[$];

  function automatic logic [W+3:0] expected(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] s;
    logic ov;
    s  = {1'b0, x} + {1'b0, y};
    ov = (x[W-1] == y[W-1]) && (s[W-1] != x[W-1]);
    return {s[W], ov, s[W-1], (s[W-1:0] == '0), s[W-1:0]};
  endfunction

  initial begin
    logic [W-1:0] va[$], vb[$];
    va = '{32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h0000_FFFF, 32'h8000_0000, 32'h0, 32'h1234_5678};
    vb = '{32'h0000_0001, 32'h0000_0001, 32'h0000_0001, 32'h8000_0000, 32'h0, 32'h8765_4321};
    for (int i = 0; i < 300; i++) begin
      va.push_back($urandom);
      vb.push_back($urandom);
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < va.size() + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        logic [W+3:0] e;
        e = expected(va[i-2], vb[i-2]);
        checks++;
        if ({flags, sum} !== e) begin
          failures++;
          $display("FAIL %h + %h: got %h expected %h", va[i-2], vb[i-2], {flags, sum}, e);
        end
      end
      if (i < va.size()) begin a = va[i]; b = vb[i]; end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
