// tb_redundant_clock_tree: checks that with the enable high every leaf
// follows the probe clock whatever the vias carry, and with the enable
// low every leaf follows its own via.
module tb_redundant_clock_tree;
  localparam int LEVELS = 4;
  localparam int LEAVES = 1 << LEVELS;
  logic probe_clk = 1'b0, tree_en = 1'b0;
  logic [LEAVES-1:0] via_clk = '0, leaf_clk;
  int checks = 0, failures = 0;

  redundant_clock_tree #(.LEVELS(LEVELS)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      probe_clk = 1'($urandom_range(0, 1));
      tree_en   = 1'($urandom_range(0, 1));
      via_clk   = LEAVES'($urandom);
      #5;
      checks++;
      if (leaf_clk !== (tree_en ? {LEAVES{probe_clk}} : via_clk)) begin
        failures++;
        $display("FAIL en=%0b probe=%0b via=%h leaves=%h", tree_en, probe_clk, via_clk, leaf_clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
