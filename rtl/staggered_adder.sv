// staggered_adder: three-stage pipelined (staggered) adder.
//
// Stage 1 adds the low halves of the operands, stage 2 adds the high
// halves with the stage-1 carry, stage 3 derives the flags from the
// complete sum. Pipeline registers sit between stages 1 and 2 and between
// stages 2 and 3, so a sum and its flags appear two rising edges after the
// operands are presented; stage 3 is combinational to the outputs. This
// mirrors the staggered adder used as the example of a block split across
// layers. The width (32 bits) and the flag set (carry, signed overflow,
// negative, zero) are this design's choices.
//
// Interface: operands a and b are sampled on every rising edge; sum and
// flags are valid two edges later. No stall or enable.
module staggered_adder
  import scan_island_pkg::*;
#(
  parameter int unsigned WIDTH = ADDER_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output add_flags_t       flags
);

  localparam int unsigned LO = WIDTH / 2;
  localparam int unsigned HI = WIDTH - LO;

  // Stage 1: low-order add.
  logic [LO:0] lo_add;
  assign lo_add = {1'b0, a[LO-1:0]} + {1'b0, b[LO-1:0]};

  // Stage 1 -> 2 registers.
  logic [LO-1:0] s2_lo_sum;
  logic          s2_lo_carry;
  logic [HI-1:0] s2_a_hi, s2_b_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_lo_sum   <= '0;
      s2_lo_carry <= 1'b0;
      s2_a_hi     <= '0;
      s2_b_hi     <= '0;
    end else begin
      s2_lo_sum   <= lo_add[LO-1:0];
      s2_lo_carry <= lo_add[LO];
      s2_a_hi     <= a[WIDTH-1:LO];
      s2_b_hi     <= b[WIDTH-1:LO];
    end
  end

  // Stage 2: high-order add.
  logic [HI:0] hi_add;
  assign hi_add = {1'b0, s2_a_hi} + {1'b0, s2_b_hi} + {{HI{1'b0}}, s2_lo_carry};

  // Stage 2 -> 3 registers.
  logic [WIDTH-1:0] s3_sum;
  logic             s3_carry, s3_a_msb, s3_b_msb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_sum   <= '0;
      s3_carry <= 1'b0;
      s3_a_msb <= 1'b0;
      s3_b_msb <= 1'b0;
    end else begin
      s3_sum   <= {hi_add[HI-1:0], s2_lo_sum};
      s3_carry <= hi_add[HI];
      s3_a_msb <= s2_a_hi[HI-1];
      s3_b_msb <= s2_b_hi[HI-1];
    end
  end

  // Stage 3: flags.
  always_comb begin
    flags.carry    = s3_carry;
    flags.overflow = (s3_a_msb == s3_b_msb) && (s3_sum[WIDTH-1] != s3_a_msb);
    flags.negative = s3_sum[WIDTH-1];
    flags.zero     = (s3_sum == '0);
  end

  assign sum = s3_sum;

endmodule
