// adder_island: the staggered adder with border scan cells on the
// die-to-die buses around it.
//
// Both operand buses arrive from another layer and the result bus (sum
// with its flags) leaves for another layer. Before bonding the operand
// vias are dangling, so an injection scan cell sits on every operand bit
// and an observation scan cell on every result bit. The cells form one
// scan chain in the order of the original example circuit: si enters the
// operand-A injection cells (bit 0 first), then the operand-B cells, then
// the result observation cells, whose last bit is so. A test pattern is
// shifted in with scan_en high and test_en high, the clock runs with
// scan_en low while the pattern propagates through the pipeline (two
// edges) and the observation cells capture on the edge after that when
// capture_en is high; the response is then shifted out.
//
// Bit order inside the chain and the result bus layout {flags, sum} are
// this design's choices. Chain length is 3*WIDTH+4.
module adder_island
  import scan_island_pkg::*;
#(
  parameter int unsigned WIDTH = ADDER_WIDTH
) (
  input  logic               clk,
  input  logic               rst_n,
  // test controls
  input  logic               test_en,     // Test_Enable: inject scan values on the operand buses
  input  logic               scan_en,
  input  logic               capture_en,
  input  logic               si,
  output logic               so,
  // D2D buses
  input  logic [WIDTH-1:0]   a_via,       // operand A from the other layer
  input  logic [WIDTH-1:0]   b_via,       // operand B from the other layer
  output logic [WIDTH+3:0]   result_via   // {flags, sum} to the other layer
);

  localparam int unsigned N_OBS   = WIDTH + 4;
  localparam int unsigned N_CELLS = 2 * WIDTH + N_OBS;

  // chain[i] is the scan input of cell i; chain[N_CELLS] is so.
  logic [N_CELLS:0] chain;
  logic [WIDTH-1:0] a_int, b_int;
  logic [WIDTH-1:0] sum;
  add_flags_t       flags;

  assign chain[0] = si;

  for (genvar i = 0; i < WIDTH; i++) begin : g_inj_a
    inject_scan_cell u_cell (
      .clk, .rst_n, .scan_en, .si(chain[i]), .so(chain[i+1]),
      .test_en, .via_in(a_via[i]), .logic_in(a_int[i])
    );
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_inj_b
    inject_scan_cell u_cell (
      .clk, .rst_n, .scan_en, .si(chain[WIDTH+i]), .so(chain[WIDTH+i+1]),
      .test_en, .via_in(b_via[i]), .logic_in(b_int[i])
    );
  end

  staggered_adder #(.WIDTH(WIDTH)) u_adder (
    .clk, .rst_n, .a(a_int), .b(b_int), .sum, .flags
  );

  assign result_via = {flags, sum};

  for (genvar i = 0; i < N_OBS; i++) begin : g_obs
    observe_scan_cell u_cell (
      .clk, .rst_n, .scan_en, .capture_en, .si(chain[2*WIDTH+i]), .so(chain[2*WIDTH+i+1]),
      .via_out(result_via[i])
    );
  end

  assign so = chain[N_CELLS];

endmodule
