// ladner_fischer_adder: WIDTH-bit parallel prefix adder with a
// Ladner-Fischer carry tree.
//
// The addition runs in three steps. Pre-processing forms, for every bit, a
// propagate p = a ^ b and a generate g = a & b. The prefix tree then combines
// (g, p) pairs with the carry operator
//     (G, P) = (g_hi | (p_hi & g_lo), p_hi & p_lo)
// (one OR and two AND gates per cell) until every position holds the group
// generate of everything below it, which is the carry into the next bit.
// Post-processing forms sum = p ^ carry.
//
// The carry-in is treated as an extra position below bit 0 whose generate is
// cin and whose propagate is 0, so node j of the tree (j = 0..WIDTH) stands
// for {bit j-1 .. bit 0, cin}, and its final group generate is the carry into
// bit j; node WIDTH gives the carry-out.
//
// The tree is the minimum-depth Ladner-Fischer form: at level l every node
// whose index has bit l set combines with the last node of the aligned block
// of 2^l nodes just below it. It has ceil(log2(WIDTH+1)) levels, so the carry
// delay grows with log2 of the width. Fan-out doubles from level to level.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out. Purely
// combinational. The default WIDTH of 3 is the adder size the published
// design draws, which is also the final adder of a 4 x 4 Braun multiplier.
// The propagate, generate, carry-cell and sum equations follow the published
// design; the exact placement of the tree's nodes is this design's reading of the
// Ladner-Fischer structure.
module ladner_fischer_adder #(
  parameter int unsigned WIDTH = 3
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned M      = WIDTH + 1;     // tree nodes, cin included
  localparam int unsigned LEVELS = $clog2(M);

  logic [WIDTH-1:0] p_bit;                        // bitwise propagate
  logic [WIDTH-1:0] g_bit;                        // bitwise generate
  logic [M-1:0]     g_lv [LEVELS+1];              // group generate per level
  logic [M-1:0]     p_lv [LEVELS+1];              // group propagate per level
  logic [M-1:0]     carry;                        // carry into node j

  // Pre-processing.
  assign p_bit = a ^ b;
  assign g_bit = a & b;
  assign g_lv[0] = {g_bit, cin};
  assign p_lv[0] = {p_bit, 1'b0};

  // Prefix tree.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar j = 0; j < M; j++) begin : g_node
      if (((j >> l) & 1) == 1) begin : g_cell
        localparam int unsigned LO = ((j >> l) << l) - 1;
        assign g_lv[l+1][j] = g_lv[l][j] | (p_lv[l][j] & g_lv[l][LO]);
        assign p_lv[l+1][j] = p_lv[l][j] & p_lv[l][LO];
      end else begin : g_pass
        assign g_lv[l+1][j] = g_lv[l][j];
        assign p_lv[l+1][j] = p_lv[l][j];
      end
    end
  end

  assign carry = g_lv[LEVELS];

  // Post-processing.
  assign sum  = p_bit ^ carry[WIDTH-1:0];
  assign cout = carry[WIDTH];
endmodule
