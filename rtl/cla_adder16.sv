// cla_adder16: 16-bit carry look-ahead adder, the '+' node of the filter tree.
//
// Every bit is an lp_adder_cell, a full-adder cell whose sum and carry are
// independent paths. The carry into each cell does not ripple from the cell
// below: it comes from a look-ahead network built on bit generate g = a&b and
// propagate p = a^b. Bits are grouped by four; inside a group every carry is
// the expanded sum of products c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[0]c0,
// and the group carries come from a second look-ahead level over the group
// generate/propagate signals. cout is the carry output of the top cell.
// Purely combinational; sum = (a + b + cin) mod 2^W.
//
// The document names a 16-bit CLA built from a low-power 1-bit cell with
// separate sum and carry paths; the two-level 4-bit grouping is this design's
// own choice. W must be a multiple of 4.
module cla_adder16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NG = W / 4;

  logic [W-1:0]  g, p;       // bit generate / propagate (1-bit cells)
  logic [NG-1:0] gg, gp;     // group generate / propagate
  logic [NG-1:0] gc;         // carry into each group
  logic [W-1:0]  c;          // carry into each bit

  // Generate / propagate for the look-ahead network.
  assign g = a & b;
  assign p = a ^ b;

  // Group generate / propagate.
  always_comb begin
    for (int gi = 0; gi < NG; gi++) begin
      logic [3:0] gl, pl;
      gl = g[gi*4 +: 4];
      pl = p[gi*4 +: 4];
      gp[gi] = &pl;
      gg[gi] = gl[3] | (pl[3] & gl[2]) | (pl[3] & pl[2] & gl[1]) |
               (pl[3] & pl[2] & pl[1] & gl[0]);
    end
  end

  // Second level: every group carry as an expanded sum of products.
  always_comb begin
    gc[0] = cin;
    for (int j = 1; j < int'(NG); j++) begin
      logic term, acc;
      acc = 1'b0;
      for (int k = 0; k < j; k++) begin
        term = gg[k];
        for (int m = k + 1; m < j; m++) term = term & gp[m];
        acc = acc | term;
      end
      term = cin;
      for (int m = 0; m < j; m++) term = term & gp[m];
      gc[j] = acc | term;
    end
  end

  // First level: carries inside each group from the group carry-in.
  always_comb begin
    for (int gi = 0; gi < NG; gi++) begin
      c[gi*4] = gc[gi];
      for (int i = 1; i < 4; i++) begin
        logic term, acc;
        acc = 1'b0;
        for (int k = 0; k < i; k++) begin
          term = g[gi*4 + k];
          for (int m = k + 1; m < i; m++) term = term & p[gi*4 + m];
          acc = acc | term;
        end
        term = gc[gi];
        for (int m = 0; m < i; m++) term = term & p[gi*4 + m];
        c[gi*4 + i] = acc | term;
      end
    end
  end

  // The 1-bit cells, each fed its carry from the look-ahead network.
  logic [W-1:0] cell_cout;
  for (genvar i = 0; i < W; i++) begin : g_cell
    lp_adder_cell u_cell (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(cell_cout[i]));
  end
  assign cout = cell_cout[W-1];

endmodule
