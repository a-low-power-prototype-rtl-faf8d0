// coef_module: the "get coefficient" block of one filter.
//
// Three 64-bit registers R0, R1, R2 hold the four 16-bit coefficients of the
// filter for the first, second and third 1-D pass. On 'load' all three are
// written at once from coef_in (one 64-bit word per register). A 3-to-1
// multiplexer, steered by 'sel' (0, 1, 2), passes one register to the filter;
// sel = 3 gives zero. Registers load on the rising clock edge; the multiplexer
// is combinational, so coef_out follows sel in the same cycle.
//
// From the document: three 64-bit registers of four coefficients each, loaded
// from off-chip memory simultaneously, and the 3-1 multiplexer. Own choices:
// the reset to zero, the single-cycle parallel load port and the sel = 3 value.
module coef_module
  import dwt_pkg::*;
#(
  parameter int unsigned NSETS_P  = NSETS,
  parameter int unsigned WORD_W_P = WORD_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [WORD_W_P-1:0] coef_in [NSETS_P],
  input  logic [1:0]          sel,
  output logic [WORD_W_P-1:0] coef_out
);
  logic [WORD_W_P-1:0] r [NSETS_P];   // R0..R2

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NSETS_P); i++) r[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < int'(NSETS_P); i++) r[i] <= coef_in[i];
    end
  end

  always_comb begin
    coef_out = '0;
    for (int i = 0; i < int'(NSETS_P); i++)
      if (sel == 2'(i)) coef_out = r[i];
  end

endmodule
