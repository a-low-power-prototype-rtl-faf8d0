// dwt_filter: one filter of the processor's filter pair (low pass or high
// pass; the two are identical and differ only in their coefficients).
//
// A 4-tap computational tree: four Booth multipliers form sample x coefficient,
// only the low 16 bits of each 32-bit product are kept (the upper half is
// discarded), and a tree of three 16-bit carry look-ahead adders (two, then
// one) sums them to a single 16-bit result, modulo 2^16. The tap order is that
// of a convolution: lane i of data_word (lane 0 = bits 15:0, the oldest
// sample) meets coefficient lane TAPS-1-i. Purely combinational; the result is
// valid in the same cycle as its inputs.
//
// From the document: tap count, Booth multipliers, CLA adders, the tree shape
// and the dropped upper product half. Own choice: the convolution tap order.
module dwt_filter #(
  parameter int unsigned TAPS = 4,
  parameter int unsigned DW   = 16
) (
  input  logic [TAPS*DW-1:0] data_word,
  input  logic [TAPS*DW-1:0] coef_word,
  output logic [DW-1:0]      result
);
  logic [2*DW-1:0] prod  [TAPS];
  logic [DW-1:0]   sum01, sum23;

  for (genvar i = 0; i < TAPS; i++) begin : g_mul
    booth_mult16 #(.W(DW)) u_mul (
      .a(data_word[i*DW +: DW]),
      .b(coef_word[(TAPS-1-i)*DW +: DW]),
      .p(prod[i])
    );
  end

  // Upper product halves are discarded; unused carries are wrap-around.
  cla_adder16 #(.W(DW)) u_add01 (.a(prod[0][DW-1:0]), .b(prod[1][DW-1:0]), .cin(1'b0), .sum(sum01), .cout());
  cla_adder16 #(.W(DW)) u_add23 (.a(prod[2][DW-1:0]), .b(prod[3][DW-1:0]), .cin(1'b0), .sum(sum23), .cout());
  cla_adder16 #(.W(DW)) u_addf  (.a(sum01),           .b(sum23),           .cin(1'b0), .sum(result), .cout());

  if (TAPS != 4) begin : g_bad_taps
    $error("dwt_filter: the adder tree is built for TAPS = 4");
  end

endmodule
