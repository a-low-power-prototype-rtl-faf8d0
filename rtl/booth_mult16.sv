// booth_mult16: 16x16 two's-complement Booth multiplier, the '*' node of the
// filter tree.
//
// The multiplier b is recoded radix-4 (modified Booth): each overlapping
// triplet {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0) selects a partial product of
// 0, +a, +2a, -a or -2a, weighted by 4^i. The W/2 sign-extended partial
// products are added into the 2W-bit product p = a * b (exact, signed).
// Purely combinational.
//
// The document specifies a 16-bit Booth multiplier with a 32-bit output; the
// radix-4 recoding and the signed operands are this design's own choices.
module booth_mult16 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned NPP = W / 2;

  logic [2*W-1:0] pp [NPP];   // sign-extended, shifted partial products

  always_comb begin
    logic [W:0]     bx;          // b with the implicit 0 below bit 0
    logic [2*W-1:0] ax, ax2;     // a and 2a, sign-extended to 2W bits
    logic [2:0]     trip;
    bx  = {b, 1'b0};
    ax  = {{W{a[W-1]}}, a};
    ax2 = ax << 1;
    for (int i = 0; i < NPP; i++) begin
      trip = bx[2*i +: 3];
      unique case (trip)
        3'b001, 3'b010: pp[i] = ax;
        3'b011:         pp[i] = ax2;
        3'b100:         pp[i] = -ax2;
        3'b101, 3'b110: pp[i] = -ax;
        default:        pp[i] = '0;   // 000, 111
      endcase
      pp[i] = pp[i] << (2 * i);
    end
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < NPP; i++) p = p + pp[i];
  end

endmodule
