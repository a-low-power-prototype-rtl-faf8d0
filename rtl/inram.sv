// inram: input cache holding one data block from off-chip memory.
//
// WORDS words of 64 bits (four 16-bit samples each), written and read a whole
// word at a time. Writes are synchronous: with en and we high, wdata is stored
// at addr on the rising clock edge. Reads are asynchronous: with en and re
// high, rdata shows the word at addr in the same cycle; otherwise rdata is
// zero, so several memories can share one bus by OR-ing their outputs
// (standing in for a tri-state output). clr (with en) clears every word on the
// clock edge and takes priority over a write.
//
// From the document: a 64-bit input and output width, static storage, one
// whole block of eight words. Own choices: asynchronous read, the
// zero-when-idle output and the clear.
module inram
  import dwt_pkg::*;
#(
  parameter int unsigned WORDS    = IN_WORDS,
  parameter int unsigned WORD_W_P = WORD_W
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic                     re,
  input  logic                     clr,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [WORD_W_P-1:0]      wdata,
  output logic [WORD_W_P-1:0]      rdata
);
  logic [WORD_W_P-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && clr) begin
      for (int i = 0; i < int'(WORDS); i++) mem[i] <= '0;
    end else if (en && we) begin
      mem[addr] <= wdata;
    end
  end

  assign rdata = (en && re) ? mem[addr] : '0;

endmodule
