// lh_ram: result cache of one filter (used as LRAM for the low-pass filter and
// HRAM for the high-pass filter).
//
// ENTRIES entries of 16 bits. It is written one 16-bit filter output at a time
// and read four entries (one 64-bit word) at a time: word raddr is entries
// 4*raddr .. 4*raddr+3, the lowest entry in bits 15:0. Writes are synchronous
// (en and we: wdata stored at entry waddr on the rising edge); reads are
// asynchronous (en and re: rdata valid in the same cycle, zero otherwise, so
// the memories can share the filter input bus). clr (with en) clears every
// entry on the clock edge and takes priority over a write.
//
// From the document: 16-bit input and 64-bit output width, static storage.
// Own choices: depth 16 (one entry per filter output of a block), separate
// read and write addresses, asynchronous read, zero-when-idle output, clear.
module lh_ram
  import dwt_pkg::*;
#(
  parameter int unsigned ENTRIES = RES_ENTRIES,
  parameter int unsigned DW_P    = DW,
  parameter int unsigned RW      = WORD_W
) (
  input  logic                                 clk,
  input  logic                                 en,
  input  logic                                 we,
  input  logic                                 re,
  input  logic                                 clr,
  input  logic [$clog2(ENTRIES)-1:0]           waddr,
  input  logic [DW_P-1:0]                      wdata,
  input  logic [$clog2(ENTRIES*DW_P/RW)-1:0]   raddr,
  output logic [RW-1:0]                        rdata
);
  localparam int unsigned PER_WORD = RW / DW_P;

  logic [DW_P-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (en && clr) begin
      for (int i = 0; i < int'(ENTRIES); i++) mem[i] <= '0;
    end else if (en && we) begin
      mem[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (en && re)
      for (int k = 0; k < int'(PER_WORD); k++)
        rdata[k*DW_P +: DW_P] = mem[int'(raddr) * PER_WORD + k];
  end

endmodule
