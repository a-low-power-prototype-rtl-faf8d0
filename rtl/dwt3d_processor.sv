// dwt3d_processor: a single-filter-pair processor for a 3-D discrete wavelet
// transform of one small data block.
//
// One low-pass and one high-pass 4-tap filter are time-shared over the three
// 1-D passes of the transform under a central 25-state controller. A block of
// 32 16-bit samples (eight 64-bit words) is loaded from off-chip memory into
// INRAM; each pass reads 64-bit words from INRAM, LRAM or HRAM over one shared
// bus, feeds the same word to both filters, and writes the low-pass output to
// LRAM and the high-pass output to HRAM. The coefficient module of each filter
// supplies that filter's four coefficients for the current pass.
//
// Timing: pulse 'start' while idle. The next 25 cycles are states 0..24:
//   state 0     coef_lo_in / coef_hi_in are sampled (all three passes);
//   states 1-8  blk_req is high and blk_addr names the block word; blk_data
//               must carry that word in the same cycle;
//   states 9-24 one low-pass and one high-pass output per cycle, shown on
//               lo_result / hi_result and stored as outputs 0..15;
//   state 24    done is high.
// While idle, rd_data shows word rd_addr (entries 4*rd_addr..+3) of LRAM
// (rd_sel = 0) or HRAM (rd_sel = 1). The final outputs of the third pass are
// entries 12-15 of each; entries 0-11 hold the first- and second-pass outputs.
//
// The block structure (controller, two coefficient modules, two filters,
// INRAM, LRAM, HRAM, a 64-bit bus) and the state schedule follow the
// document. The read-out port, the same-cycle off-chip handshake and the
// third-pass word rotation on the bus are this design's own choices.
module dwt3d_processor
  import dwt_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  word_t                       coef_lo_in [NSETS],
  input  word_t                       coef_hi_in [NSETS],
  output logic                        blk_req,
  output logic [$clog2(IN_WORDS)-1:0] blk_addr,
  input  word_t                       blk_data,
  output logic                        busy,
  output logic                        done,
  output logic [4:0]                  state,
  output sample_t                     lo_result,
  output sample_t                     hi_result,
  input  logic                        rd_sel,
  input  logic [$clog2(RES_WORDS)-1:0] rd_addr,
  output word_t                       rd_data
);
  ctl_t  ctl;
  word_t coef_lo, coef_hi;
  word_t in_q, l_q, h_q, bus_raw, bus;

  logic                          l_re, h_re, in_re, in_en, l_en, h_en;
  logic [$clog2(RES_WORDS)-1:0]  res_raddr;
  logic [$clog2(IN_WORDS)-1:0]   in_addr;

  controller u_ctrl (
    .clk, .rst_n, .start,
    .ctl, .busy, .done, .state
  );

  coef_module u_coef_lo (
    .clk, .rst_n, .load(ctl.coef_load), .coef_in(coef_lo_in),
    .sel(ctl.coef_sel), .coef_out(coef_lo)
  );

  coef_module u_coef_hi (
    .clk, .rst_n, .load(ctl.coef_load), .coef_in(coef_hi_in),
    .sel(ctl.coef_sel), .coef_out(coef_hi)
  );

  // Memory access: the controller while busy, the read-out port while idle.
  assign in_re     = (ctl.rd_src == SRC_INRAM);
  assign in_addr   = ctl.in_we ? ctl.in_waddr : ctl.rd_addr;
  assign in_en     = ctl.in_we | in_re;
  assign l_re      = busy ? (ctl.rd_src == SRC_LRAM) : !rd_sel;
  assign h_re      = busy ? (ctl.rd_src == SRC_HRAM) :  rd_sel;
  assign res_raddr = busy ? ctl.rd_addr[$clog2(RES_WORDS)-1:0] : rd_addr;
  assign l_en      = l_re | ctl.res_we | ctl.res_clear;
  assign h_en      = h_re | ctl.res_we | ctl.res_clear;

  inram u_inram (
    .clk, .en(in_en), .we(ctl.in_we), .re(in_re), .clr(1'b0),
    .addr(in_addr), .wdata(blk_data), .rdata(in_q)
  );

  lh_ram u_lram (
    .clk, .en(l_en), .we(ctl.res_we), .re(l_re), .clr(ctl.res_clear),
    .waddr(ctl.res_waddr), .wdata(lo_result), .raddr(res_raddr), .rdata(l_q)
  );

  lh_ram u_hram (
    .clk, .en(h_en), .we(ctl.res_we), .re(h_re), .clr(ctl.res_clear),
    .waddr(ctl.res_waddr), .wdata(hi_result), .raddr(res_raddr), .rdata(h_q)
  );

  // Shared 64-bit bus: only one memory is read at a time, the others give 0.
  assign bus_raw = in_q | l_q | h_q;
  assign bus     = ctl.rd_rot ? rot2(bus_raw) : bus_raw;

  dwt_filter u_lpf (.data_word(bus), .coef_word(coef_lo), .result(lo_result));
  dwt_filter u_hpf (.data_word(bus), .coef_word(coef_hi), .result(hi_result));

  assign blk_req  = ctl.blk_req;
  assign blk_addr = ctl.in_waddr;
  assign rd_data  = busy ? '0 : bus_raw;

  // At most one memory drives the bus.
  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({in_re, l_re, h_re}));

endmodule
