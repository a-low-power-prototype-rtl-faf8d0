// dwt_pkg: types and constants shared by the 3-D DWT processor.
//
// The processor works on 16-bit samples and coefficients that travel as
// 64-bit words of four lanes (lane 0 in bits 15:0). A block of input data is
// eight such words (32 samples). Each of the two filters produces sixteen
// 16-bit outputs per block, numbered 0..15: 0-7 in the first 1-D pass, 8-11 in
// the second and 12-15 in the third. The controller runs 25 numbered states
// (0..24), one per clock, and hands the datapath one ctl_t per cycle.
// The sizes follow the published prototype; the control struct layout and the
// encodings are this design's own.
package dwt_pkg;

  localparam int unsigned DW         = 16;           // sample / coefficient width
  localparam int unsigned LANES      = 4;            // 16-bit lanes per word = filter taps
  localparam int unsigned WORD_W     = DW * LANES;   // 64-bit memory / bus word
  localparam int unsigned IN_WORDS   = 8;            // INRAM depth (words per block)
  localparam int unsigned RES_ENTRIES = 16;          // LRAM / HRAM depth (16-bit entries)
  localparam int unsigned RES_WORDS  = RES_ENTRIES / LANES;
  localparam int unsigned NSETS      = 3;            // coefficient registers R0..R2
  localparam int unsigned NSTATES    = 25;           // controller states 0..24

  typedef logic [DW-1:0]     sample_t;
  typedef logic [WORD_W-1:0] word_t;

  // Which memory drives the shared 64-bit read bus.
  typedef enum logic [1:0] {
    SRC_NONE  = 2'd0,
    SRC_INRAM = 2'd1,
    SRC_LRAM  = 2'd2,
    SRC_HRAM  = 2'd3
  } src_e;

  // Control word produced by the controller for the current state.
  typedef struct packed {
    logic                         coef_load;   // state 0: load R0..R2 of both coefficient modules
    logic                         res_clear;   // state 0: clear LRAM and HRAM
    logic                         blk_req;     // states 1-8: ask off-chip memory for a block word
    logic                         in_we;       // states 1-8: write INRAM
    logic [$clog2(IN_WORDS)-1:0]  in_waddr;    // INRAM word written
    src_e                         rd_src;      // memory read onto the bus
    logic [$clog2(IN_WORDS)-1:0]  rd_addr;     // word address read (INRAM, or LRAM/HRAM low bits)
    logic                         rd_rot;      // rotate the bus word by two lanes (third pass)
    logic [1:0]                   coef_sel;    // coefficient register of the current pass
    logic                         res_we;      // write both filter outputs
    logic [$clog2(RES_ENTRIES)-1:0] res_waddr; // output number 0..15
  } ctl_t;

  // Rotate a word by two lanes: lanes {0,1,2,3} -> {2,3,0,1}.
  function automatic word_t rot2(input word_t w);
    return {w[2*DW-1:0], w[WORD_W-1:2*DW]};
  endfunction

endpackage
