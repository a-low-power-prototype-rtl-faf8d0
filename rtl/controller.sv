// controller: central state machine of the 3-D DWT processor.
//
// After 'start' (sampled while idle) it steps through 25 numbered states, one
// per clock, then returns to idle:
//   state 0      load the coefficient registers of both filters; clear the
//                result memories
//   states 1-8   request block word s-1 from off-chip memory and write it to
//                INRAM word s-1
//   states 9-16  first pass (coefficients R0): filter INRAM word s-9, store
//                the two outputs 0..7 in LRAM/HRAM entry s-9
//   states 17-20 second pass (R1): filter LRAM word 0, LRAM word 1, HRAM word
//                0, HRAM word 1; outputs 8..11
//   states 21-24 third pass (R2): filter LRAM word 2 (entries 8-11) as stored
//                and rotated by two lanes, then HRAM word 2 the same way;
//                outputs 12..15
// Outputs are combinational decodes of the state register: ctl (the datapath
// control word), busy (a state 0..24 is active), done (state 24, one cycle)
// and the state number. A whole transform takes exactly 25 cycles.
//
// From the document: the 25 states, their grouping and the number of outputs
// per pass. Own choices: the idle state and start input, which memory word
// each computing state reads, the two-lane rotation in the third pass and the
// clear in state 0.
module controller
  import dwt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output ctl_t       ctl,
  output logic       busy,
  output logic       done,
  output logic [4:0] state
);
  typedef enum logic [2:0] {
    PH_IDLE, PH_COEF, PH_LOAD, PH_PASS1, PH_PASS2, PH_PASS3
  } phase_e;

  logic       running;
  logic [4:0] s;        // state number 0..24 while running
  phase_e     phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      s       <= '0;
    end else if (!running) begin
      if (start) begin
        running <= 1'b1;
        s       <= '0;
      end
    end else if (s == 5'(NSTATES - 1)) begin
      running <= 1'b0;
      s       <= '0;
    end else begin
      s <= s + 5'd1;
    end
  end

  always_comb begin
    if (!running)     phase = PH_IDLE;
    else if (s == 0)  phase = PH_COEF;
    else if (s <= 8)  phase = PH_LOAD;
    else if (s <= 16) phase = PH_PASS1;
    else if (s <= 20) phase = PH_PASS2;
    else              phase = PH_PASS3;
  end

  always_comb begin
    logic [3:0] k;
    ctl = '0;
    ctl.rd_src = SRC_NONE;
    k = '0;
    unique case (phase)
      PH_COEF: begin
        ctl.coef_load = 1'b1;
        ctl.res_clear = 1'b1;
      end
      PH_LOAD: begin
        k = 4'(s - 5'd1);
        ctl.blk_req  = 1'b1;
        ctl.in_we    = 1'b1;
        ctl.in_waddr = k[2:0];
      end
      PH_PASS1: begin
        k = 4'(s - 5'd9);
        ctl.rd_src    = SRC_INRAM;
        ctl.rd_addr   = k[2:0];
        ctl.coef_sel  = 2'd0;
        ctl.res_we    = 1'b1;
        ctl.res_waddr = k;
      end
      PH_PASS2: begin
        k = 4'(s - 5'd17);
        ctl.rd_src    = k[1] ? SRC_HRAM : SRC_LRAM;
        ctl.rd_addr   = {2'b00, k[0]};
        ctl.coef_sel  = 2'd1;
        ctl.res_we    = 1'b1;
        ctl.res_waddr = 4'd8 + k;
      end
      PH_PASS3: begin
        k = 4'(s - 5'd21);
        ctl.rd_src    = k[1] ? SRC_HRAM : SRC_LRAM;
        ctl.rd_addr   = 3'd2;
        ctl.rd_rot    = k[0];
        ctl.coef_sel  = 2'd2;
        ctl.res_we    = 1'b1;
        ctl.res_waddr = 4'd12 + k;
      end
      default: ;
    endcase
  end

  assign busy  = running;
  assign done  = running && (s == 5'(NSTATES - 1));
  assign state = s;

endmodule
