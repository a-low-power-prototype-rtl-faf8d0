// tb_dwt3d_processor: end-to-end test of the 3-D DWT processor at its default
// sizes.
//
// The testbench plays the off-chip memory: it holds the coefficient words on
// coef_lo_in / coef_hi_in and answers each block request (blk_req, blk_addr)
// with the requested word in the same cycle. For each transform it
//   - checks that done comes exactly 25 cycles after start, with busy high
//     throughout and a start pulse while busy ignored;
//   - compares lo_result / hi_result in every computing state (9..24) with a
//     reference model of the three passes;
//   - reads LRAM and HRAM back through the read-out port and compares all 16
//     entries of each.
// The first transform is a hand-worked case (all-ones block, low-pass taps
// 1,1,1,1, high-pass taps 1,-1,1,-1 in every pass: final low-pass outputs
// 32,32,0,0, all high-pass outputs 0); the rest use random data and
// coefficients. Each mechanism of the design is counted and must occur:
// coefficient load, result clear, block-word loads, each of the three passes,
// third-pass rotated reads, reads of each memory onto the bus, ignored
// start, and read-out.
module tb_dwt3d_processor;
  import dwt_pkg::*;

  localparam int NRUNS = 20;

  logic       clk = 0, rst_n = 0, start = 0;
  word_t      coef_lo_in [NSETS], coef_hi_in [NSETS];
  logic       blk_req;
  logic [2:0] blk_addr;
  word_t      blk_data;
  logic       busy, done;
  logic [4:0] state;
  sample_t    lo_result, hi_result;
  logic       rd_sel = 0;
  logic [1:0] rd_addr = 0;
  word_t      rd_data;

  word_t   blk [IN_WORDS];
  sample_t exp_l [RES_ENTRIES], exp_h [RES_ENTRIES];

  int checks = 0, failures = 0;
  int n_coef = 0, n_clear = 0, n_blk = 0, n_p1 = 0, n_p2 = 0, n_p3 = 0, n_rot = 0;
  int n_rd_in = 0, n_rd_l = 0, n_rd_h = 0, n_ignored = 0, n_readout = 0;

  dwt3d_processor dut (
    .clk, .rst_n, .start, .coef_lo_in, .coef_hi_in,
    .blk_req, .blk_addr, .blk_data, .busy, .done, .state,
    .lo_result, .hi_result, .rd_sel, .rd_addr, .rd_data
  );

  always #5 clk = ~clk;

  // Off-chip memory: same-cycle answer.
  always_comb blk_data = blk_req ? blk[blk_addr] : '0;

  // ---------------- reference model ----------------
  function automatic sample_t filt(word_t d, word_t c);
    sample_t acc = '0;
    for (int i = 0; i < 4; i++) begin
      logic signed [31:0] pr;
      pr  = 32'(signed'(d[i*16 +: 16])) * 32'(signed'(c[(3-i)*16 +: 16]));
      acc = acc + pr[15:0];
    end
    return acc;
  endfunction

  function automatic word_t pack4(sample_t e0, sample_t e1, sample_t e2, sample_t e3);
    return {e3, e2, e1, e0};
  endfunction

  task automatic model();
    word_t w;
    for (int k = 0; k < 8; k++) begin
      exp_l[k] = filt(blk[k], coef_lo_in[0]);
      exp_h[k] = filt(blk[k], coef_hi_in[0]);
    end
    // Second pass: the four first-pass words L0-3, L4-7, H0-3, H4-7.
    for (int k = 0; k < 4; k++) begin
      int b = 4 * (k % 2);
      w = (k < 2) ? pack4(exp_l[b], exp_l[b+1], exp_l[b+2], exp_l[b+3])
                  : pack4(exp_h[b], exp_h[b+1], exp_h[b+2], exp_h[b+3]);
      exp_l[8+k] = filt(w, coef_lo_in[1]);
      exp_h[8+k] = filt(w, coef_hi_in[1]);
    end
    // Third pass: entries 8-11 of L then H, each as (8,9,10,11) and (10,11,8,9).
    for (int k = 0; k < 4; k++) begin
      sample_t v [4];
      for (int i = 0; i < 4; i++) v[i] = (k < 2) ? exp_l[8+i] : exp_h[8+i];
      w = (k % 2 == 0) ? pack4(v[0], v[1], v[2], v[3]) : pack4(v[2], v[3], v[0], v[1]);
      exp_l[12+k] = filt(w, coef_lo_in[2]);
      exp_h[12+k] = filt(w, coef_hi_in[2]);
    end
  endtask

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Mechanism counters, sampled on every clock.
  always @(posedge clk) if (rst_n) begin
    if (dut.ctl.coef_load) n_coef++;
    if (dut.ctl.res_clear) n_clear++;
    if (blk_req) n_blk++;
    if (dut.ctl.res_we && dut.ctl.coef_sel == 0) n_p1++;
    if (dut.ctl.res_we && dut.ctl.coef_sel == 1) n_p2++;
    if (dut.ctl.res_we && dut.ctl.coef_sel == 2) n_p3++;
    if (dut.ctl.rd_rot) n_rot++;
    if (busy && dut.ctl.rd_src == SRC_INRAM) n_rd_in++;
    if (busy && dut.ctl.rd_src == SRC_LRAM) n_rd_l++;
    if (busy && dut.ctl.rd_src == SRC_HRAM) n_rd_h++;
  end

  task automatic run_one(bit poke_start);
    int cycles = 0;
    model();
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    // Now in state 0; walk the 25 states.
    for (int s = 0; s < NSTATES; s++) begin
      cycles++;
      chk(busy && state == 5'(s), $sformatf("state %0d", s));
      if (s >= 9) begin
        chk(lo_result == exp_l[s-9], $sformatf("low-pass output %0d: got %h exp %h", s-9, lo_result, exp_l[s-9]));
        chk(hi_result == exp_h[s-9], $sformatf("high-pass output %0d: got %h exp %h", s-9, hi_result, exp_h[s-9]));
      end
      chk(done == (s == NSTATES - 1), $sformatf("done in state %0d", s));
      if (poke_start && s == 12) begin
        start = 1;
        n_ignored++;
      end
      @(negedge clk);
      start = 0;
    end
    chk(cycles == 25 && !busy, "transform takes 25 cycles");
    // Read-out of every entry.
    for (int m = 0; m < 2; m++)
      for (int w = 0; w < 4; w++) begin
        rd_sel = m[0]; rd_addr = 2'(w);
        #1;
        n_readout++;
        for (int i = 0; i < 4; i++) begin
          sample_t e = (m == 0) ? exp_l[4*w+i] : exp_h[4*w+i];
          chk(rd_data[16*i +: 16] == e, $sformatf("%s entry %0d: got %h exp %h",
              m == 0 ? "LRAM" : "HRAM", 4*w+i, rd_data[16*i +: 16], e));
        end
      end
    chk(!busy, "idle after read-out (no restart from ignored start)");
  endtask

  initial begin
    repeat (NRUNS * 60 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (blk[i]) blk[i] = {4{16'h0001}};
    for (int p = 0; p < 3; p++) begin
      coef_lo_in[p] = {4{16'h0001}};
      coef_hi_in[p] = {16'hFFFF, 16'h0001, 16'hFFFF, 16'h0001};  // c0=1, c1=-1, c2=1, c3=-1
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_one(1'b1);
    // Hand-worked values.
    chk(exp_l[12] == 16'd32 && exp_l[13] == 16'd32 && exp_l[14] == 16'd0 && exp_l[15] == 16'd0,
        "hand-worked low-pass result");
    for (int i = 0; i < 16; i++) chk(exp_h[i] == 16'd0, "hand-worked high-pass result");
    for (int r = 1; r < NRUNS; r++) begin
      foreach (blk[i]) blk[i] = {$urandom, $urandom};
      for (int p = 0; p < 3; p++) begin
        coef_lo_in[p] = {$urandom, $urandom};
        coef_hi_in[p] = {$urandom, $urandom};
      end
      run_one(r % 3 == 0);
    end
    chk(n_coef > 0, "coefficient load happened");
    chk(n_clear > 0, "result clear happened");
    chk(n_blk == 8 * NRUNS, "block word loads");
    chk(n_p1 == 8 * NRUNS, "first-pass outputs");
    chk(n_p2 == 4 * NRUNS, "second-pass outputs");
    chk(n_p3 == 4 * NRUNS, "third-pass outputs");
    chk(n_rot == 2 * NRUNS, "rotated third-pass reads");
    chk(n_rd_in > 0 && n_rd_l > 0 && n_rd_h > 0, "each memory read onto the bus");
    chk(n_ignored > 0, "start while busy exercised");
    chk(n_readout > 0, "read-out exercised");
    $display("mechanisms: coef_load=%0d clear=%0d block_words=%0d pass1=%0d pass2=%0d pass3=%0d rotated=%0d inram_reads=%0d lram_reads=%0d hram_reads=%0d ignored_starts=%0d readouts=%0d",
             n_coef, n_clear, n_blk, n_p1, n_p2, n_p3, n_rot, n_rd_in, n_rd_l, n_rd_h, n_ignored, n_readout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
