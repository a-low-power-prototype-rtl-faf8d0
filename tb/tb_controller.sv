// tb_controller: self-checking test of the 25-state controller.
// Starts two transforms (plus a start pulse while busy, which must be
// ignored) and, for every cycle, compares the control word with a table
// written from the state schedule: coefficient load and clear in state 0,
// block loads in states 1-8, and the read source, word, rotation, coefficient
// register and output number of states 9-24. Also checks that done comes
// exactly 25 cycles after the start and that busy spans those 25 cycles.
module tb_controller;
  import dwt_pkg::*;
  logic       clk = 0, rst_n = 0, start = 0;
  ctl_t       ctl;
  logic       busy, done;
  logic [4:0] state;
  int checks = 0, failures = 0;

  controller dut (.clk, .rst_n, .start, .ctl, .busy, .done, .state);

  always #5 clk = ~clk;

  function automatic ctl_t expected(int s);
    ctl_t c = '0;
    c.rd_src = SRC_NONE;
    if (s == 0) begin
      c.coef_load = 1; c.res_clear = 1;
    end else if (s <= 8) begin
      c.blk_req = 1; c.in_we = 1; c.in_waddr = 3'(s - 1);
    end else if (s <= 16) begin
      c.rd_src = SRC_INRAM; c.rd_addr = 3'(s - 9); c.coef_sel = 0;
      c.res_we = 1; c.res_waddr = 4'(s - 9);
    end else if (s <= 20) begin
      c.rd_src = (s <= 18) ? SRC_LRAM : SRC_HRAM; c.rd_addr = 3'((s - 17) % 2);
      c.coef_sel = 1; c.res_we = 1; c.res_waddr = 4'(s - 9);
    end else begin
      c.rd_src = (s <= 22) ? SRC_LRAM : SRC_HRAM; c.rd_addr = 3'd2;
      c.rd_rot = ((s - 21) % 2) == 1;
      c.coef_sel = 2; c.res_we = 1; c.res_waddr = 4'(s - 9);
    end
    return c;
  endfunction

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && !done && ctl == '0, "idle outputs");
    for (int run = 0; run < 2; run++) begin
      start = 1;
      @(negedge clk);
      start = 0;
      for (int s = 0; s < 25; s++) begin
        chk(busy, "busy during run");
        chk(state == 5'(s), $sformatf("state number %0d", s));
        chk(ctl == expected(s), $sformatf("control word in state %0d", s));
        chk(done == (s == 24), $sformatf("done in state %0d", s));
        if (s == 5) start = 1;     // ignored while busy
        @(negedge clk);
        start = 0;
      end
      chk(!busy && !done, "idle after 25 cycles");
      repeat (3) @(negedge clk);
      chk(!busy, "stays idle without start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
