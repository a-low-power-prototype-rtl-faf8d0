// tb_inram: self-checking test of the 8 x 64-bit input cache.
// Writes random words at random addresses, compares asynchronous reads with a
// reference array, checks the zero output when not reading or not enabled,
// that a write without 'en' is ignored, and that clear empties every word.
module tb_inram;
  logic        clk = 0, en = 0, we = 0, re = 0, clr = 0;
  logic [2:0]  addr = 0;
  logic [63:0] wdata = 0, rdata;
  logic [63:0] ref_m [8];
  int checks = 0, failures = 0;

  inram dut (.clk, .en, .we, .re, .clr, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic expect_rd(logic [63:0] exp, string what);
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr=%0d got %h exp %h", what, addr, rdata, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    en = 1; clr = 1;
    @(negedge clk);
    clr = 0;
    foreach (ref_m[i]) ref_m[i] = '0;
    for (int i = 0; i < 8; i++) begin
      addr = 3'(i); re = 1; expect_rd(64'd0, "after clear");
    end
    re = 0;
    repeat (400) begin
      @(negedge clk);
      en = ($urandom % 8) != 0; we = 1'($urandom); re = 0;
      addr = 3'($urandom); wdata = {$urandom, $urandom};
      @(posedge clk);
      if (en && we) ref_m[addr] = wdata;
      @(negedge clk);
      we = 0;
      en = 1; re = 1; addr = 3'($urandom);
      expect_rd(ref_m[addr], "read");
      re = 0; expect_rd(64'd0, "idle output");
      re = 1; en = 0; expect_rd(64'd0, "disabled output");
    end
    @(negedge clk);
    en = 1; clr = 1; we = 1;
    @(negedge clk);
    clr = 0; we = 0; re = 1;
    for (int i = 0; i < 8; i++) begin
      addr = 3'(i); expect_rd(64'd0, "clear over write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
