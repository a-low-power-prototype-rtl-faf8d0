// tb_lh_ram: self-checking test of the 16 x 16-bit result cache with a
// 64-bit read port. Writes single entries, reads four-entry words (entry
// 4*raddr in bits 15:0) against a reference array, checks the zero output
// when not reading, and the clear.
module tb_lh_ram;
  logic        clk = 0, en = 0, we = 0, re = 0, clr = 0;
  logic [3:0]  waddr = 0;
  logic [15:0] wdata = 0;
  logic [1:0]  raddr = 0;
  logic [63:0] rdata;
  logic [15:0] ref_m [16];
  int checks = 0, failures = 0;

  lh_ram dut (.clk, .en, .we, .re, .clr, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  function automatic logic [63:0] ref_word(int w);
    return {ref_m[4*w+3], ref_m[4*w+2], ref_m[4*w+1], ref_m[4*w]};
  endfunction

  task automatic expect_rd(logic [63:0] exp, string what);
    #1;
    checks++;
    if (rdata !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s raddr=%0d got %h exp %h", what, raddr, rdata, exp);
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
    // Fill in order with distinct values, then read every word.
    for (int i = 0; i < 16; i++) begin
      we = 1; waddr = 4'(i); wdata = 16'(16'h1000 + i * 16'h0111);
      @(posedge clk); ref_m[i] = wdata;
      @(negedge clk);
    end
    we = 0; re = 1;
    for (int w = 0; w < 4; w++) begin
      raddr = 2'(w); expect_rd(ref_word(w), "ordered");
    end
    repeat (400) begin
      @(negedge clk);
      en = ($urandom % 8) != 0; we = 1'($urandom); re = 0;
      waddr = 4'($urandom); wdata = 16'($urandom);
      @(posedge clk);
      if (en && we) ref_m[waddr] = wdata;
      @(negedge clk);
      we = 0; en = 1; re = 1; raddr = 2'($urandom);
      expect_rd(ref_word(raddr), "read");
      re = 0; expect_rd(64'd0, "idle output");
    end
    @(negedge clk);
    en = 1; clr = 1;
    @(negedge clk);
    clr = 0; re = 1;
    for (int w = 0; w < 4; w++) begin
      raddr = 2'(w); expect_rd(64'd0, "after clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
