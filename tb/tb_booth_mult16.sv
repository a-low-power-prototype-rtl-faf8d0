// tb_booth_mult16: self-checking test of the radix-4 Booth multiplier.
// Compares the 32-bit product with the signed product of the operands for
// corner values (most negative, -1, 0, 1, most positive) and random pairs.
module tb_booth_mult16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;

  booth_mult16 dut (.a, .b, .p);

  task automatic check();
    logic signed [31:0] exp;
    #1;
    exp = 32'(signed'(a)) * 32'(signed'(b));
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got %h exp %h", a, b, p, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [7] = '{16'h8000, 16'hFFFF, 16'h0000, 16'h0001, 16'h7FFF, 16'h5555, 16'hAAAA};
    foreach (corners[i]) foreach (corners[j]) begin
      a = corners[i]; b = corners[j]; check();
    end
    repeat (5000) begin
      a = 16'($urandom); b = 16'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
