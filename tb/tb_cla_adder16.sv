// tb_cla_adder16: self-checking test of the 16-bit carry look-ahead adder.
// Drives corner cases (all-ones carry chains, zero, alternating patterns) and
// random operands with both carry-in values, and compares sum and carry-out
// with the 17-bit result of the '+' operator.
module tb_cla_adder16;
  logic [15:0] a, b, sum;
  logic        cin, cout;
  int checks = 0, failures = 0;

  cla_adder16 dut (.a, .b, .cin, .sum, .cout);

  task automatic check();
    logic [16:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + {16'b0, cin};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h cin=%b got %b_%h exp %h", a, b, cin, cout, sum, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'hFFFF, 16'h0001, 16'h5555, 16'hAAAA, 16'h8000};
    foreach (corners[i]) foreach (corners[j]) for (int c = 0; c < 2; c++) begin
      a = corners[i]; b = corners[j]; cin = c[0]; check();
    end
    repeat (5000) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
