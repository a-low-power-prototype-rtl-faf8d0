// tb_lp_adder_cell: exhaustive self-checking test of the 1-bit adder cell.
// All eight input combinations, several times each, against the two-bit
// arithmetic sum a + b + cin.
module tb_lp_adder_cell;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  lp_adder_cell dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int v = 0; v < 8; v++) begin
        logic [1:0] exp;
        {a, b, cin} = 3'(v);
        #1;
        exp = 2'(a) + 2'(b) + 2'(cin);
        checks++;
        if ({cout, sum} !== exp) begin
          failures++;
          $display("FAIL a=%b b=%b cin=%b got %b%b", a, b, cin, cout, sum);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
