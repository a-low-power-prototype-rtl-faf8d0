// tb_dwt_filter: self-checking test of the 4-tap filter tree.
// For random sample and coefficient words, and for single-tap impulses that
// expose the tap order, the expected result is
//   sum over i of low16( signed(sample[i]) * signed(coef[3-i]) )  mod 2^16.
module tb_dwt_filter;
  logic [63:0] data_word, coef_word;
  logic [15:0] result;
  int checks = 0, failures = 0;

  dwt_filter dut (.data_word, .coef_word, .result);

  function automatic logic [15:0] model(logic [63:0] d, logic [63:0] c);
    logic [15:0] acc = '0;
    for (int i = 0; i < 4; i++) begin
      logic signed [31:0] pr;
      pr  = 32'(signed'(d[i*16 +: 16])) * 32'(signed'(c[(3-i)*16 +: 16]));
      acc = acc + pr[15:0];
    end
    return acc;
  endfunction

  task automatic check();
    #1;
    checks++;
    if (result !== model(data_word, coef_word)) begin
      failures++;
      if (failures < 10) $display("FAIL d=%h c=%h got %h exp %h", data_word, coef_word, result, model(data_word, coef_word));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Impulses: sample lane i = 1, coefficients 1,2,3,4 -> result coef[3-i].
    coef_word = {16'd4, 16'd3, 16'd2, 16'd1};
    for (int i = 0; i < 4; i++) begin
      data_word = 64'(1) << (16 * i);
      check();
      checks++;
      if (result !== 16'(4 - i)) begin
        failures++;
        $display("FAIL tap order lane %0d got %0d", i, result);
      end
    end
    repeat (3000) begin
      data_word = {$urandom, $urandom};
      coef_word = {$urandom, $urandom};
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
