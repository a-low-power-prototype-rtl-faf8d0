// tb_coef_module: self-checking test of the coefficient registers and 3-1 mux.
// Checks the reset value, that all three registers load together on 'load',
// that they hold without 'load', and that sel 0/1/2 pick R0/R1/R2 (sel 3: 0).
module tb_coef_module;
  import dwt_pkg::*;
  logic        clk = 0, rst_n = 0, load = 0;
  word_t       coef_in [NSETS];
  logic [1:0]  sel = 0;
  word_t       coef_out;
  word_t       ref_r [NSETS];
  int checks = 0, failures = 0;

  coef_module dut (.clk, .rst_n, .load, .coef_in, .sel, .coef_out);

  always #5 clk = ~clk;

  task automatic check_all();
    for (int s = 0; s < 4; s++) begin
      sel = 2'(s);
      #1;
      checks++;
      if (coef_out !== ((s < 3) ? ref_r[s] : '0)) begin
        failures++;
        $display("FAIL sel=%0d got %h", s, coef_out);
      end
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (coef_in[i]) coef_in[i] = '0;
    foreach (ref_r[i]) ref_r[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    check_all();
    repeat (20) begin
      @(negedge clk);
      foreach (coef_in[i]) coef_in[i] = {$urandom, $urandom};
      load = 1'($urandom);
      @(posedge clk);
      if (load) foreach (ref_r[i]) ref_r[i] = coef_in[i];
      @(negedge clk);
      load = 0;
      foreach (coef_in[i]) coef_in[i] = {$urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
