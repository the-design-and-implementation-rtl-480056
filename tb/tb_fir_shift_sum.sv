// tb_fir_shift_sum: checks the shift-and-add of fir_shift_sum.
// Random signed column words in -250..250 (the range of a table of four
// 8-bit coefficients, which keeps the result inside 18 bits) are fed for pass 0 and pass 1 (with the
// sign word in pass 1); da_sum must equal
//   sum_p sum_j col[p][j] * 2^(4p+j)  -  sign * 2^8
// one clock after the last pass, with da_valid high for exactly that cycle.
// Samples follow back to back and with idle cycles in between.
module tb_fir_shift_sum;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [9:0] col [4];
  logic signed [9:0] sign_word = '0;
  logic [1:0] pass = '0;
  logic in_valid = 1'b0, in_first = 1'b0, in_last = 1'b0;
  logic signed [17:0] da_sum;
  logic da_valid;
  int checks = 0, failures = 0;

  fir_shift_sum dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < 4; j++) col[j] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int n = 0; n < 500; n++) begin
      int e;
      e = 0;
      for (int p = 0; p < 2; p++) begin
        in_valid = 1'b1;
        pass = 2'(p);
        in_first = (p == 0);
        in_last = (p == 1);
        for (int j = 0; j < 4; j++) begin
          int w;
          w = (n % 5 == 0) ? 250 : int'($urandom_range(500)) - 250;
          col[j] = 10'(w);
          e += w << (4*p + j);
        end
        if (p == 1) begin
          int sw;
          sw = (n % 5 == 0) ? -250 : int'($urandom_range(500)) - 250;
          sign_word = 10'(sw);
          e -= sw << 8;
        end
        @(negedge clk);
        checks++;
        if (da_valid != (p == 1)) begin failures++; $display("FAIL da_valid in pass %0d", p); end
      end
      checks++;
      if (int'(da_sum) != e) begin
        failures++; $display("FAIL da_sum got %0d expected %0d", da_sum, e);
      end
      in_valid = 1'b0; in_first = 1'b0; in_last = 1'b0;
      if (n % 3 == 0) begin
        @(negedge clk);
        checks++;
        if (da_valid) begin failures++; $display("FAIL da_valid while idle"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
