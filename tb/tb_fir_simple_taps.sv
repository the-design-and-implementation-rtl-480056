// tb_fir_simple_taps: checks the shift/sign-inversion products of
// fir_simple_taps for the coefficients 0, -1, -2, 4 against plain
// multiplication, over random and full-scale 9-bit pre-added samples, one
// clock after in_valid, and that products hold while in_valid is low.
module tb_fir_simple_taps;
  localparam int C [4] = '{0, -1, -2, 4};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [8:0] in_sums [4];
  logic in_valid = 1'b0;
  logic signed [11:0] prod [4];
  logic prod_valid;
  int checks = 0, failures = 0;
  int expd [4];

  fir_simple_taps dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < 4; k++) begin in_sums[k] = '0; expd[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 600; n++) begin
      bit v;
      @(negedge clk);
      v = (n % 4 != 3);
      in_valid = v;
      for (int k = 0; k < 4; k++) begin
        int s;
        case (n % 7)
          0: s = -256;
          1: s = 254;
          default: s = int'($urandom_range(510)) - 256;
        endcase
        in_sums[k] = 9'(s);
        if (v) expd[k] = C[k] * s;
      end
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (prod_valid != v) begin failures++; $display("FAIL prod_valid"); end
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (int'(prod[k]) != expd[k]) begin
          failures++; $display("FAIL p[%0d] got %0d expected %0d", k, prod[k], expd[k]);
        end
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
