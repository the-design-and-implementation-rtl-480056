// tb_fir_da_lut: checks the 4-bits-at-a-time look-up stage.
// Random 9-bit pre-added samples (and full-scale ones) are loaded; in the two
// following clocks every column word col[j] must equal the sum of the
// coefficients 21, 49, 80, 100 whose sample has bit (4*pass+j) set, worked out
// here from the bits directly. The sign word must be the same sum over the
// sign bits, and pass/first/last/valid must step 0,1 and then go idle.
// Loads are issued back to back (in the last pass) and with gaps. Finally the
// words are recombined with their bit weights and compared with sum c[i]*s[i].
module tb_fir_da_lut;
  localparam int C [4] = '{21, 49, 80, 100};

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [8:0] in_sums [4];
  logic load = 1'b0;
  logic signed [9:0] col [4];
  logic signed [9:0] sign_word;
  logic [1:0] pass;
  logic out_valid, out_first, out_last;
  int checks = 0, failures = 0;

  fir_da_lut dut (.*);
  always #5 clk = ~clk;

  function automatic int colsum(input int s [4], input int b);
    int r = 0;
    for (int i = 0; i < 4; i++) if ((s[i] >> b) & 1) r += C[i];
    return r;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int s [4];
    for (int i = 0; i < 4; i++) in_sums[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    check(!out_valid, "idle after reset");
    for (int n = 0; n < 400; n++) begin
      int recon, ref_sum;
      for (int i = 0; i < 4; i++) begin
        case (n % 6)
          0: s[i] = -256;
          1: s[i] = 254;
          default: s[i] = int'($urandom_range(510)) - 256;
        endcase
        in_sums[i] = 9'(s[i]);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int i = 0; i < 4; i++) in_sums[i] = 9'($urandom);  // must not matter
      recon = 0;
      for (int p = 0; p < 2; p++) begin
        check(out_valid && pass == 2'(p) && out_first == (p == 0) && out_last == (p == 1),
              $sformatf("flags in pass %0d", p));
        for (int j = 0; j < 4; j++) begin
          check(int'(col[j]) == colsum(s, 4*p + j),
                $sformatf("col %0d pass %0d got %0d expected %0d", j, p, col[j], colsum(s, 4*p+j)));
          recon += int'(col[j]) << (4*p + j);
        end
        if (p == 1) begin
          check(int'(sign_word) == colsum(s, 8), "sign word");
          recon -= int'(sign_word) << 8;
          // back-to-back: next sample loads in the last pass
          if (n % 2 == 0) load = 1'b0;
        end
        if (p == 0) @(negedge clk);
      end
      ref_sum = 0;
      for (int i = 0; i < 4; i++) ref_sum += C[i] * s[i];
      check(recon == ref_sum, $sformatf("recombined %0d expected %0d", recon, ref_sum));
      if (n % 2 == 1) begin
        @(negedge clk);
        check(!out_valid, "idle after last pass");
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
