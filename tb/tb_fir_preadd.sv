// tb_fir_preadd: checks that fir_preadd registers s[k] = x(n-k) + x(n-15+k)
// for the eight coefficient pairs, with sign extension, one clock after
// taps_valid, and holds the sums while taps_valid is low. Full-scale values
// (-128+-128, 127+127) are included.
module tb_fir_preadd;
  localparam int TAPS = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [7:0] taps [TAPS];
  logic taps_valid = 1'b0;
  logic signed [8:0] sums [TAPS/2];
  logic sums_valid;
  int checks = 0, failures = 0;
  int expd [TAPS/2];

  fir_preadd dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int k = 0; k < TAPS; k++) taps[k] = '0;
    for (int k = 0; k < TAPS/2; k++) expd[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 500; n++) begin
      bit v;
      @(negedge clk);
      v = ($urandom_range(1) == 1);
      taps_valid = v;
      for (int k = 0; k < TAPS; k++) begin
        int x;
        case (n % 5)
          0: x = -128;
          1: x = 127;
          default: x = int'($urandom_range(255)) - 128;
        endcase
        taps[k] = 8'(x);
      end
      if (v) for (int k = 0; k < TAPS/2; k++) expd[k] = int'(taps[k]) + int'(taps[TAPS-1-k]);
      @(negedge clk);
      taps_valid = 1'b0;
      checks++;
      if (sums_valid != v) begin failures++; $display("FAIL sums_valid"); end
      for (int k = 0; k < TAPS/2; k++) begin
        checks++;
        if (int'(sums[k]) != expd[k]) begin
          failures++; $display("FAIL s[%0d] got %0d expected %0d", k, sums[k], expd[k]);
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
