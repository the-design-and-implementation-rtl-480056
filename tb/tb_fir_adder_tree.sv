// tb_fir_adder_tree: checks that fir_adder_tree outputs
// da_sum + p[0] + p[1] + p[2] + p[3] two clocks after in_valid, with inputs
// presented every clock or with gaps, including the extreme values.
module tb_fir_adder_tree;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [17:0] da_sum = '0;
  logic signed [11:0] prod [4];
  logic in_valid = 1'b0;
  logic signed [17:0] y;
  logic out_valid;
  int checks = 0, failures = 0;
  int exp_q [$];

  fir_adder_tree dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected out_valid");
    end else begin
      e = exp_q.pop_front();
      if (int'(y) != e) begin failures++; $display("FAIL y got %0d expected %0d", y, e); end
    end
  end

  initial begin
    for (int k = 0; k < 4; k++) prod[k] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 800; n++) begin
      @(posedge clk);
      #1;
      in_valid = ($urandom_range(3) != 0);
      if (n % 9 == 0) begin
        da_sum = 18'(64000);
        for (int k = 0; k < 4; k++) prod[k] = 12'(450);
      end else if (n % 9 == 1) begin
        da_sum = -18'(64000);
        for (int k = 0; k < 4; k++) prod[k] = -12'(512);
      end else begin
        da_sum = 18'(int'($urandom_range(128000)) - 64000);
        for (int k = 0; k < 4; k++) prod[k] = 12'(int'($urandom_range(1000)) - 500);
      end
      if (in_valid) exp_q.push_back(int'(da_sum) + int'(prod[0]) + int'(prod[1]) + int'(prod[2]) + int'(prod[3]));
    end
    @(posedge clk) #1 in_valid = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
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
