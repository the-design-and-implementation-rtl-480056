// tb_fir_input: checks the delay line and handshake of fir_input.
// Random samples are offered with random valid; a queue model of the last 16
// accepted samples is compared with all taps after every accept. Also checked:
// taps_valid pulses once per accepted sample, in_ready is low exactly in the
// cycle after an accept (two-clock cool-down), and taps hold without valid.
module tb_fir_input;
  localparam int TAPS = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [7:0] in_data = '0;
  logic signed [7:0] taps [TAPS];
  logic taps_valid;
  int checks = 0, failures = 0;

  fir_input dut (.*);
  always #5 clk = ~clk;

  int model [TAPS];
  bit accepted_last = 1'b0;

  always @(posedge clk) if (rst_n) begin
    // state seen in this cycle, before the edge updates it
    checks++;
    if (in_ready != !accepted_last) begin
      failures++; $display("FAIL in_ready=%0b after accept=%0b", in_ready, accepted_last);
    end
    checks++;
    if (taps_valid != accepted_last) begin
      failures++; $display("FAIL taps_valid=%0b", taps_valid);
    end
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (taps[k] != 8'(model[k])) begin
        failures++; $display("FAIL tap %0d got %0d expected %0d", k, taps[k], model[k]);
      end
    end
    accepted_last = in_valid && in_ready;
    if (accepted_last) begin
      for (int k = TAPS-1; k > 0; k--) model[k] = model[k-1];
      model[0] = in_data;
    end
  end

  initial begin
    for (int k = 0; k < TAPS; k++) model[k] = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      in_data  = 8'($urandom);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (3) @(posedge clk);
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
