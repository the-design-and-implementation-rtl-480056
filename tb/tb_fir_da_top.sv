// tb_fir_da_top: end-to-end test of the 16-tap DA FIR filter at its default
// sizes.
//
// A reference model convolves every accepted sample with the full 16-tap
// impulse response h = 0,-1,-2,4,21,49,80,100,100,80,49,21,4,-2,-1,0 and the
// output stream is compared word by word, together with the 7-clock latency.
// Three phases:
//   1. the application test: a 0.8 MHz tone plus a 5 MHz interferer sampled
//      at 10 MHz, one sample every ten clocks (100 MHz clock). 5 MHz is half
//      the sample rate, where this even-length symmetric filter has an exact
//      zero, so once the delay line is full the output must equal that of
//      the tone alone.
//   2. random samples, including full-scale -128/127 runs, with in_valid held
//      high, so that in_ready back-pressure is exercised.
//   3. random samples with random gaps.
// Mechanisms counted (each must occur): back-pressure, a non-zero sign
// column in the LUT stage, non-zero simple-tap products, interferer
// rejection, near-full-scale output.
module tb_fir_da_top;
  import fir_pkg::*;

  localparam int H [16] = '{0, -1, -2, 4, 21, 49, 80, 100, 100, 80, 49, 21, 4, -2, -1, 0};
  localparam int LATENCY = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic signed [7:0] in_data = '0;
  logic out_valid;
  logic signed [17:0] out_data;

  int checks = 0, failures = 0;
  int cycle = 0;

  fir_da_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // reference model
  int hist [16];       // accepted samples, hist[0] newest
  int hist_tone [16];  // tone-only component (phase 1)
  int exp_q [$];
  int exp_tone_q [$];
  int exp_cyc_q [$];
  int tone_valid_q [$];
  int n_accepted = 0;
  int cur_tone = 0;    // tone-only part of the sample being presented
  bit phase1 = 1'b0;

  // mechanism counters
  int n_backpressure = 0, n_sign_col = 0, n_simple = 0, n_reject = 0, n_fullscale = 0;

  function automatic int conv(input int h [16]);
    int s = 0;
    for (int k = 0; k < 16; k++) s += H[k] * h[k];
    return s;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_backpressure++;
    if (in_valid && in_ready) begin
      for (int k = 15; k > 0; k--) begin
        hist[k] = hist[k-1];
        hist_tone[k] = hist_tone[k-1];
      end
      hist[0] = in_data;
      hist_tone[0] = cur_tone;
      n_accepted++;
      exp_q.push_back(conv(hist));
      exp_tone_q.push_back(conv(hist_tone));
      tone_valid_q.push_back(phase1 ? n_accepted : 0);
      exp_cyc_q.push_back(cycle + LATENCY);
    end
    if (dut.u_lut.out_last && dut.u_lut.sign_q != '0) n_sign_col++;
    if (dut.prod_valid && (dut.prod[1] != '0 || dut.prod[2] != '0 || dut.prod[3] != '0)) n_simple++;
    if (out_valid) begin
      int e, et, ec, tv;
      e = exp_q.pop_front();
      et = exp_tone_q.pop_front();
      ec = exp_cyc_q.pop_front();
      tv = tone_valid_q.pop_front();
      checks++;
      if (out_data != e) begin
        failures++;
        $display("FAIL y: got %0d expected %0d (cycle %0d)", out_data, e, cycle);
      end
      checks++;
      if (cycle != ec) begin
        failures++;
        $display("FAIL latency: out_valid at cycle %0d expected %0d", cycle, ec);
      end
      if (out_data > 60000 || out_data < -60000) n_fullscale++;
      // interferer rejection once the line holds 16 phase-1 samples
      if (tv >= 16) begin
        checks++;
        n_reject++;
        if (out_data != et) begin
          failures++;
          $display("FAIL 5 MHz not rejected: got %0d tone-only %0d", out_data, et);
        end
      end
    end
  end

  task automatic send(input int x, input int tone);
    in_data <= 8'(x);
    cur_tone = tone;
    in_valid <= 1'b1;
    do @(posedge clk); while (!in_ready);
    in_valid <= 1'b0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < 16; k++) begin hist[k] = 0; hist_tone[k] = 0; end
    idle(3);
    rst_n <= 1'b1;
    idle(2);

    // phase 1: 0.8 MHz tone + 5 MHz interferer, fs = 10 MHz, 10 clocks per sample
    phase1 = 1'b1;
    for (int n = 0; n < 200; n++) begin
      int tone, noise;
      tone  = $rtoi($floor(60.0 * $sin(2.0 * 3.14159265358979 * 0.08 * n) + 0.5));
      noise = (n % 2 == 0) ? 60 : -60;
      send(tone + noise, tone);
      idle(9);
    end
    phase1 = 1'b0;
    idle(20);
    for (int k = 0; k < 16; k++) hist_tone[k] = 0;

    // phase 2: back-to-back random and full-scale samples
    in_valid <= 1'b1;
    for (int n = 0; n < 400; n++) begin
      int x;
      if ((n / 40) % 3 == 1)      x = (n % 2 == 0) ? 127 : -128;
      else if ((n / 40) % 3 == 2) x = (((n / 8) % 2) == 0) ? 127 : -128;
      else                        x = int'($urandom_range(255)) - 128;
      in_data <= 8'(x);
      do @(posedge clk); while (!in_ready);
    end
    // full-scale positive / negative runs give the largest outputs
    for (int n = 0; n < 64; n++) begin
      int x;
      x = ((n / 16) % 2 == 0) ? 127 : -128;
      x = (n % 16 == 0 || n % 16 == 15 || n % 16 == 1 || n % 16 == 14 || n % 16 == 2 || n % 16 == 13) ? -x : x;
      in_data <= 8'(x);
      do @(posedge clk); while (!in_ready);
    end
    in_valid <= 1'b0;

    // phase 3: random gaps
    for (int n = 0; n < 300; n++) begin
      send(int'($urandom_range(255)) - 128, 0);
      idle($urandom_range(4));
    end
    idle(20);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("mechanisms: backpressure=%0d sign_column=%0d simple_taps=%0d rejection=%0d fullscale=%0d",
             n_backpressure, n_sign_col, n_simple, n_reject, n_fullscale);
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL no back-pressure"); end
    checks++; if (n_sign_col == 0)     begin failures++; $display("FAIL sign column never used"); end
    checks++; if (n_simple == 0)       begin failures++; $display("FAIL simple taps never used"); end
    checks++; if (n_reject < 100)      begin failures++; $display("FAIL too few rejection checks"); end
    checks++; if (n_fullscale == 0)    begin failures++; $display("FAIL no full-scale output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
