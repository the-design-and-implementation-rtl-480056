// fir_da_top: 16-tap linear-phase low-pass FIR filter using improved
// distributed arithmetic (DA).
//
//   y(n) = sum_{k=0}^{15} h(k) x(n-k),  h = 0,-1,-2,4,21,49,80,100,100,80,...,0
//
// Five stages, in this order:
//   fir_input        delay line of 16 samples, valid/ready handshake
//   fir_preadd       s[k] = x(n-k) + x(n-15+k) for the eight coefficient pairs
//   fir_simple_taps  s[0..3] times 0,-1,-2,4 by shift and sign inversion
//   fir_da_lut       s[4..7] times 21,49,80,100 by 4-bits-at-a-time look-up
//                    (two passes: low nibble, high nibble; sign column apart)
//   fir_shift_sum    weights and accumulates the look-up words
//   fir_adder_tree   adds the DA sum and the simple-tap products into y(n)
// The simple-tap products are computed as soon as the pre-added samples are
// there and wait in prod_hold until the DA sum of the same sample is ready.
//
// Interface: in_valid/in_ready/in_data take 8-bit two's-complement samples,
// at most one every two clocks (in_ready drops for one cycle after each
// sample). out_valid pulses for one cycle with the 18-bit full-precision y(n).
// Latency from the accepting clock edge to out_valid is 7 clocks:
// delay line 1, pre-add 1, LUT load 1, two LUT passes, adder tree 2.
// The sample rate of the target application (10 MHz on a 100 MHz clock)
// leaves ten clocks per sample.
//
// The assertion below is disabled during reset by the same rst_n that resets
// the registers asynchronously; lint notes this mixed use, which is harmless
// because the assertion is not hardware.
module fir_da_top
  import fir_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  logic signed [DATA_W-1:0] taps [TAPS];
  logic                     taps_valid;
  logic signed [SUM_W-1:0]  sums [HALF];
  logic                     sums_valid;
  logic signed [SUM_W-1:0]  sums_simple [N_SIMPLE];
  logic signed [SUM_W-1:0]  sums_gen    [N_GEN];
  logic signed [PROD_W-1:0] prod [N_SIMPLE];
  logic signed [PROD_W-1:0] prod_hold [N_SIMPLE];
  logic                     prod_valid;
  logic signed [LUT_W-1:0]  col [BAAT];
  logic signed [LUT_W-1:0]  sign_word;
  logic [$clog2(PASSES+1)-1:0] pass;
  logic                     lut_valid, lut_first, lut_last;
  logic signed [ACC_W-1:0]  da_sum;
  logic                     da_valid;

  fir_input #(.TAPS(TAPS), .DATA_W(DATA_W), .PASSES(PASSES)) u_input (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .taps, .taps_valid);

  fir_preadd #(.TAPS(TAPS), .DATA_W(DATA_W)) u_preadd (
    .clk, .rst_n, .taps, .taps_valid, .sums, .sums_valid);

  always_comb begin
    for (int k = 0; k < N_SIMPLE; k++) sums_simple[k] = sums[k];
    for (int k = 0; k < N_GEN; k++)    sums_gen[k]    = sums[N_SIMPLE + k];
  end

  fir_simple_taps #(.N(N_SIMPLE), .IN_W(SUM_W), .PROD_W(PROD_W), .COEF(COEF_SIMPLE)) u_simple (
    .clk, .rst_n, .in_sums(sums_simple), .in_valid(sums_valid), .prod, .prod_valid);

  fir_da_lut #(.N(N_GEN), .SUM_W(SUM_W), .BAAT(BAAT), .LUT_W(LUT_W), .COEF(COEF_GEN)) u_lut (
    .clk, .rst_n, .in_sums(sums_gen), .load(sums_valid), .col, .sign_word, .pass,
    .out_valid(lut_valid), .out_first(lut_first), .out_last(lut_last));

  fir_shift_sum #(.BAAT(BAAT), .PASSES(PASSES), .LUT_W(LUT_W), .ACC_W(ACC_W)) u_shift_sum (
    .clk, .rst_n, .col, .sign_word, .pass, .in_valid(lut_valid), .in_first(lut_first),
    .in_last(lut_last), .da_sum, .da_valid);

  // hold the simple-tap products until the DA sum of the same sample is done
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_SIMPLE; k++) prod_hold[k] <= '0;
    end else if (lut_valid && lut_last) begin
      for (int k = 0; k < N_SIMPLE; k++) prod_hold[k] <= prod[k];
    end
  end

  fir_adder_tree #(.N(N_SIMPLE), .PROD_W(PROD_W), .ACC_W(ACC_W), .OUT_W(OUT_W)) u_tree (
    .clk, .rst_n, .da_sum, .prod(prod_hold), .in_valid(da_valid), .y(out_data), .out_valid);

  // the simple-tap products of a sample are ready when its first LUT pass runs
  a_prod_ready: assert property (@(posedge clk) disable iff (!rst_n)
    lut_first |-> prod_valid);

endmodule
