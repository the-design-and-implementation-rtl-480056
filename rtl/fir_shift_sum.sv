// fir_shift_sum: shift-summation module of the DA FIR filter.
//
// Combines the look-up results of the 4-BAAT stage into the sum of products
// of the general coefficients. In each pass the BAAT column words are
// weighted by their bit position inside the nibble,
//   partial = sum_j col[j] * 2^j,
// and the partial is added to the accumulator with weight 2^(BAAT*pass).
// With the last pass the sign-column word is subtracted with weight
// 2^(BAAT*PASSES), the weight of the sign bit of the pre-added samples.
// All weights are left shifts; there is no multiplier.
//
// Timing: one pass per clock while in_valid is high; da_sum is registered at
// the end of the last pass and da_valid is high for one cycle after it.
// The stage itself follows the filter description; the accumulator form, the
// sign-column subtraction and the 18-bit width are this design's choice.
module fir_shift_sum #(
  parameter int unsigned BAAT   = fir_pkg::BAAT,
  parameter int unsigned PASSES = fir_pkg::PASSES,
  parameter int unsigned LUT_W  = fir_pkg::LUT_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W,
  parameter int unsigned PW     = $clog2(PASSES + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [LUT_W-1:0] col [BAAT],
  input  logic signed [LUT_W-1:0] sign_word,
  input  logic [PW-1:0]           pass,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic                    in_last,
  output logic signed [ACC_W-1:0] da_sum,
  output logic                    da_valid
);

  logic signed [ACC_W-1:0] acc, partial, acc_next, sign_term;

  always_comb begin
    partial = '0;
    for (int j = 0; j < BAAT; j++)
      partial += ACC_W'(col[j]) <<< j;
    acc_next  = (in_first ? '0 : acc) + (partial <<< (BAAT * pass));
    sign_term = ACC_W'(sign_word) <<< (BAAT * PASSES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      da_sum   <= '0;
      da_valid <= 1'b0;
    end else begin
      da_valid <= in_valid && in_last;
      if (in_valid) acc <= acc_next;
      if (in_valid && in_last) da_sum <= acc_next - sign_term;
    end
  end

endmodule
