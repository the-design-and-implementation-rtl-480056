// fir_preadd: pre-addition module of the DA FIR filter.
//
// A linear-phase filter has h(k) = h(TAPS-1-k), so the two samples that meet
// the same coefficient are added first and each coefficient is applied once:
//   sums[k] = x(n-k) + x(n-(TAPS-1-k)),   k = 0 .. TAPS/2-1
// Each sum is one bit wider than a sample so that it cannot overflow. The
// sums are registered when taps_valid is high; sums_valid follows one cycle
// later and the sums hold their value until the next sample.
// Pre-adding the symmetric pairs is part of the filter description; the
// register after the adders and the 9-bit width are this design's choice.
module fir_preadd #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] taps [TAPS],
  input  logic                     taps_valid,
  output logic signed [DATA_W:0]   sums [TAPS/2],
  output logic                     sums_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS/2; k++) sums[k] <= '0;
      sums_valid <= 1'b0;
    end else begin
      sums_valid <= taps_valid;
      if (taps_valid)
        for (int k = 0; k < TAPS/2; k++)
          sums[k] <= (DATA_W+1)'(taps[k]) + (DATA_W+1)'(taps[TAPS-1-k]);
    end
  end

endmodule
