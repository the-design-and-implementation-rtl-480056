// fir_simple_taps: multiplier-free products for the "simple" coefficients.
//
// The first coefficients of the filter, h(0..3) = 0, -1, -2, 4, are zero or a
// signed power of two, so their products with the pre-added samples need no
// multiplier and no look-up table: the product is the sample shifted left by
// log2|c| and, for a negative coefficient, sign-inverted (one's complement
// plus one). A zero coefficient gives a constant zero product. The shift
// amount and sign of each coefficient are worked out at elaboration; a
// coefficient that is not zero or +/-2^m stops elaboration.
//
// Timing: the products are registered when in_valid is high and prod_valid
// follows one cycle later, in step with the load of the DA look-up stage.
// Applying 0, -1, -2, 4 by shifting and sign inversion follows the filter
// description; the generic power-of-two check and the register are this
// design's choice.
module fir_simple_taps #(
  parameter int unsigned N      = fir_pkg::N_SIMPLE,
  parameter int unsigned IN_W   = fir_pkg::SUM_W,
  parameter int unsigned PROD_W = fir_pkg::PROD_W,
  parameter int          COEF [N] = fir_pkg::COEF_SIMPLE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [IN_W-1:0]   in_sums [N],
  input  logic                     in_valid,
  output logic signed [PROD_W-1:0] prod [N],
  output logic                     prod_valid
);

  // log2 of |c| for c = +/-2^m
  function automatic int unsigned shift_of(input int c);
    int unsigned a = (c < 0) ? -c : c;
    int unsigned s = 0;
    while (a > 1) begin
      a = a >> 1;
      s++;
    end
    return s;
  endfunction

  function automatic bit is_simple(input int c);
    int unsigned a = (c < 0) ? -c : c;
    return (a & (a - 1)) == 0;
  endfunction

  logic signed [PROD_W-1:0] p [N];

  for (genvar k = 0; k < N; k++) begin : g_tap
    localparam int          C  = COEF[k];
    localparam int unsigned SH = shift_of(C);
    if (!is_simple(C)) begin : g_bad
      $error("fir_simple_taps: coefficient %0d is not 0 or a signed power of two", C);
    end
    if (C == 0) begin : g_zero
      assign p[k] = '0;
    end else if (C < 0) begin : g_neg
      assign p[k] = ~(PROD_W'(in_sums[k]) <<< SH) + 1'b1;
    end else begin : g_pos
      assign p[k] = PROD_W'(in_sums[k]) <<< SH;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) prod[k] <= '0;
      prod_valid <= 1'b0;
    end else begin
      prod_valid <= in_valid;
      if (in_valid)
        for (int k = 0; k < N; k++) prod[k] <= p[k];
    end
  end

endmodule
