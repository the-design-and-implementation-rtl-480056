// fir_adder_tree: adder-tree module of the DA FIR filter.
//
// Adds the DA sum of the general coefficients and the N simple-tap products
// into the filter output y(n). The terms are added pairwise in a two-level
// tree with a register after each level:
//   level 1: p[0]+p[1], p[2]+p[3], da_sum   (registered)
//   level 2: sum of the three               (registered, y)
// Latency is two clocks from in_valid to out_valid; a new set of terms may
// be presented every clock. The tree is written for the four simple taps of
// this filter (N = 4). Output width OUT_W holds the full-precision result.
// The adder-tree stage is part of the filter description; its shape, the two
// register levels and the 18-bit full-precision output are this design's
// choice.
module fir_adder_tree #(
  parameter int unsigned N      = fir_pkg::N_SIMPLE,
  parameter int unsigned PROD_W = fir_pkg::PROD_W,
  parameter int unsigned ACC_W  = fir_pkg::ACC_W,
  parameter int unsigned OUT_W  = fir_pkg::OUT_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [ACC_W-1:0]  da_sum,
  input  logic signed [PROD_W-1:0] prod [N],
  input  logic                     in_valid,
  output logic signed [OUT_W-1:0]  y,
  output logic                     out_valid
);

  if (N != 4) begin : g_bad
    $error("fir_adder_tree: written for four simple-tap products, got %0d", N);
  end

  logic signed [OUT_W-1:0] l1_a, l1_b, l1_c;
  logic                    l1_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_a <= '0; l1_b <= '0; l1_c <= '0;
      l1_valid  <= 1'b0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      l1_valid  <= in_valid;
      out_valid <= l1_valid;
      if (in_valid) begin
        l1_a <= OUT_W'(prod[0]) + OUT_W'(prod[1]);
        l1_b <= OUT_W'(prod[2]) + OUT_W'(prod[3]);
        l1_c <= OUT_W'(da_sum);
      end
      if (l1_valid) y <= l1_a + l1_b + l1_c;
    end
  end

endmodule
