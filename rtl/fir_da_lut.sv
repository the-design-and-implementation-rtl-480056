// fir_da_lut: LUT module of the DA FIR filter, looking up four bits at a time
// (4-BAAT).
//
// The products of the N general coefficients with their pre-added samples
// s[0..N-1] are formed by distributed arithmetic. Write each sample as
//   s[i] = -2^M * b_M(i) + sum_{b<M} 2^b * b_b(i)      (M = MAG_W)
// Then sum_i c[i]*s[i] = sum_{b<M} 2^b * LUT(column b) - 2^M * LUT(sign column),
// where "column b" is bit b of all N samples used as a table address.
//
// The samples are loaded into a shift register (the SRL box) when load is
// high: the M magnitude bits go into the SRL, the sign bits into a separate
// register. In each following clock the low BAAT columns of the SRL address
// BAAT copies of the table in parallel, and the SRL shifts right by BAAT, so
// the low nibble is looked up in the first pass and the high nibble in the
// second. The sign column does not take part in the nibble passes; a
// separate table copy reads it and its word is offered with the last pass,
// to be subtracted with weight 2^M by the shift-summation stage.
//
// Outputs per pass (combinational from the registers, valid while
// out_valid is high): col[j] = LUT(column pass*BAAT+j), sign_word,
// pass index, first/last flags. A sample occupies PASSES consecutive clocks
// starting the clock after load. A new load may arrive at the earliest in the
// last pass of the previous sample.
//
// Following the filter description: the 4-BAAT look-up, the SRL holding the
// four pre-added values with the low four bits looked up before the high
// four, and the sign bit kept out of the nibble look-up. Using a fifth table
// copy for the sign column is this design's choice.
//
// The assertion below is disabled during reset by the same rst_n that resets
// the registers asynchronously; lint notes this mixed use, which is harmless
// because the assertion is not hardware.
module fir_da_lut #(
  parameter int unsigned N      = fir_pkg::N_GEN,
  parameter int unsigned SUM_W  = fir_pkg::SUM_W,
  parameter int unsigned BAAT   = fir_pkg::BAAT,
  parameter int unsigned LUT_W  = fir_pkg::LUT_W,
  parameter int          COEF [N] = fir_pkg::COEF_GEN
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [SUM_W-1:0] in_sums [N],
  input  logic                    load,
  output logic signed [LUT_W-1:0] col [BAAT],
  output logic signed [LUT_W-1:0] sign_word,
  output logic [$clog2((SUM_W-1)/BAAT+1)-1:0] pass,
  output logic                    out_valid,
  output logic                    out_first,
  output logic                    out_last
);

  localparam int unsigned M      = SUM_W - 1;
  localparam int unsigned PASSES = M / BAAT;

  if (M % BAAT != 0) begin : g_bad
    $error("fir_da_lut: magnitude width %0d is not a multiple of BAAT %0d", M, BAAT);
  end

  logic [M-1:0] srl  [N];   // magnitude bits, shifted right BAAT per pass
  logic [N-1:0] sign_q;     // sign column
  logic         active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) srl[i] <= '0;
      sign_q <= '0;
      active <= 1'b0;
      pass   <= '0;
    end else if (load) begin
      for (int i = 0; i < N; i++) begin
        srl[i]    <= in_sums[i][M-1:0];
        sign_q[i] <= in_sums[i][M];
      end
      active <= 1'b1;
      pass   <= '0;
    end else if (active) begin
      for (int i = 0; i < N; i++) srl[i] <= srl[i] >> BAAT;
      if (out_last) active <= 1'b0;
      else          pass   <= pass + 1'b1;
    end
  end

  assign out_valid = active;
  assign out_first = active && (pass == '0);
  assign out_last  = active && (pass == $bits(pass)'(PASSES - 1));

  // BAAT table copies, one per bit column of the current nibble
  for (genvar j = 0; j < BAAT; j++) begin : g_col
    logic [N-1:0] addr;
    always_comb for (int i = 0; i < N; i++) addr[i] = srl[i][j];
    fir_da_rom #(.N(N), .LUT_W(LUT_W), .COEF(COEF)) u_rom (.addr(addr), .data(col[j]));
  end

  // table copy for the sign column
  fir_da_rom #(.N(N), .LUT_W(LUT_W), .COEF(COEF)) u_sign_rom (.addr(sign_q), .data(sign_word));

  // a new sample may only be loaded once the previous one reaches its last pass
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (!active || out_last));

endmodule
