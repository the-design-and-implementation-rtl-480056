// fir_input: input module of the DA FIR filter.
//
// Accepts one signed sample per valid/ready handshake and shifts it into a
// TAPS-deep delay line, so that taps[k] holds x(n-k) after the sample x(n)
// has been taken (taps[0] is the newest sample). taps_valid pulses for one
// cycle after every accepted sample; the delay line holds its contents
// otherwise and is cleared by reset.
//
// Rate: the LUT stage needs PASSES clocks per sample (two for the 8-bit,
// 4-bits-at-a-time design), so after accepting a sample in_ready is low for
// PASSES-1 cycles. At the 10 MHz sample rate on a 100 MHz clock the source
// never sees in_ready low. The handshake and this cool-down are a choice of
// this design; the filter description only says the module accepts the
// sampled data and feeds the pre-addition stage.
module fir_input #(
  parameter int unsigned TAPS   = fir_pkg::TAPS,
  parameter int unsigned DATA_W = fir_pkg::DATA_W,
  parameter int unsigned PASSES = fir_pkg::PASSES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_data,
  output logic signed [DATA_W-1:0] taps [TAPS],
  output logic                     taps_valid
);

  localparam int unsigned CW = (PASSES > 1) ? $clog2(PASSES) : 1;

  logic [CW-1:0] cool;   // cycles left before the next sample may be taken
  logic          accept;

  assign in_ready = (cool == '0);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
      taps_valid <= 1'b0;
      cool       <= '0;
    end else begin
      taps_valid <= accept;
      if (accept) begin
        taps[0] <= in_data;
        for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
        cool <= CW'(PASSES - 1);
      end else if (cool != '0) begin
        cool <= cool - 1'b1;
      end
    end
  end

endmodule
