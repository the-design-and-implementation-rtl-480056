// fir_da_rom: one distributed-arithmetic look-up table.
//
// For N coefficients c[0..N-1] the table has 2^N words; word a holds the sum
// of the coefficients whose address bit is set:
//   rom[a] = sum_{i : a[i] = 1} c[i]
// Address bit i is one bit of the i-th pre-added sample, so one read gives
// the contribution of one bit position of all N samples. The contents are
// computed from the COEF parameter at elaboration, so a new coefficient set
// needs no new table file. The read is combinational (an FPGA LUT).
// The table follows the usual DA construction named in the filter
// description; computing it at elaboration is this design's choice.
module fir_da_rom #(
  parameter int unsigned N     = fir_pkg::N_GEN,
  parameter int unsigned LUT_W = fir_pkg::LUT_W,
  parameter int          COEF [N] = fir_pkg::COEF_GEN
) (
  input  logic [N-1:0]             addr,
  output logic signed [LUT_W-1:0]  data
);

  typedef logic signed [LUT_W-1:0] word_t;

  function automatic word_t entry(input int unsigned a);
    int s = 0;
    for (int i = 0; i < N; i++)
      if (a[i]) s += COEF[i];
    return word_t'(s);
  endfunction

  word_t rom [2**N];

  always_comb begin
    for (int a = 0; a < 2**N; a++) rom[a] = entry(a);
    data = rom[addr];
  end

endmodule
