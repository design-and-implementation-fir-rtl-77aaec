// da_lut: distributed-arithmetic look-up table for four taps.
//
// Address bit i carries the current bit of tap i's sample. Word a of the
// 16-word table is the sum of the coefficients whose address bit is set,
// sum_i a[i]*COEF[i], so one read replaces four one-bit multiplications and
// their additions. The table is worked out from COEF at elaboration; the
// read is combinational, as in an FPGA distributed ROM. The output is
// COEF_W+2 bits, enough for a sum of four coefficients.
// The four-input, 16-word partition follows the filter description.
module da_lut
#(
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] COEF [4] = '{default: '0}
) (
  input  logic [3:0]                addr,
  output logic signed [COEF_W+1:0]  data
);

  typedef logic signed [COEF_W+1:0] word_t;
  typedef word_t rom_t [16];

  function automatic rom_t make_rom();
    rom_t r;
    for (int a = 0; a < 16; a++) begin
      r[a] = '0;
      for (int i = 0; i < 4; i++)
        if (a[i]) r[a] = r[a] + (COEF_W+2)'(COEF[i]);
    end
    return r;
  endfunction

  localparam rom_t ROM = make_rom();

  assign data = ROM[addr];

endmodule
