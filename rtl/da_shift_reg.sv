// da_shift_reg: the bit-serial delay line of the distributed-arithmetic filter.
//
// NTAPS words of DATA_W bits form one long shift register. Each 'shift'
// moves every word right by one bit; the bit leaving the bottom of word k
// enters the top of word k+1, and the bit leaving the last word is dropped.
// taps[k] is the bottom bit of word k, so during the DATA_W shifts of one
// sample the LUTs see bit 0, 1, ... DATA_W-1 of x[n-k] on address line k.
// After DATA_W shifts word k holds what word k-1 held: the whole line has
// moved one sample. Word 0 is then empty and 'load' fills it with the next
// sample in parallel. 'load' may come with the last shift (word 0 is loaded
// while the others complete their shift) or on its own while the line is
// idle (only word 0 changes). Only word 0 is ever loaded in parallel.
// Reset clears the line. The register itself follows the filter
// description; overlapping the load with the last shift is this design's
// choice.
module da_shift_reg
#(
  parameter int NTAPS  = fir_pkg::NTAPS,
  parameter int DATA_W = fir_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              shift,
  input  logic              load,
  input  logic [DATA_W-1:0] din,
  output logic [NTAPS-1:0]  taps
);

  logic [DATA_W-1:0] w [NTAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) w[k] <= '0;
    end else begin
      if (load)       w[0] <= din;
      else if (shift) w[0] <= {1'b0, w[0][DATA_W-1:1]};
      if (shift)
        for (int k = 1; k < NTAPS; k++) w[k] <= {w[k-1][0], w[k][DATA_W-1:1]};
    end
  end

  always_comb
    for (int k = 0; k < NTAPS; k++) taps[k] = w[k][0];

endmodule
