// tcam_mult: two-variable signed multiplier (both operands are signals).
//
// This is the general-purpose multiplier of the serial MAC filter. It forms
// p = a * b in one clock cycle as an array of partial products: for every bit
// j of b, the sign-extended multiplicand a shifted left by j is added, except
// for the sign bit of b, whose partial product is subtracted (two's complement
// weight -2^(B_W-1)). It is the shift-and-add multiplication written out in
// space rather than in time, so one product is ready per clock as the MAC
// filter's one-tap-per-clock rate needs. Purely combinational; the array
// structure is this design's choice, the filter description only names a
// conventional two-variable multiplier.
module tcam_mult #(
  parameter int A_W = 16,
  parameter int B_W = 16
) (
  input  logic signed [A_W-1:0]     a,
  input  logic signed [B_W-1:0]     b,
  output logic signed [A_W+B_W-1:0] p
);

  localparam int P_W = A_W + B_W;

  logic signed [P_W-1:0] a_ext;
  logic signed [P_W-1:0] acc;

  always_comb begin
    a_ext = P_W'(a);
    acc   = '0;
    for (int j = 0; j < B_W; j++) begin
      if (b[j]) begin
        if (j == B_W - 1) acc = acc - (a_ext <<< j);
        else              acc = acc + (a_ext <<< j);
      end
    end
    p = acc;
  end

endmodule
