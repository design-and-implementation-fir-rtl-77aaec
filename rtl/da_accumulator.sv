// da_accumulator: scaling accumulator of the serial distributed-arithmetic filter.
//
// The filter output is y = sum_b 2^b * s_b - 2^(DATA_W-1) * s_(DATA_W-1),
// where s_b is the LUT sum for sample bit b (bits arrive LSB first, the last
// one is the two's complement sign bit). Instead of shifting s_b left by a
// growing amount, the running sum is shifted right by one place per bit and
// every s_b enters at the fixed weight 2^(DATA_W-1):
//   acc_b = acc_(b-1)/2 + 2^(DATA_W-1) * s_b   (subtracted for the sign bit)
// After DATA_W bits acc equals y exactly: before each halving the running
// sum is a multiple of 2, so no bit is lost. 'first' starts a new sum (the
// old one is not halved but dropped), 'last' subtracts the sign-bit term and
// loads the finished sum into the output register, y_valid pulsing for one
// clock after that edge. Signed samples and the right-shift form are this
// design's reading of 'added with its appropriate shift'.
module da_accumulator
#(
  parameter int IN_W   = fir_pkg::COEF_W + 4,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int OUT_W  = fir_pkg::OUT_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic                    first,
  input  logic                    last,
  input  logic signed [IN_W-1:0]  s,
  output logic signed [OUT_W-1:0] y,
  output logic                    y_valid
);

  // One bit of headroom above the widest running sum (|acc| < 2^(IN_W+DATA_W-1)).
  localparam int ACC_W = IN_W + DATA_W + 1;

  logic signed [ACC_W-1:0] acc, base, term, nxt;

  always_comb begin
    if (first) base = '0;
    else       base = acc >>> 1;
    term = ACC_W'(s) <<< (DATA_W - 1);
    nxt  = last ? base - term : base + term;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en && last;
      if (en) begin
        acc <= nxt;
        if (last) y <= OUT_W'(nxt);
      end
    end
  end

endmodule
