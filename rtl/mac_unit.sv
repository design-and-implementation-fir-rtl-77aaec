// mac_unit: multiply-accumulate engine of the serial MAC filter.
//
// Each enabled cycle multiplies the sample x by the coefficient h with the
// two-variable multiplier and adds the product to the accumulator through a
// carry-lookahead adder. On the first tap of a sum the accumulator does not
// add but reloads with the product itself, so a new sum starts without the
// idle clock a clear would cost. On the last tap the output register
// captures accumulator + product, the finished sum, before the accumulator
// is reloaded by the next sum; y_valid pulses for one cycle after that edge.
// With first and last both high (a one-tap filter) y is just the product.
// This reload-and-capture scheme follows the filter description; widths and
// the y_valid pulse are this design's choices.
module mac_unit
#(
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int OUT_W  = fir_pkg::OUT_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic                     first,
  input  logic                     last,
  input  logic signed [DATA_W-1:0] x,
  input  logic signed [COEF_W-1:0] h,
  output logic signed [OUT_W-1:0]  y,
  output logic                     y_valid
);

  logic signed [DATA_W+COEF_W-1:0] prod;
  logic signed [OUT_W-1:0]         acc, addend, sum;

  tcam_mult #(.A_W(DATA_W), .B_W(COEF_W)) u_mult (.a(x), .b(h), .p(prod));

  // On the first tap the adder sees zero instead of the old sum.
  assign addend = first ? '0 : acc;

  cla_adder #(.W(OUT_W)) u_add (
    .a   (addend),
    .b   (OUT_W'(prod)),
    .cin (1'b0),
    .sum (sum),
    .cout()
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en && last;
      if (en) begin
        acc <= sum;
        if (last) y <= sum;
      end
    end
  end

endmodule
