// da_fir: serial distributed-arithmetic (SDA) FIR filter.
//
// y[n] = sum_k h[k] * x[n-k] without multipliers. Writing each sample in
// two's complement, y[n] = sum_b 2^b * (sum_k h[k]*bit_b(x[n-k])) with the
// sign-bit weight negative. The inner sum depends only on the NTAPS bits
// bit_b(x[n-k]), so it is read from tables: the taps are split into groups
// of four, each group addressing a 16-word LUT of coefficient sums, and the
// LUT outputs are added. The bit-serial shift register presents bit b of
// every delayed sample in clock b, and the scaling accumulator weights and
// adds the NTAPS/4-LUT sum of each bit. One output takes DATA_W clocks
// regardless of NTAPS: more taps cost more LUTs, not more time.
//
// Interface: in_valid/in_ready handshake; a continuous stream is accepted
// every DATA_W clocks, the next sample loading during the last bit of the
// current one. out_valid pulses for one clock with out_sample. Latency: a
// sample accepted at edge t gives its output at edge t+DATA_W+1.
// The shift register, the four-input LUTs and the accumulator follow the
// filter description; the handshake, the adder tree over the LUT outputs and
// the zero reset of the delay line are this design's choices. NTAPS must be
// a multiple of 4.
module da_fir
#(
  parameter int NTAPS  = fir_pkg::NTAPS,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int OUT_W  = fir_pkg::OUT_W,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = fir_pkg::H_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_sample,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_sample
);

  localparam int NLUT  = NTAPS / 4;
  localparam int LUT_W = COEF_W + 2;
  localparam int SUM_W = LUT_W + $clog2(NLUT) + 1;
  localparam int SW    = (DATA_W > 1) ? $clog2(DATA_W) : 1;

  logic                    load, busy, first, last;
  logic [SW-1:0]           step;
  logic [NTAPS-1:0]        taps;
  logic signed [LUT_W-1:0] lut_out [NLUT];
  logic signed [SUM_W-1:0] lut_sum;

  tap_sequencer #(.STEPS(DATA_W)) u_seq (
    .clk, .rst, .in_valid, .in_ready, .load, .busy, .step, .first, .last
  );

  da_shift_reg #(.NTAPS(NTAPS), .DATA_W(DATA_W)) u_sr (
    .clk, .rst,
    .shift(busy),
    .load (load),
    .din  (in_sample),
    .taps (taps)
  );

  for (genvar g = 0; g < NLUT; g++) begin : g_lut
    da_lut #(.COEF_W(COEF_W), .COEF(COEF[4*g +: 4])) u_lut (
      .addr(taps[4*g +: 4]),
      .data(lut_out[g])
    );
  end

  always_comb begin
    lut_sum = '0;
    for (int g = 0; g < NLUT; g++) lut_sum = lut_sum + SUM_W'(lut_out[g]);
  end

  da_accumulator #(.IN_W(SUM_W), .DATA_W(DATA_W), .OUT_W(OUT_W)) u_acc (
    .clk, .rst,
    .en     (busy),
    .first  (first),
    .last   (last),
    .s      (lut_sum),
    .y      (out_sample),
    .y_valid(out_valid)
  );

endmodule
