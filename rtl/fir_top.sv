// fir_top: three hardware realisations of the same 16-tap FIR filter.
//
// The filter is y[n] = sum_{k=0}^{15} h[k] * x[n-k] with 16-bit signed
// samples and coefficients and a full-precision 36-bit result. Three
// architectures compute it with different trade-offs between area and rate,
// and stand side by side here, each with its own ports and sharing only the
// clock and reset:
//   mac_*  serial direct form with one multiply-accumulate engine: one tap
//          per clock, a new sample every 16 clocks (rate = f_clk / taps),
//          coefficients reloadable through a FIFO;
//   tf_*   fully parallel transposed form with constant coefficient
//          multipliers: a new sample every clock, latency 3;
//   da_*   serial distributed arithmetic: LUTs instead of multipliers, one
//          sample bit per clock, a new sample every 16 clocks whatever the
//          number of taps (rate = f_clk / sample bits).
// All three reset to an all-zero delay line, so fed with the same samples
// they produce the same outputs. The clock manager that the transposed
// filter is paired with on the original FPGA is not part of this RTL; every
// filter runs from clk.
module fir_top #(
  parameter int NTAPS  = fir_pkg::NTAPS,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int OUT_W  = fir_pkg::OUT_W,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = fir_pkg::H_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  // serial MAC filter
  input  logic                     mac_in_valid,
  output logic                     mac_in_ready,
  input  logic signed [DATA_W-1:0] mac_in_sample,
  input  logic                     mac_coef_wr,
  input  logic signed [COEF_W-1:0] mac_coef_in,
  output logic                     mac_out_valid,
  output logic signed [OUT_W-1:0]  mac_out_sample,
  // parallel transposed filter
  input  logic                     tf_in_valid,
  input  logic signed [DATA_W-1:0] tf_in_sample,
  output logic                     tf_out_valid,
  output logic signed [OUT_W-1:0]  tf_out_sample,
  // serial distributed-arithmetic filter
  input  logic                     da_in_valid,
  output logic                     da_in_ready,
  input  logic signed [DATA_W-1:0] da_in_sample,
  output logic                     da_out_valid,
  output logic signed [OUT_W-1:0]  da_out_sample
);

  mac_fir #(.NTAPS(NTAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .COEF(COEF)) u_mac (
    .clk, .rst,
    .in_valid  (mac_in_valid),
    .in_ready  (mac_in_ready),
    .in_sample (mac_in_sample),
    .coef_wr   (mac_coef_wr),
    .coef_in   (mac_coef_in),
    .out_valid (mac_out_valid),
    .out_sample(mac_out_sample)
  );

  transposed_fir #(.NTAPS(NTAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .COEF(COEF)) u_tf (
    .clk, .rst,
    .in_valid  (tf_in_valid),
    .in_sample (tf_in_sample),
    .out_valid (tf_out_valid),
    .out_sample(tf_out_sample)
  );

  da_fir #(.NTAPS(NTAPS), .DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W), .COEF(COEF)) u_da (
    .clk, .rst,
    .in_valid  (da_in_valid),
    .in_ready  (da_in_ready),
    .in_sample (da_in_sample),
    .out_valid (da_out_valid),
    .out_sample(da_out_sample)
  );

endmodule
