// mac_fir: serial direct-form FIR filter built around one MAC engine.
//
// y[n] = sum_{k=0}^{NTAPS-1} h[k] * x[n-k], computed one tap per clock.
// An accepted sample is shifted into a NTAPS-word delay line (x[n] in word 0,
// x[n-k] in word k). The tap sequencer then steps k = 0..NTAPS-1; in step k a
// multiplexer picks word k, the coefficient FIFO presents h[k], and the MAC
// engine accumulates their product, the FIFO rotating one place per step.
// The engine reloads its accumulator on step 0 and captures the sum on the
// last step, so the filter takes one sample and gives one output every NTAPS
// clocks with no gap: its sample rate is the clock rate divided by the
// number of taps.
//
// Interface: in_valid/in_ready handshake for samples; coef_wr/coef_in shift
// a new coefficient into the FIFO (taken only while idle, NTAPS writes give a
// new set, first written = h[0]); out_valid pulses for one clock with
// out_sample. Latency: a sample accepted at edge t gives its output at edge
// t+NTAPS+1 (out_valid high in the cycle after it).
// The structure (shift register, single MAC, coefficient FIFO) follows the
// filter description; the handshake, the tap multiplexer, the reset to a zero
// delay line and the coefficient reload rule are this design's choices.
module mac_fir
#(
  parameter int NTAPS  = fir_pkg::NTAPS,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int OUT_W  = fir_pkg::OUT_W,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = fir_pkg::H_DEFAULT,
  localparam int SW = (NTAPS > 1) ? $clog2(NTAPS) : 1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_sample,
  input  logic                     coef_wr,
  input  logic signed [COEF_W-1:0] coef_in,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_sample
);

  logic                     load, busy, first, last;
  logic [SW-1:0]            step;
  logic signed [DATA_W-1:0] dline [NTAPS];
  logic signed [DATA_W-1:0] x_tap;
  logic signed [COEF_W-1:0] h_tap;

  tap_sequencer #(.STEPS(NTAPS)) u_seq (
    .clk, .rst, .in_valid, .in_ready, .load, .busy, .step, .first, .last
  );

  // Sample delay line.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) dline[k] <= '0;
    end else if (load) begin
      dline[0] <= in_sample;
      for (int k = 1; k < NTAPS; k++) dline[k] <= dline[k-1];
    end
  end

  assign x_tap = dline[step];

  coef_fifo #(.NTAPS(NTAPS), .COEF_W(COEF_W), .COEF(COEF)) u_coef (
    .clk, .rst,
    .rotate (busy),
    .wr     (coef_wr && !busy),
    .wr_data(coef_in),
    .head   (h_tap)
  );

  mac_unit #(.DATA_W(DATA_W), .COEF_W(COEF_W), .OUT_W(OUT_W)) u_mac (
    .clk, .rst,
    .en     (busy),
    .first  (first),
    .last   (last),
    .x      (x_tap),
    .h      (h_tap),
    .y      (out_sample),
    .y_valid(out_valid)
  );

endmodule
