// transposed_fir: fully parallel transposed-form FIR filter.
//
// y[n] = sum_{k=0}^{NTAPS-1} h[k] * x[n-k], one sample in and one result out
// per clock. The input sample goes, without an input register, to NTAPS
// constant coefficient multipliers at once, KCM k holding h[k]. Their
// products feed a chain of registered adders running from the last tap to
// the first: z[NTAPS-1] <= P[NTAPS-1], z[k] <= P[k] + z[k+1], and z[0] is
// the output. Each register is both the delay element and the accumulator
// of the direct form, and the coefficient order is reversed: h[0] sits next
// to the output.
//
// Because all taps see the same sample at the same time, taps whose
// coefficients have the same magnitude can share one multiplier: with
// SHARE_MULT=1 (the default) only the first tap of each magnitude has a KCM,
// and a later tap with the same coefficient reuses its product, or its
// negated product when the coefficient has the opposite sign. For the
// symmetric default set this halves the KCMs (NMULT = 8 of 16). SHARE_MULT=0
// gives every tap its own KCM.
//
// Interface: in_valid may be high every clock; the chain moves only when a
// valid product arrives, so gaps are allowed and do not disturb the sum.
// out_valid/out_sample give y[n]. Latency: 2 clocks in the pipelined KCMs
// plus 1 in the last adder register, i.e. out_valid 3 clocks after in_valid
// (1 with PIPELINED=0).
// The structure and the multiplier sharing follow the filter description;
// the valid signal, the zero reset of the chain and the adder widths are
// this design's choices.
module transposed_fir
#(
  parameter int NTAPS  = fir_pkg::NTAPS,
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter int OUT_W  = fir_pkg::OUT_W,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = fir_pkg::H_DEFAULT,
  parameter bit PIPELINED = 1'b1,
  parameter bit SHARE_MULT = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_sample,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_sample
);

  localparam int P_W = DATA_W + COEF_W;

  typedef int tap_map_t [NTAPS];

  // OWNER[k]: the tap whose KCM produces tap k's product (k itself when it
  // has its own KCM); NEG[k]: tap k uses the negated product.
  function automatic tap_map_t find_owner();
    tap_map_t o;
    for (int k = 0; k < NTAPS; k++) begin
      o[k] = k;
      if (SHARE_MULT)
        for (int j = k - 1; j >= 0; j--)
          if (int'(COEF[j]) == int'(COEF[k]) || int'(COEF[j]) == -int'(COEF[k])) o[k] = o[j];
    end
    return o;
  endfunction

  function automatic tap_map_t find_neg();
    tap_map_t n;
    tap_map_t o = find_owner();
    for (int k = 0; k < NTAPS; k++) n[k] = (int'(COEF[o[k]]) != int'(COEF[k])) ? 1 : 0;
    return n;
  endfunction

  function automatic int count_mult();
    tap_map_t o = find_owner();
    int c = 0;
    for (int k = 0; k < NTAPS; k++) if (o[k] == k) c++;
    return c;
  endfunction

  localparam tap_map_t OWNER = find_owner();
  localparam tap_map_t NEG   = find_neg();
  localparam int       NMULT = count_mult();   // KCMs actually built

  logic signed [P_W-1:0]   kprod [NTAPS];      // KCM outputs (owner taps only)
  logic signed [OUT_W-1:0] prod  [NTAPS];      // product seen by each tap
  logic [NTAPS-1:0]        kvalid;
  logic signed [OUT_W-1:0] z     [NTAPS];

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    if (OWNER[k] == k) begin : g_kcm
      kcm #(.DATA_W(DATA_W), .COEF_W(COEF_W), .COEF(COEF[k]), .PIPELINED(PIPELINED)) u_kcm (
        .clk, .rst,
        .in_valid (in_valid),
        .x        (in_sample),
        .out_valid(kvalid[k]),
        .p        (kprod[k])
      );
      assign prod[k] = OUT_W'(kprod[k]);
    end else begin : g_shared
      assign kvalid[k] = kvalid[OWNER[k]];
      assign kprod[k]  = kprod[OWNER[k]];
      if (NEG[k] != 0) begin : g_neg
        assign prod[k] = -OUT_W'(kprod[OWNER[k]]);
      end else begin : g_pos
        assign prod[k] = OUT_W'(kprod[OWNER[k]]);
      end
    end
  end

  // Cascaded registered adders; all KCMs share one latency, so kvalid[0]
  // stands for all of them.
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < NTAPS; k++) z[k] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= kvalid[0];
      if (kvalid[0]) begin
        z[NTAPS-1] <= prod[NTAPS-1];
        for (int k = 0; k < NTAPS - 1; k++) z[k] <= prod[k] + z[k+1];
      end
    end
  end

  assign out_sample = z[0];

`ifndef SYNTHESIS
  // Every KCM has the same latency, so all product valids agree.
  a_valid_aligned: assert property (@(posedge clk) disable iff (rst) kvalid == '0 || kvalid == '1)
    else $error("transposed_fir: product valids disagree");
`endif

endmodule
