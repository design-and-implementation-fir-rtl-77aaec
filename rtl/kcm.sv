// kcm: constant coefficient multiplier, p = COEF * x.
//
// One operand is a constant, so the multiplier is a set of small ROMs. The
// DATA_W-bit sample is cut into 4-bit digits; digit d addresses a 16-word
// table holding COEF times the digit's value, 0..15 for the lower digits
// and -8..7 for the top (sign) digit. The partial products, weighted by
// 16^d, are summed by a two-level adder tree: first neighbouring digit pairs,
// then the pair sums. With PIPELINED=1 a register follows each level (latency
// 2 clocks, one product per clock); with PIPELINED=0 the multiplier is purely
// combinational (latency 0). out_valid follows in_valid with the same
// latency. The tables are worked out from COEF at elaboration.
// The digit tables and the adder that combines them follow the filter
// description; the exact pairing and register placement of the pipelined
// version are this design's reading of it. DATA_W must be a multiple of 4
// and at least 8.
module kcm
#(
  parameter int DATA_W = fir_pkg::DATA_W,
  parameter int COEF_W = fir_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] COEF = 16'sd1,
  parameter bit PIPELINED = 1'b1
) (
  input  logic                            clk,
  input  logic                            rst,
  input  logic                            in_valid,
  input  logic signed [DATA_W-1:0]        x,
  output logic                            out_valid,
  output logic signed [DATA_W+COEF_W-1:0] p
);

  localparam int ND  = DATA_W / 4;       // number of digits
  localparam int NP  = (ND + 1) / 2;     // number of digit pairs
  localparam int PPW = COEF_W + 5;       // digit partial product width
  localparam int P_W = DATA_W + COEF_W;

  typedef logic signed [PPW-1:0] pp_t;
  typedef pp_t rom_t [16];

  // Table for an unsigned digit (0..15) or the signed top digit (-8..7).
  function automatic rom_t make_rom(input bit is_signed);
    rom_t r;
    for (int a = 0; a < 16; a++) begin
      int v;
      v = (is_signed && a >= 8) ? a - 16 : a;
      r[a] = PPW'(COEF * v);
    end
    return r;
  endfunction

  localparam rom_t ROM_U = make_rom(1'b0);
  localparam rom_t ROM_S = make_rom(1'b1);

  pp_t                  pp       [ND];   // partial product of each digit
  logic signed [P_W-1:0] pair_c  [NP];   // first adder level
  logic signed [P_W-1:0] pair_q  [NP];
  logic signed [P_W-1:0] total_c;        // second adder level
  logic                  v1;

  always_comb begin
    for (int d = 0; d < ND; d++)
      pp[d] = (d == ND - 1) ? ROM_S[x[4*d +: 4]] : ROM_U[x[4*d +: 4]];
    for (int i = 0; i < NP; i++) begin
      if (2*i + 1 < ND)
        pair_c[i] = P_W'(pp[2*i]) + (P_W'(pp[2*i+1]) <<< 4);
      else
        pair_c[i] = P_W'(pp[2*i]);
    end
  end

  always_comb begin
    total_c = '0;
    for (int i = 0; i < NP; i++) total_c = total_c + (pair_q[i] <<< (8*i));
  end

  if (PIPELINED) begin : g_pipe
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < NP; i++) pair_q[i] <= '0;
        p         <= '0;
        v1        <= 1'b0;
        out_valid <= 1'b0;
      end else begin
        pair_q    <= pair_c;
        v1        <= in_valid;
        p         <= total_c;
        out_valid <= v1;
      end
    end
  end else begin : g_comb
    always_comb begin
      pair_q    = pair_c;
      v1        = in_valid;
      p         = total_c;
      out_valid = v1;
    end
  end

endmodule
