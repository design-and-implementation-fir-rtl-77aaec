// tb_kcm: checks constant coefficient multipliers for several constants
// (positive, negative, the two extremes, zero) against plain multiplication,
// on random samples offered every clock. The pipelined version must deliver
// each product exactly 2 clocks after its sample, the combinational version
// in the same cycle.
module tb_kcm;
  localparam int NK = 6;
  localparam logic signed [15:0] KS [NK] = '{16'sd25580, -16'sd4498, 16'sd32767, -16'sd32768, 16'sd0, 16'sd1};
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] x = '0;
  logic [NK-1:0]       ov;
  logic signed [31:0]  p  [NK];
  logic                ov_c;
  logic signed [31:0]  p_c;

  for (genvar i = 0; i < NK; i++) begin : g_dut
    kcm #(.COEF(KS[i])) dut (.clk, .rst, .in_valid, .x, .out_valid(ov[i]), .p(p[i]));
  end
  kcm #(.COEF(-16'sd3092), .PIPELINED(1'b0)) dut_c (.clk, .rst, .in_valid, .x, .out_valid(ov_c), .p(p_c));

  always #5 clk = ~clk;

  // samples offered, by cycle, with their valid
  longint xs [$];
  bit     vs [$];
  int     products = 0;

  always @(posedge clk) begin
    if (!rst) begin
      xs.push_back(longint'(x)); vs.push_back(in_valid);
      // combinational version: same cycle
      checks++;
      if (ov_c !== in_valid || (in_valid && longint'(p_c) !== -3092 * longint'(x))) begin
        failures++; $display("FAIL comb kcm x=%0d p=%0d", x, p_c);
      end
      // pipelined: the sample of two cycles ago
      if (xs.size() == 3) begin
        automatic longint xo = xs.pop_front();
        automatic bit     vo = vs.pop_front();
        for (int i = 0; i < NK; i++) begin
          checks++;
          if (ov[i] !== vo || (vo && longint'(p[i]) !== longint'(KS[i]) * xo)) begin
            failures++; $display("FAIL kcm %0d: x=%0d p=%0d valid=%b expected valid=%b", KS[i], xo, p[i], ov[i], vo);
          end
        end
        if (vo) products++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (3000) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(0, 4) != 0);
      x = 16'(fir_ref_pkg::rand_sample());
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (products < 2000) begin failures++; $display("FAIL too few products"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
