// tb_transposed_fir: runs three parallel transposed filters on the same
// random stream, first one sample every clock, then with random gaps, and
// compares every output with the reference convolution:
//   dut      default build (shared multipliers, pipelined KCMs), default
//            symmetric coefficients: 8 KCMs, latency 3;
//   dut_neg  a set with equal and opposite-sign coefficient pairs, so shared
//            taps use both copied and negated products: 5 KCMs, latency 3;
//   dut_ded  one KCM per tap, combinational KCMs: 16 KCMs, latency 1.
// Also checks one output per input and a full-rate stretch with an output
// on every clock.
module tb_transposed_fir;
  import fir_ref_pkg::*;
  localparam logic signed [15:0] CNEG [16] = '{
    16'sd1200, -16'sd1200, 16'sd32767, -16'sd7,
    -16'sd32767, 16'sd7, 16'sd1200, -16'sd32768,
    16'sd500, 16'sd500, -16'sd500, 16'sd7,
    16'sd32767, -16'sd1200, -16'sd32768, 16'sd32767};
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] in_sample = '0;
  logic               ov [3];
  logic signed [35:0] y  [3];

  transposed_fir dut (.clk, .rst, .in_valid, .in_sample, .out_valid(ov[0]), .out_sample(y[0]));
  transposed_fir #(.COEF(CNEG)) dut_neg (.clk, .rst, .in_valid, .in_sample, .out_valid(ov[1]), .out_sample(y[1]));
  transposed_fir #(.SHARE_MULT(1'b0), .PIPELINED(1'b0)) dut_ded (.clk, .rst, .in_valid, .in_sample, .out_valid(ov[2]), .out_sample(y[2]));

  localparam int LAT [3] = '{3, 3, 1};

  always #5 clk = ~clk;

  hist_t  hist = '{default: 0};
  coefs_t coefs [3];
  longint expq [3][$];
  int     inq  [3][$];
  int     cycle = 0, outputs [3] = '{0, 0, 0}, run = 0, max_run = 0;

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (in_valid) begin
        push(hist, longint'(in_sample));
        for (int d = 0; d < 3; d++) begin
          expq[d].push_back(fir_out(hist, coefs[d]));
          inq[d].push_back(cycle);
        end
      end
      for (int d = 0; d < 3; d++)
        if (ov[d]) begin
          automatic longint e = expq[d].pop_front();
          automatic int    c0 = inq[d].pop_front();
          outputs[d]++;
          checks += 2;
          if (longint'(y[d]) !== e) begin
            failures++; $display("FAIL dut %0d: y=%0d expected %0d", d, y[d], e);
          end
          if (cycle - c0 != LAT[d]) begin
            failures++; $display("FAIL dut %0d: latency %0d", d, cycle - c0);
          end
        end
      if (ov[0]) begin run++; if (run > max_run) max_run = run; end
      else run = 0;
    end
  end

  initial begin
    coefs[0] = default_coefs();
    coefs[2] = default_coefs();
    for (int k = 0; k < NTAPS; k++) coefs[1][k] = longint'(CNEG[k]);
    checks += 3;
    if (dut.NMULT != 8)      begin failures++; $display("FAIL default build has %0d KCMs", dut.NMULT); end
    if (dut_neg.NMULT != 5)  begin failures++; $display("FAIL +/- set build has %0d KCMs", dut_neg.NMULT); end
    if (dut_ded.NMULT != 16) begin failures++; $display("FAIL dedicated build has %0d KCMs", dut_ded.NMULT); end
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (500) begin
      in_valid = 1; in_sample = 16'(rand_sample());
      @(negedge clk);
    end
    repeat (500) begin
      in_valid = 1'($urandom_range(0, 2) != 0); in_sample = 16'(rand_sample());
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (expq[d].size() != 0) begin failures++; $display("FAIL dut %0d: %0d outputs missing", d, expq[d].size()); end
    end
    checks++;
    if (max_run < 500) begin failures++; $display("FAIL longest full-rate run %0d", max_run); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
