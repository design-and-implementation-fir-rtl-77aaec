// tb_mac_fir: runs the serial MAC filter on a random sample stream, in bursts
// offered continuously and with idle gaps, and compares each output with the
// reference convolution. Checks the rate (one sample accepted every 16
// clocks under a continuous offer), the latency (output 17 clocks after
// acceptance) and a coefficient reload through the FIFO.
module tb_mac_fir;
  import fir_ref_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, in_valid = 0, coef_wr = 0;
  logic in_ready, out_valid;
  logic signed [15:0] in_sample = '0, coef_in = '0;
  logic signed [35:0] out_sample;

  mac_fir dut (.*);

  always #5 clk = ~clk;

  hist_t  hist = '{default: 0};
  coefs_t coefs;
  longint expq [$];
  int     accept_cycle [$];
  int     cycle = 0, last_accept = -1, outputs = 0;

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (in_valid && in_ready) begin
        push(hist, longint'(in_sample));
        expq.push_back(fir_out(hist, coefs));
        if (last_accept >= 0 && cycle - last_accept < 16) begin
          failures++; $display("FAIL samples accepted %0d clocks apart", cycle - last_accept);
        end
        if (last_accept >= 0 && cycle - last_accept == 16) checks++;
        last_accept = cycle;
        accept_cycle.push_back(cycle);
      end
      if (out_valid) begin
        automatic longint e = expq.pop_front();
        automatic int    c0 = accept_cycle.pop_front();
        outputs++;
        checks += 2;
        if (longint'(out_sample) !== e) begin
          failures++; $display("FAIL y=%0d expected %0d", out_sample, e);
        end
        if (cycle - c0 != 17) begin
          failures++; $display("FAIL latency %0d", cycle - c0);
        end
      end
    end
  end

  initial begin
    coefs = default_coefs();
    repeat (2) @(negedge clk);
    rst = 0;
    // continuous offer: accepted every 16 clocks
    in_valid = 1;
    for (int i = 0; i < 40; i++) begin
      in_sample = 16'(rand_sample());
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (40) @(negedge clk);
    // reload coefficients while idle
    for (int k = 0; k < 16; k++) begin
      coef_wr = 1; coef_in = $signed(16'($urandom()));
      coefs[k] = longint'(coef_in);
      @(negedge clk);
    end
    coef_wr = 0;
    // samples with gaps
    for (int i = 0; i < 30; i++) begin
      in_valid = 1; in_sample = 16'(rand_sample());
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(0, 20)) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    checks++;
    if (outputs != 70 || expq.size() != 0) begin
      failures++; $display("FAIL %0d outputs for 70 samples", outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
