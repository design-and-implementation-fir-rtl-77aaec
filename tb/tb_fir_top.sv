// tb_fir_top: end-to-end test of the three filter realisations at their
// default size (16 taps, 16-bit samples and coefficients).
//
// One random sample sequence, with the extreme values -32768 and 32767 mixed
// in, is fed to all three filters: to the serial MAC and DA filters through
// their handshakes (offered continuously, then with idle gaps), and to the
// transposed filter one sample per clock, then with gaps. Every output is
// compared with the reference convolution. Halfway through, the MAC filter's
// coefficient FIFO is reloaded with a new set while it is idle, and its later
// outputs must follow the new set. Each mechanism of the design is counted
// and must occur: back-to-back MAC sums with no stall cycle, the coefficient
// reload, back-to-back DA sums, DA sign-bit subtraction of a negative
// sample, full-rate transposed operation, gaps in its input, and the
// transposed filter sharing one KCM between taps of equal magnitude. Rates and
// latencies are checked: 16 clocks per sample and 17 clocks latency for the
// serial filters, 3 clocks latency for the transposed one.
module tb_fir_top;
  import fir_ref_pkg::*;
  localparam int NS = 160;      // samples per filter
  localparam int HALF = NS / 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic mac_in_valid = 0, mac_in_ready, mac_coef_wr = 0, mac_out_valid;
  logic signed [15:0] mac_in_sample = '0, mac_coef_in = '0;
  logic signed [35:0] mac_out_sample;
  logic tf_in_valid = 0, tf_out_valid;
  logic signed [15:0] tf_in_sample = '0;
  logic signed [35:0] tf_out_sample;
  logic da_in_valid = 0, da_in_ready, da_out_valid;
  logic signed [15:0] da_in_sample = '0;
  logic signed [35:0] da_out_sample;

  fir_top dut (.*);

  always #5 clk = ~clk;

  longint samples [NS];
  coefs_t coefs, new_coefs;
  longint exp_common [NS];      // default coefficients throughout
  longint exp_mac [NS];         // new coefficients from sample HALF on

  // mechanism counters
  int mac_b2b = 0, mac_reload = 0, da_b2b = 0, da_neg = 0, tf_full = 0, tf_gap = 0;
  int mac_outs = 0, tf_outs = 0, da_outs = 0;
  int cycle = 0;
  int mac_acc [$], da_acc [$], tf_acc [$];
  int mac_last = -1, da_last = -1;
  int mac_sent = 0, da_sent = 0;
  bit tf_prev_out = 0, tf_prev_in = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      // MAC filter
      if (mac_in_valid && mac_in_ready) begin
        if (mac_last >= 0 && cycle - mac_last == 16) mac_b2b++;
        if (mac_last >= 0 && cycle - mac_last < 16) fail("MAC accepted faster than 16 clocks");
        mac_last = cycle; mac_acc.push_back(cycle);
      end
      if (mac_out_valid) begin
        automatic int c0 = mac_acc.pop_front();
        checks += 2;
        if (longint'(mac_out_sample) !== exp_mac[mac_outs])
          fail($sformatf("MAC y[%0d]=%0d expected %0d", mac_outs, mac_out_sample, exp_mac[mac_outs]));
        if (cycle - c0 != 17) fail($sformatf("MAC latency %0d", cycle - c0));
        mac_outs++;
      end
      // DA filter
      if (da_in_valid && da_in_ready) begin
        if (da_last >= 0 && cycle - da_last == 16) da_b2b++;
        if (da_last >= 0 && cycle - da_last < 16) fail("DA accepted faster than 16 clocks");
        if (da_in_sample < 0) da_neg++;
        da_last = cycle; da_acc.push_back(cycle);
      end
      if (da_out_valid) begin
        automatic int c0 = da_acc.pop_front();
        checks += 2;
        if (longint'(da_out_sample) !== exp_common[da_outs])
          fail($sformatf("DA y[%0d]=%0d expected %0d", da_outs, da_out_sample, exp_common[da_outs]));
        if (cycle - c0 != 17) fail($sformatf("DA latency %0d", cycle - c0));
        da_outs++;
      end
      // transposed filter
      if (tf_in_valid) tf_acc.push_back(cycle);
      if (tf_prev_in && !tf_in_valid && tf_acc.size() < NS) tf_gap++;
      tf_prev_in = tf_in_valid;
      if (tf_out_valid) begin
        automatic int c0 = tf_acc.pop_front();
        checks += 2;
        if (longint'(tf_out_sample) !== exp_common[tf_outs])
          fail($sformatf("TF y[%0d]=%0d expected %0d", tf_outs, tf_out_sample, exp_common[tf_outs]));
        if (cycle - c0 != 3) fail($sformatf("TF latency %0d", cycle - c0));
        if (tf_prev_out) tf_full++;
        tf_outs++;
      end
      tf_prev_out = tf_out_valid;
    end
  end

  // Offer samples [from, to) to a handshaked filter; gaps adds idle clocks.
  task automatic drive_mac(input int from, input int to, input bit gaps);
    for (int i = from; i < to; i++) begin
      mac_in_valid = 1; mac_in_sample = 16'(samples[i]);
      @(posedge clk);
      while (!mac_in_ready) @(posedge clk);
      @(negedge clk);
      if (gaps) begin mac_in_valid = 0; repeat ($urandom_range(0, 9)) @(negedge clk); end
    end
    mac_in_valid = 0;
  endtask

  task automatic drive_da(input int from, input int to, input bit gaps);
    for (int i = from; i < to; i++) begin
      da_in_valid = 1; da_in_sample = 16'(samples[i]);
      @(posedge clk);
      while (!da_in_ready) @(posedge clk);
      @(negedge clk);
      if (gaps) begin da_in_valid = 0; repeat ($urandom_range(0, 9)) @(negedge clk); end
    end
    da_in_valid = 0;
  endtask

  task automatic drive_tf();
    for (int i = 0; i < NS; i++) begin
      if (i >= HALF) while ($urandom_range(0, 2) == 0) begin
        tf_in_valid = 0; @(negedge clk);
      end
      tf_in_valid = 1; tf_in_sample = 16'(samples[i]);
      @(negedge clk);
    end
    tf_in_valid = 0;
  endtask

  initial begin
    hist_t h1 = '{default: 0}, h2 = '{default: 0};
    coefs = default_coefs();
    for (int k = 0; k < NTAPS; k++) new_coefs[k] = longint'($signed(16'($urandom())));
    for (int i = 0; i < NS; i++) begin
      samples[i] = rand_sample();
      push(h1, samples[i]);
      exp_common[i] = fir_out(h1, coefs);
      exp_mac[i]    = fir_out(h1, (i < HALF) ? coefs : new_coefs);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      begin
        drive_mac(0, HALF, 0);
        wait (mac_outs == HALF);
        @(negedge clk);
        for (int k = 0; k < NTAPS; k++) begin
          mac_coef_wr = 1; mac_coef_in = 16'(new_coefs[k]);
          @(negedge clk);
        end
        mac_coef_wr = 0; mac_reload++;
        drive_mac(HALF, NS, 1);
      end
      begin
        drive_da(0, HALF, 0);
        drive_da(HALF, NS, 1);
      end
      drive_tf();
    join
    repeat (40) @(negedge clk);
    checks += 3;
    if (mac_outs != NS) fail($sformatf("MAC gave %0d outputs", mac_outs));
    if (da_outs != NS)  fail($sformatf("DA gave %0d outputs", da_outs));
    if (tf_outs != NS)  fail($sformatf("TF gave %0d outputs", tf_outs));
    $display("mechanisms: mac_back_to_back=%0d mac_coef_reload=%0d da_back_to_back=%0d da_negative_samples=%0d tf_full_rate=%0d tf_input_gaps=%0d",
             mac_b2b, mac_reload, da_b2b, da_neg, tf_full, tf_gap);
    $display("transposed filter: %0d KCMs for %0d taps", dut.u_tf.NMULT, NTAPS);
    checks += 7;
    if (dut.u_tf.NMULT >= NTAPS) fail("no multiplier shared between equal-magnitude taps");
    if (mac_b2b == 0)    fail("no back-to-back MAC sums");
    if (mac_reload == 0) fail("no coefficient reload");
    if (da_b2b == 0)     fail("no back-to-back DA sums");
    if (da_neg == 0)     fail("no negative DA sample");
    if (tf_full == 0)    fail("no full-rate transposed operation");
    if (tf_gap == 0)     fail("no transposed input gap");
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
