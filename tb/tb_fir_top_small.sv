// tb_fir_top_small: the three filters rebuilt through their generic
// parameters at another size, 8 taps, 12-bit samples and 10-bit
// coefficients, with random coefficients. Checks every output against the
// reference convolution, and that the serial MAC filter now takes 8 clocks
// per sample (one per tap) while the serial DA filter takes 12 (one per
// sample bit, independent of the number of taps). The transposed filter
// still takes one sample per clock.
module tb_fir_top_small;
  import fir_ref_pkg::*;
  localparam int T = 8, DW = 12, CW = 10, OW = DW + CW + 3, NS = 60;
  int checks = 0, failures = 0;

  // coefficients, including both extremes of the 10-bit range
  localparam logic signed [CW-1:0] C [T] = '{10'sd311, -10'sd512, 10'sd97, 10'sd511, 10'sd511, -10'sd3, -10'sd260, 10'sd45};

  logic clk = 0, rst = 1;
  logic mac_in_valid = 0, mac_in_ready, mac_out_valid;
  logic signed [DW-1:0] mac_in_sample = '0;
  logic signed [CW-1:0] mac_coef_in = '0;
  logic signed [OW-1:0] mac_out_sample;
  logic tf_in_valid = 0, tf_out_valid;
  logic signed [DW-1:0] tf_in_sample = '0;
  logic signed [OW-1:0] tf_out_sample;
  logic da_in_valid = 0, da_in_ready, da_out_valid;
  logic signed [DW-1:0] da_in_sample = '0;
  logic signed [OW-1:0] da_out_sample;

  fir_top #(.NTAPS(T), .DATA_W(DW), .COEF_W(CW), .OUT_W(OW), .COEF(C)) dut (
    .clk, .rst,
    .mac_in_valid, .mac_in_ready, .mac_in_sample, .mac_coef_wr(1'b0), .mac_coef_in,
    .mac_out_valid, .mac_out_sample,
    .tf_in_valid, .tf_in_sample, .tf_out_valid, .tf_out_sample,
    .da_in_valid, .da_in_ready, .da_in_sample, .da_out_valid, .da_out_sample
  );

  always #5 clk = ~clk;

  longint exp_y [NS];
  longint samples [NS];
  int mac_outs = 0, da_outs = 0, tf_outs = 0, cycle = 0, mac_last = -1, da_last = -1;
  int mac_gap_ok = 0, da_gap_ok = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (mac_in_valid && mac_in_ready) begin
        if (mac_last >= 0) begin
          checks++;
          if (cycle - mac_last != T) fail($sformatf("MAC samples %0d clocks apart", cycle - mac_last));
          else mac_gap_ok++;
        end
        mac_last = cycle;
      end
      if (da_in_valid && da_in_ready) begin
        if (da_last >= 0) begin
          checks++;
          if (cycle - da_last != DW) fail($sformatf("DA samples %0d clocks apart", cycle - da_last));
          else da_gap_ok++;
        end
        da_last = cycle;
      end
      if (mac_out_valid) begin
        checks++;
        if (longint'(mac_out_sample) !== exp_y[mac_outs]) fail($sformatf("MAC y[%0d]=%0d expected %0d", mac_outs, mac_out_sample, exp_y[mac_outs]));
        mac_outs++;
      end
      if (da_out_valid) begin
        checks++;
        if (longint'(da_out_sample) !== exp_y[da_outs]) fail($sformatf("DA y[%0d]=%0d expected %0d", da_outs, da_out_sample, exp_y[da_outs]));
        da_outs++;
      end
      if (tf_out_valid) begin
        checks++;
        if (longint'(tf_out_sample) !== exp_y[tf_outs]) fail($sformatf("TF y[%0d]=%0d expected %0d", tf_outs, tf_out_sample, exp_y[tf_outs]));
        tf_outs++;
      end
    end
  end

  initial begin
    hist_t  h = '{default: 0};
    coefs_t c = '{default: 0};
    for (int k = 0; k < T; k++) c[k] = longint'(C[k]);
    for (int i = 0; i < NS; i++) begin
      case ($urandom_range(0, 9))
        0:       samples[i] = -(64'sd1 <<< (DW - 1));
        1:       samples[i] = (64'sd1 <<< (DW - 1)) - 1;
        default: samples[i] = longint'($signed(DW'($urandom())));
      endcase
      push(h, samples[i]);
      exp_y[i] = fir_out(h, c);
    end
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      begin
        mac_in_valid = 1;
        for (int i = 0; i < NS; i++) begin
          mac_in_sample = DW'(samples[i]);
          @(posedge clk); while (!mac_in_ready) @(posedge clk);
          @(negedge clk);
        end
        mac_in_valid = 0;
      end
      begin
        da_in_valid = 1;
        for (int i = 0; i < NS; i++) begin
          da_in_sample = DW'(samples[i]);
          @(posedge clk); while (!da_in_ready) @(posedge clk);
          @(negedge clk);
        end
        da_in_valid = 0;
      end
      begin
        for (int i = 0; i < NS; i++) begin
          tf_in_valid = 1; tf_in_sample = DW'(samples[i]);
          @(negedge clk);
        end
        tf_in_valid = 0;
      end
    join
    repeat (30) @(negedge clk);
    checks += 3;
    if (mac_outs != NS || da_outs != NS || tf_outs != NS)
      fail($sformatf("outputs: MAC %0d DA %0d TF %0d of %0d", mac_outs, da_outs, tf_outs, NS));
    if (mac_gap_ok == 0) fail("no MAC rate check");
    if (da_gap_ok == 0)  fail("no DA rate check");
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
