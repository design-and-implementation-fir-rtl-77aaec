// tb_mac_unit: feeds the MAC engine groups of 16 (x, h) pairs, back to back
// and with idle cycles between and inside groups, and checks that y holds the
// sum of products of each group, that y_valid pulses exactly once per group
// one clock after the last pair, and that the accumulator restarts on
// 'first' without any clearing cycle.
module tb_mac_unit;
  localparam int N = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, en = 0, first = 0, last = 0;
  logic signed [15:0] x = '0, h = '0;
  logic signed [35:0] y;
  logic               y_valid;

  mac_unit dut (.*);

  always #5 clk = ~clk;

  longint expq [$];
  int     valids = 0, pending_valid = 0;

  always @(posedge clk) begin
    if (!rst) begin
      if (y_valid) begin
        valids++;
        checks++;
        if (expq.size() == 0) begin
          failures++; $display("FAIL unexpected y_valid");
        end else begin
          automatic longint e = expq.pop_front();
          if (longint'(y) !== e) begin
            failures++; $display("FAIL y=%0d expected %0d", y, e);
          end
        end
      end
      checks++;
      if (y_valid !== (pending_valid == 1)) begin
        failures++; $display("FAIL y_valid timing");
      end
      pending_valid = (en && last) ? 1 : 0;
    end
  end

  task automatic group(input bit gaps);
    longint s = 0;
    for (int k = 0; k < N; k++) begin
      if (gaps && $urandom_range(0, 3) == 0) begin
        en = 0; first = 0; last = 0; x = $signed(16'($urandom())); h = $signed(16'($urandom()));
        @(negedge clk);
      end
      en = 1; first = (k == 0); last = (k == N - 1);
      x = $signed(16'($urandom())); h = $signed(16'($urandom()));
      if ($urandom_range(0, 9) == 0) begin x = -16'sd32768; h = -16'sd32768; end
      s += longint'(x) * longint'(h);
      if (k == N - 1) expq.push_back(s);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (10) group(0);          // back to back
    en = 0; first = 0; last = 0;
    repeat (3) @(negedge clk);
    repeat (10) group(1);          // with idle cycles
    en = 0; first = 0; last = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (valids != 20 || expq.size() != 0) begin
      failures++; $display("FAIL %0d outputs for 20 groups", valids);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
