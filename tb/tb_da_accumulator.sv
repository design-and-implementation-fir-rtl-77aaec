// tb_da_accumulator: feeds the scaling accumulator groups of 16 random LUT
// sums, including the largest positive and negative ones, and checks the
// result against sum_b 2^b*s_b - 2^15*s_15, the valid pulse one clock after
// the sign bit, and back-to-back groups with no clear cycle.
module tb_da_accumulator;
  localparam int W = 16, IN_W = 20;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, en = 0, first = 0, last = 0;
  logic signed [IN_W-1:0] s = '0;
  logic signed [35:0]     y;
  logic                   y_valid;

  da_accumulator dut (.*);

  always #5 clk = ~clk;

  longint expq [$];
  int     valids = 0, pend = 0;

  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (y_valid !== (pend == 1)) begin failures++; $display("FAIL y_valid timing"); end
      if (y_valid) begin
        automatic longint e = expq.pop_front();
        valids++;
        checks++;
        if (longint'(y) !== e) begin failures++; $display("FAIL y=%0d expected %0d", y, e); end
      end
      pend = (en && last) ? 1 : 0;
    end
  end

  task automatic group(input bit gaps);
    longint acc = 0;
    for (int b = 0; b < W; b++) begin
      if (gaps && $urandom_range(0, 3) == 0) begin
        en = 0; first = 0; last = 0; @(negedge clk);
      end
      en = 1; first = (b == 0); last = (b == W - 1);
      case ($urandom_range(0, 5))
        0:       s = -(20'sd1 <<< 19);
        1:       s = (20'sd1 <<< 19) - 1;
        default: s = $signed(20'($urandom()));
      endcase
      if (b == W - 1) acc -= longint'(s) <<< b;
      else            acc += longint'(s) <<< b;
      if (b == W - 1) expq.push_back(acc);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (20) group(0);
    en = 0; first = 0; last = 0;
    repeat (2) @(negedge clk);
    repeat (20) group(1);
    en = 0; first = 0; last = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (valids != 40) begin failures++; $display("FAIL %0d results for 40 groups", valids); end
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
