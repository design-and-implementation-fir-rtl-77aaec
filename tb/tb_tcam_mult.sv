// tb_tcam_mult: checks the two-variable signed multiplier against the
// simulator's own multiplication, for all sign and extreme-value corners and
// for random operands, at the default 16x16 size and at an odd 5x9 size.
module tb_tcam_mult;
  int checks = 0, failures = 0;

  logic signed [15:0] a, b;
  logic signed [31:0] p;
  logic signed [4:0]  a2;
  logic signed [8:0]  b2;
  logic signed [13:0] p2;

  tcam_mult dut (.a(a), .b(b), .p(p));
  tcam_mult #(.A_W(5), .B_W(9)) dut2 (.a(a2), .b(b2), .p(p2));

  task automatic check16(input logic signed [15:0] x, input logic signed [15:0] y);
    longint expv;
    a = x; b = y; #1;
    expv = longint'(x) * longint'(y);
    checks++;
    if (longint'(p) !== expv) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p, expv);
    end
  endtask

  initial begin
    automatic logic signed [15:0] corners [6] = '{16'sh8000, 16'sh7fff, 16'sh0000, 16'sh0001, 16'shffff, 16'sh1234};
    foreach (corners[i]) foreach (corners[j]) check16(corners[i], corners[j]);
    repeat (3000) check16($signed(16'($urandom())), $signed(16'($urandom())));
    for (int i = -16; i < 16; i++)
      for (int j = -256; j < 256; j += 7) begin
        a2 = 5'(i); b2 = 9'(j); #1;
        checks++;
        if (int'(p2) !== i * j) begin
          failures++;
          $display("FAIL 5x9 %0d * %0d = %0d", i, j, p2);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
