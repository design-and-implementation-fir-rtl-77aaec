// tb_cla_adder: checks the carry-lookahead adder (sum and carry out) against
// integer addition at the default 36-bit width and at a 7-bit width that
// does not fill its top lookahead group, with carry chains that cross every
// group boundary.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [35:0] a, b, s;
  logic        ci, co;
  logic [6:0]  a2, b2, s2;
  logic        ci2, co2;

  cla_adder dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  cla_adder #(.W(7)) dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));

  task automatic check36(input logic [35:0] x, input logic [35:0] y, input logic c);
    logic [36:0] expv;
    a = x; b = y; ci = c; #1;
    expv = {1'b0, x} + {1'b0, y} + 37'(c);
    checks++;
    if ({co, s} !== expv) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h, expected %h", x, y, c, co, s, expv);
    end
  endtask

  initial begin
    check36('1, 36'd0, 1'b1);
    check36('1, 36'd1, 1'b0);
    check36('1, '1, 1'b1);
    for (int k = 0; k < 36; k++) check36((36'd1 << k) - 1, 36'd1, 1'b0);
    repeat (3000) check36({$urandom(), $urandom()}, {$urandom(), $urandom()}, 1'($urandom()));
    for (int i = 0; i < 128; i++)
      for (int j = 0; j < 128; j += 3) begin
        a2 = 7'(i); b2 = 7'(j); ci2 = 1'(i ^ j); #1;
        checks++;
        if ({co2, s2} !== 8'(i + j + int'(ci2))) begin
          failures++;
          $display("FAIL 7-bit %0d + %0d", i, j);
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
