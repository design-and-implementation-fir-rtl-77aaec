// tb_da_lut: reads all 16 words of DA look-up tables built for three sets of
// four coefficients and compares each with the sum of the coefficients whose
// address bit is set.
module tb_da_lut;
  localparam logic signed [15:0] C0 [4] = '{-16'sd854, -16'sd3092, -16'sd4498, -16'sd2681};
  localparam logic signed [15:0] C1 [4] = '{16'sd3907, 16'sd14463, 16'sd25580, 16'sd32734};
  localparam logic signed [15:0] C2 [4] = '{-16'sd32768, -16'sd32768, 16'sd32767, -16'sd32768};
  int checks = 0, failures = 0;

  logic [3:0]         addr;
  logic signed [17:0] d0, d1, d2;

  da_lut #(.COEF(C0)) u0 (.addr, .data(d0));
  da_lut #(.COEF(C1)) u1 (.addr, .data(d1));
  da_lut #(.COEF(C2)) u2 (.addr, .data(d2));

  function automatic longint lsum(input logic signed [15:0] c [4], input int a);
    longint s = 0;
    for (int i = 0; i < 4; i++) if ((a >> i) & 1) s += longint'(c[i]);
    return s;
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a); #1;
      checks += 3;
      if (longint'(d0) !== lsum(C0, a)) begin failures++; $display("FAIL lut0[%0d]=%0d", a, d0); end
      if (longint'(d1) !== lsum(C1, a)) begin failures++; $display("FAIL lut1[%0d]=%0d", a, d1); end
      if (longint'(d2) !== lsum(C2, a)) begin failures++; $display("FAIL lut2[%0d]=%0d", a, d2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
