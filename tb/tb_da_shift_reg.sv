// tb_da_shift_reg: loads random words into the bit-serial delay line, 16
// shifts per word, with the load both overlapping the last shift and on an
// idle cycle, and checks on every clock that tap k carries bit b of the
// sample loaded k words earlier.
module tb_da_shift_reg;
  localparam int N = 16, W = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, shift = 0, load = 0;
  logic [W-1:0] din = '0;
  logic [N-1:0] taps;

  da_shift_reg dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] words [N];   // model: words[k] = sample loaded k loads ago

  task automatic check_bit(input int b);
    logic [N-1:0] e;
    for (int k = 0; k < N; k++) e[k] = words[k][b];
    checks++;
    if (taps !== e) begin
      failures++; $display("FAIL bit %0d: taps=%h expected %h", b, taps, e);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) words[k] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    // first load on an idle cycle
    load = 1; din = 16'($urandom());
    for (int k = N - 1; k > 0; k--) words[k] = words[k-1];
    words[0] = din;
    @(negedge clk);
    load = 0;
    repeat (60) begin
      for (int b = 0; b < W; b++) begin
        check_bit(b);
        shift = 1;
        load = (b == W - 1) && ($urandom_range(0, 2) != 0);
        din = 16'($urandom());
        if (b == W - 1 && !load) begin
          @(negedge clk);
          shift = 0;
          repeat ($urandom_range(0, 3)) @(negedge clk);
          load = 1;
        end
        if (load) begin
          for (int k = N - 1; k > 0; k--) words[k] = words[k-1];
          words[0] = din;
        end
        @(negedge clk);
        shift = 0; load = 0;
      end
    end
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
