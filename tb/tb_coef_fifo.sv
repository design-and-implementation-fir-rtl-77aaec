// tb_coef_fifo: checks the coefficient ring. After reset the head must walk
// through the default set h[0..15] and come back to h[0]; after 16 writes
// the head must walk through the written set, which must survive further
// rotations; a write mixed with rotation replaces the oldest word.
module tb_coef_fifo;
  localparam int N = fir_pkg::NTAPS;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, rotate = 0, wr = 0;
  logic signed [15:0] wr_data = '0, head;

  coef_fifo dut (.*);

  always #5 clk = ~clk;

  longint model [$];

  task automatic expect_head(input string what);
    checks++;
    if (longint'(head) !== model[0]) begin
      failures++;
      $display("FAIL %s: head=%0d expected %0d", what, head, model[0]);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) model.push_back(longint'(fir_pkg::H_DEFAULT[k]));
    repeat (2) @(negedge clk);
    rst = 0;
    // two full rotations of the default set
    for (int r = 0; r < 2 * N; r++) begin
      expect_head("default rotation");
      rotate = 1;
      @(negedge clk);
      model.push_back(model.pop_front());
    end
    rotate = 0;
    // load a new random set
    for (int k = 0; k < N; k++) begin
      wr = 1; wr_data = $signed(16'($urandom()));
      void'(model.pop_front()); model.push_back(longint'(wr_data));
      @(negedge clk);
    end
    wr = 0;
    for (int r = 0; r < 3 * N; r++) begin
      expect_head("new set rotation");
      rotate = 1'($urandom_range(0, 1));
      @(negedge clk);
      if (rotate) model.push_back(model.pop_front());
    end
    rotate = 0;
    // write has priority over rotate
    wr = 1; rotate = 1; wr_data = 16'sd1234;
    void'(model.pop_front()); model.push_back(1234);
    @(negedge clk);
    wr = 0; rotate = 0;
    for (int r = 0; r < N; r++) begin
      expect_head("after write");
      rotate = 1;
      @(negedge clk);
      model.push_back(model.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
