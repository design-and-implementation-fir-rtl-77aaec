// tb_tap_sequencer: drives the step controller with isolated samples and with
// back-to-back streams, and checks every cycle against a cycle counter kept
// by the testbench: step order, first/last flags, in_ready, and that a
// continuous stream is accepted exactly once every STEPS clocks.
module tb_tap_sequencer;
  localparam int STEPS = 16;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1, in_valid = 0;
  logic in_ready, load, busy, first, last;
  logic [3:0] step;

  tap_sequencer #(.STEPS(STEPS)) dut (.*);

  always #5 clk = ~clk;

  // Model: number of steps left (0 = idle) and expected step index.
  int m_left = 0, m_step = 0;
  int last_load_cycle = -1, cycle = 0, b2b_loads = 0;

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      checks++;
      if (busy !== (m_left > 0) || (busy && (step !== 4'(m_step))) ||
          first !== (m_left > 0 && m_step == 0) || last !== (m_left > 0 && m_step == STEPS - 1) ||
          in_ready !== (m_left == 0 || m_step == STEPS - 1) || load !== (in_valid && in_ready)) begin
        failures++;
        $display("FAIL cycle %0d: busy=%b step=%0d first=%b last=%b rdy=%b (model left=%0d step=%0d)",
                 cycle, busy, step, first, last, in_ready, m_left, m_step);
      end
      if (load) begin
        if (last_load_cycle >= 0 && m_left > 0) begin
          b2b_loads++;
          checks++;
          if (cycle - last_load_cycle != STEPS) begin
            failures++;
            $display("FAIL back-to-back loads %0d cycles apart", cycle - last_load_cycle);
          end
        end
        last_load_cycle = cycle;
        m_left = STEPS; m_step = 0;
      end else if (m_left > 0) begin
        m_left--; m_step = (m_left == 0) ? 0 : m_step + 1;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // isolated sample
    @(negedge clk) in_valid = 1;
    @(negedge clk) in_valid = 0;
    repeat (25) @(negedge clk);
    // continuous stream of 5 samples
    in_valid = 1;
    repeat (5 * STEPS) @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    // random offers
    repeat (400) @(negedge clk) in_valid = 1'($urandom_range(0, 3) == 0);
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (b2b_loads < 4) begin
      failures++;
      $display("FAIL only %0d back-to-back loads seen", b2b_loads);
    end
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
