// tap_sequencer: step controller shared by the two serial filters.
//
// The serial MAC filter spends one clock per tap and the serial distributed-
// arithmetic filter one clock per sample bit, so both need the same control:
// accept a sample, then run STEPS steps numbered 0..STEPS-1. A sample is
// accepted (load = in_valid & in_ready) when the sequencer is idle or in its
// last step; in the second case the next sample's step 0 follows the current
// last step directly, so a continuous stream costs exactly STEPS clocks per
// sample and no stall cycle is lost between sums.
//
// Timing: load in cycle t -> step 0 in cycle t+1 ... step STEPS-1 in cycle
// t+STEPS. first/last flag steps 0 and STEPS-1; busy is high during any step.
// The handshake and the counter are this design's choices; the step rate
// (one tap or one bit per clock) is the one the filters are described with.
module tap_sequencer #(
  parameter int STEPS = 16,
  localparam int SW   = (STEPS > 1) ? $clog2(STEPS) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  output logic          in_ready,
  output logic          load,
  output logic          busy,
  output logic [SW-1:0] step,
  output logic          first,
  output logic          last
);

  always_comb begin
    first    = busy && (step == '0);
    last     = busy && (step == SW'(STEPS - 1));
    in_ready = !busy || last;
    load     = in_valid && in_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      step <= '0;
    end else if (load) begin
      busy <= 1'b1;
      step <= '0;
    end else if (last) begin
      busy <= 1'b0;
      step <= '0;
    end else if (busy) begin
      step <= step + 1'b1;
    end
  end

`ifndef SYNTHESIS
  // A step index never leaves 0..STEPS-1 while busy.
  a_step_range: assert property (@(posedge clk) disable iff (rst) busy |-> int'(step) < STEPS)
    else $error("tap_sequencer: step out of range");
`endif

endmodule
