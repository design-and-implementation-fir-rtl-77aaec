// coef_fifo: circular coefficient register of the serial MAC filter.
//
// NTAPS coefficient words sit in a ring. 'head' is the coefficient of the
// tap being processed; 'rotate' moves the ring one place, sending the head
// back to the tail, so after NTAPS rotations the ring is where it started
// and holds the same set. While the filter is idle, 'wr' shifts wr_data in at
// the tail and drops the head: NTAPS writes load a new set, the first word
// written becoming h[0]. Reset loads COEF. Both operations take effect at
// the next clock edge; wr has priority over rotate.
// Storing the coefficients in a FIFO register follows the filter description;
// the ring and the reload order are this design's choices.
module coef_fifo
#(
  parameter int    NTAPS = fir_pkg::NTAPS,
  parameter int    COEF_W = fir_pkg::COEF_W,
  parameter logic signed [COEF_W-1:0] COEF [NTAPS] = fir_pkg::H_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     rotate,
  input  logic                     wr,
  input  logic signed [COEF_W-1:0] wr_data,
  output logic signed [COEF_W-1:0] head
);

  logic signed [COEF_W-1:0] ring [NTAPS];

  always_ff @(posedge clk) begin
    if (rst) begin
      ring <= COEF;
    end else if (wr || rotate) begin
      for (int k = 0; k < NTAPS - 1; k++) ring[k] <= ring[k+1];
      ring[NTAPS-1] <= wr ? wr_data : ring[0];
    end
  end

  assign head = ring[0];

endmodule
