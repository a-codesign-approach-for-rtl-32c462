// detection_index: per-frame sum of the binary image.
//
// Counts the pixels with B = 1 over one frame. The count is cleared by
// `clear` (pulsed when a frame starts) and by the end of each frame; when the
// pixel flagged in_last arrives, the final sum including that pixel is
// presented on d with a one-clock d_valid pulse. The counter saturates at
// its maximum so a wrong frame size cannot wrap it.
//
// Timing: d_valid one clock after the in_valid/in_last cycle.
module detection_index
  import vd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic             in_last,
  input  logic             in_b,
  output logic             d_valid,
  output logic [IDX_W-1:0] d
);

  logic [IDX_W-1:0] acc, acc_next;

  always_comb begin
    acc_next = acc;
    if (in_valid && in_b && acc != '1) acc_next = acc + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      d_valid <= 1'b0;
      d       <= '0;
    end else begin
      d_valid <= 1'b0;
      if (clear) begin
        acc <= '0;
      end else if (in_valid && in_last) begin
        acc     <= '0;
        d       <= acc_next;
        d_valid <= 1'b1;
      end else begin
        acc <= acc_next;
      end
    end
  end

endmodule
