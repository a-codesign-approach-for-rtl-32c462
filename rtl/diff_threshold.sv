// diff_threshold: comparison with the reference image and binarisation.
//
// For each filtered pixel F and its reference pixel I it forms the
// comparison value C = |F - I| and the binary pixel B = (C >= h), with h a
// run-time threshold (80 in the detector's published setting). Both steps
// follow the detector's algorithm; the single register stage is this
// implementation's choice.
//
// Timing: out_* are registered, one clock after in_valid. in_last is carried
// along to mark the last pixel of a frame.
module diff_threshold
  import vd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_last,
  input  pix_t in_f,        // filtered frame pixel
  input  pix_t in_ref,      // reference image pixel
  input  pix_t h,           // binarisation threshold
  output logic out_valid,
  output logic out_last,
  output pix_t out_c,       // |F - I|
  output logic out_b        // 1 when |F - I| >= h
);

  pix_t c;

  always_comb begin
    c = (in_f >= in_ref) ? in_f - in_ref : in_ref - in_f;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_c     <= '0;
      out_b     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_c <= c;
        out_b <= (c >= h);
      end
    end
  end

endmodule
