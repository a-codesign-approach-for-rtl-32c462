// rgb2y: colour-to-luminance conversion (NTSC weights).
//
// Computes Y = [0.299 R + 0.587 G + 0.114 B], where [x] is the nearest integer
// with halves rounded up, exactly as the detector's luminance definition asks.
// The weights are held as 19-bit fractions (156763, 307758, 59769) and a
// rounding offset of 262142 is added before the shift; this constant set was
// chosen so that the result equals the exact decimal rounding for all 2^24
// inputs. Three constant multipliers and two adders, as the algorithm states.
//
// Interface: in_valid/in_r/in_g/in_b; out_valid/out_y one clock later.
// No back-pressure. Reset clears out_valid only.
module rgb2y
  import vd_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_r,
  input  pix_t in_g,
  input  pix_t in_b,
  output logic out_valid,
  output pix_t out_y
);

  localparam logic [18:0] KR   = 19'd156763;
  localparam logic [18:0] KG   = 19'd307758;
  localparam logic [18:0] KB   = 19'd59769;
  localparam logic [27:0] KRND = 28'd262142;

  logic [27:0] acc;

  always_comb begin
    acc = 28'(KR * in_r) + 28'(KG * in_g) + 28'(KB * in_b) + KRND;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_y <= acc[26:19];
    end
  end

endmodule
