// mean_filter3x3: 3x3 mean (box) low-pass filter on a raster pixel stream.
//
// Pixels of one ROWS x COLS image arrive in raster order (in_sof marks the
// first). Two line buffers of COLS pixels keep the two previous rows, and a
// 3x3 register window shifts one column per accepted pixel, so the window
// always holds the neighbourhood of the pixel one row up and one column left
// of the newest one. The nine window values are summed and divided by nine
// with rounding to nearest, as floor((sum + 4) * 7282 / 2^16), which equals
// round(sum / 9) for every sum 0..2295. Border rows and columns are left
// unfiltered: only the (ROWS-2) x (COLS-2) interior pixels are output.
//
// The mean kernel with a(i,j) = 1/9 follows the detector's algorithm; the
// rounding of the division, the line-buffer structure and the sideband tag
// are this implementation's choices. The tag (TAG_W bits) accompanies each
// input pixel and is returned with the filtered value of the window centre
// computed on that push, so that data aligned to the centre (the reference
// pixel) can travel with the stream.
//
// Timing: an interior result appears on out_valid two clocks after the
// in_valid cycle that completes its window. out_last marks the last interior
// pixel of the image. Pixels may arrive with gaps; there is no back-pressure.
module mean_filter3x3
  import vd_pkg::*;
#(
  parameter int unsigned COLS  = IMG_COLS,
  parameter int unsigned ROWS  = IMG_ROWS,
  parameter int unsigned TAG_W = PIX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_sof,
  input  pix_t             in_pix,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic             out_last,
  output pix_t             out_mean,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned CW = $clog2(COLS);
  localparam int unsigned RW = $clog2(ROWS);

  // Line buffers: lb_m1 holds the previous row, lb_m2 the row before it.
  pix_t lb_m1 [COLS];
  pix_t lb_m2 [COLS];

  pix_t win [3][3];           // win[row][col], row 2 and col 2 newest

  logic [CW-1:0] nxt_c, cur_c;
  logic [RW-1:0] nxt_r, cur_r;

  logic             s1_valid, s1_last;
  logic [TAG_W-1:0] s1_tag;

  logic [11:0] sum;
  logic [25:0] scaled;

  assign cur_c = in_sof ? '0 : nxt_c;
  assign cur_r = in_sof ? '0 : nxt_r;

  // Position counters of the next expected pixel.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nxt_c <= '0;
      nxt_r <= '0;
    end else if (in_valid) begin
      if (cur_c == CW'(COLS - 1)) begin
        nxt_c <= '0;
        nxt_r <= (cur_r == RW'(ROWS - 1)) ? '0 : cur_r + 1'b1;
      end else begin
        nxt_c <= cur_c + 1'b1;
        nxt_r <= cur_r;
      end
    end
  end

  // Line buffers and window shift.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_m1[cur_c] <= in_pix;
      lb_m2[cur_c] <= lb_m1[cur_c];
      for (int i = 0; i < 3; i++) begin
        win[i][0] <= win[i][1];
        win[i][1] <= win[i][2];
      end
      win[0][2] <= lb_m2[cur_c];
      win[1][2] <= lb_m1[cur_c];
      win[2][2] <= in_pix;
    end
  end

  // Stage 1: the window just updated is an interior neighbourhood when the
  // newest pixel is at row >= 2 and column >= 2.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_last  <= 1'b0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= in_valid && (cur_r >= RW'(2)) && (cur_c >= CW'(2));
      s1_last  <= in_valid && (cur_r == RW'(ROWS - 1)) && (cur_c == CW'(COLS - 1));
      if (in_valid) s1_tag <= in_tag;
    end
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        sum = sum + 12'(win[i][j]);
    scaled = (26'(sum) + 26'd4) * 26'd7282;
  end

  // Stage 2: divide by nine and register the result.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_mean  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= s1_valid;
      out_last  <= s1_last;
      if (s1_valid) begin
        out_mean <= scaled[23:16];
        out_tag  <= s1_tag;
      end
    end
  end

endmodule
