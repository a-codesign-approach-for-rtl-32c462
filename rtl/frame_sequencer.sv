// frame_sequencer: scans one frame and the reference image in the board
// SRAM and feeds the pixel pipeline.
//
// Both images are ROWS x COLS bytes stored row by row, the frame at
// FRAME_BASE and the reference at REF_BASE. After `start` the sequencer reads
// every frame pixel in raster order (state RD_FRAME). When that pixel
// completes the 3x3 neighbourhood of an interior pixel (row >= 2 and
// column >= 2), it also reads the reference pixel of the neighbourhood's
// centre, one row up and one column left (state RD_REF). The frame pixel is
// then pushed to the filter with the reference pixel alongside. After the
// last pixel it waits in DRAIN for result_valid from the end of the pipeline,
// pulses done and returns to IDLE.
//
// SRAM timing: mem_addr and mem_rd are decoded from registers, so they are
// stable for the whole clock; read data is taken at the clock edge that ends
// the cycle (an asynchronous SRAM with access time below one period).
// Reading takes ROWS*COLS + (ROWS-2)*(COLS-2) clocks, 64,772 at 128 x 256;
// the last push leaves one clock after the last read. The detector as
// published needed about 1.44 million clocks (36 ms at 40 MHz) per frame;
// this two-reads-per-pixel schedule is this implementation's choice.
module frame_sequencer
  import vd_pkg::*;
#(
  parameter int unsigned COLS       = IMG_COLS,
  parameter int unsigned ROWS       = IMG_ROWS,
  parameter int unsigned AW         = SRAM_AW,
  parameter int unsigned FRAME_BASE = 0,
  parameter int unsigned REF_BASE   = IMG_ROWS * IMG_COLS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  // SRAM read port
  output logic          mem_rd,
  output logic [AW-1:0] mem_addr,
  input  pix_t          mem_rdata,
  // pixel stream to the filter
  output logic          pix_valid,
  output logic          pix_sof,
  output pix_t          pix,
  output pix_t          ref_pix,
  // end-of-frame result from the pipeline
  input  logic          result_valid
);

  localparam int unsigned CW = $clog2(COLS);
  localparam int unsigned RW = $clog2(ROWS);

  typedef enum logic [1:0] {IDLE, RD_FRAME, RD_REF, DRAIN} state_e;

  state_e        state;
  logic [AW-1:0] p;          // linear index of the current frame pixel
  logic [CW-1:0] c;
  logic [RW-1:0] r;
  logic          interior;
  logic          last_pix;

  assign interior = (r >= RW'(2)) && (c >= CW'(2));
  assign last_pix = (r == RW'(ROWS - 1)) && (c == CW'(COLS - 1));
  assign busy     = (state != IDLE);
  assign mem_rd   = (state == RD_FRAME) || (state == RD_REF);

  always_comb begin
    if (state == RD_REF) mem_addr = AW'(REF_BASE) + p - AW'(COLS + 1);
    else                 mem_addr = AW'(FRAME_BASE) + p;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      p         <= '0;
      c         <= '0;
      r         <= '0;
      done      <= 1'b0;
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      pix       <= '0;
      ref_pix   <= '0;
    end else begin
      done      <= 1'b0;
      pix_valid <= 1'b0;
      pix_sof   <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            p     <= '0;
            c     <= '0;
            r     <= '0;
            state <= RD_FRAME;
          end
        end
        RD_FRAME: begin
          pix <= mem_rdata;
          if (interior) begin
            state <= RD_REF;
          end else begin
            pix_valid <= 1'b1;
            pix_sof   <= (p == '0);
            state     <= last_pix ? DRAIN : RD_FRAME;
            p         <= p + 1'b1;
            c         <= (c == CW'(COLS - 1)) ? '0 : c + 1'b1;
            if (c == CW'(COLS - 1)) r <= r + 1'b1;
          end
        end
        RD_REF: begin
          ref_pix   <= mem_rdata;
          pix_valid <= 1'b1;
          state     <= last_pix ? DRAIN : RD_FRAME;
          p         <= p + 1'b1;
          c         <= (c == CW'(COLS - 1)) ? '0 : c + 1'b1;
          if (c == CW'(COLS - 1)) r <= r + 1'b1;
        end
        DRAIN: begin
          if (result_valid) begin
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
