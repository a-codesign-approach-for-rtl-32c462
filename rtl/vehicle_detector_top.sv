// vehicle_detector_top: FPGA partition of the real-time vehicle detector.
//
// A host PC sends a reference image of the empty road window and then, frame
// by frame, the same window of the camera image (ROWS x COLS 8-bit pixels)
// over a PCI bridge whose 8-bit local bus lands on host_interface. Pixels are
// stored in the external 512 kB SRAM. On a start command frame_sequencer
// streams the frame through the pixel pipeline:
//
//   mean_filter3x3  3x3 mean low-pass filter, interior pixels only
//   diff_threshold  C = |F - I| against the reference, B = (C >= h)
//   detection_index d_i = number of B = 1 pixels in the frame
//   event_detector  d_i >= minimum area; local maximum of d over frames
//                   marks a passing vehicle and counts it
//
// The reference pixel travels with each frame pixel as the filter's tag. The
// result raises irq; the host reads d_i, the flags and the vehicle count.
// Colour frames can be loaded through the rgb2y converter in host_interface.
//
// SRAM pins: byte-wide asynchronous SRAM with active-low write and output
// enables. The FPGA owns the SRAM for reading while a frame is processed and
// lets the host write it otherwise; sram_dout is the value to drive on the
// data pins when sram_we_n is low. Read data is taken in the same clock as
// the address (asynchronous SRAM faster than one clock period).
//
// Timing: a frame takes 64,780 clocks from the start write to irq at the
// default size (1.62 ms at 40 MHz): ROWS*COLS + (ROWS-2)*(COLS-2) SRAM reads
// plus 8 clocks of pipeline and handshake.
//
// The partitioning into an SRAM-based FPGA engine and a host program, the
// computation and the default thresholds follow the published detector; the
// register map, the SRAM map and the pipeline timing are this design's
// choices.
module vehicle_detector_top
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
  // local bus of the PCI bridge
  input  logic          lb_cs,
  input  logic          lb_we,
  input  logic [3:0]    lb_addr,
  input  logic [7:0]    lb_wdata,
  output logic [7:0]    lb_rdata,
  output logic          lb_ready,
  output logic          irq,
  // external SRAM
  output logic [AW-1:0] sram_addr,
  output logic [7:0]    sram_dout,
  input  logic [7:0]    sram_din,
  output logic          sram_we_n,
  output logic          sram_oe_n
);

  logic             busy, done, start, clear;
  logic             seq_rd;
  logic [AW-1:0]    seq_addr;
  logic             host_we;
  logic [AW-1:0]    host_addr;
  pix_t             host_wdata;
  pix_t             thresh;
  logic [IDX_W-1:0] min_area;

  logic             pix_valid, pix_sof;
  pix_t             pix, ref_pix;
  logic             f_valid, f_last;
  pix_t             f_mean, f_ref;
  logic             b_valid, b_last, b_bit;
  pix_t             c_val;
  logic             d_valid;
  logic [IDX_W-1:0] d;
  logic             res_valid, res_present, res_peak;
  logic [IDX_W-1:0] res_d, res_peak_d;
  logic [CNT_W-1:0] res_count;

  host_interface #(.AW(AW)) u_host (
    .clk        (clk),
    .rst_n      (rst_n),
    .lb_cs      (lb_cs),
    .lb_we      (lb_we),
    .lb_addr    (lb_addr),
    .lb_wdata   (lb_wdata),
    .lb_rdata   (lb_rdata),
    .lb_ready   (lb_ready),
    .irq        (irq),
    .mem_we     (host_we),
    .mem_addr   (host_addr),
    .mem_wdata  (host_wdata),
    .engine_busy(busy),
    .frame_done (done),
    .start      (start),
    .clear      (clear),
    .thresh     (thresh),
    .min_area   (min_area),
    .res_valid  (res_valid),
    .res_present(res_present),
    .res_peak   (res_peak),
    .res_d      (res_d),
    .res_peak_d (res_peak_d),
    .res_count  (res_count)
  );

  frame_sequencer #(
    .COLS(COLS), .ROWS(ROWS), .AW(AW), .FRAME_BASE(FRAME_BASE), .REF_BASE(REF_BASE)
  ) u_seq (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .busy        (busy),
    .done        (done),
    .mem_rd      (seq_rd),
    .mem_addr    (seq_addr),
    .mem_rdata   (sram_din),
    .pix_valid   (pix_valid),
    .pix_sof     (pix_sof),
    .pix         (pix),
    .ref_pix     (ref_pix),
    .result_valid(res_valid)
  );

  // SRAM ownership: the sequencer while busy, the host otherwise.
  always_comb begin
    if (busy) begin
      sram_addr = seq_addr;
      sram_we_n = 1'b1;
      sram_oe_n = !seq_rd;
    end else begin
      sram_addr = host_addr;
      sram_we_n = !host_we;
      sram_oe_n = 1'b1;
    end
    sram_dout = host_wdata;
  end

  mean_filter3x3 #(.COLS(COLS), .ROWS(ROWS), .TAG_W(PIX_W)) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pix_valid),
    .in_sof   (pix_sof),
    .in_pix   (pix),
    .in_tag   (ref_pix),
    .out_valid(f_valid),
    .out_last (f_last),
    .out_mean (f_mean),
    .out_tag  (f_ref)
  );

  diff_threshold u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (f_valid),
    .in_last  (f_last),
    .in_f     (f_mean),
    .in_ref   (f_ref),
    .h        (thresh),
    .out_valid(b_valid),
    .out_last (b_last),
    .out_c    (c_val),
    .out_b    (b_bit)
  );

  detection_index u_index (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (start),
    .in_valid(b_valid),
    .in_last (b_last),
    .in_b    (b_bit),
    .d_valid (d_valid),
    .d       (d)
  );

  event_detector u_event (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (clear),
    .d_valid  (d_valid),
    .d        (d),
    .min_area (min_area),
    .res_valid(res_valid),
    .present  (res_present),
    .peak     (res_peak),
    .last_d   (res_d),
    .peak_d   (res_peak_d),
    .count    (res_count)
  );

  // The sequencer must not be started while it runs, and the host must not
  // write the SRAM while the sequencer owns it.
  a_no_host_write_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !host_we);

endmodule
