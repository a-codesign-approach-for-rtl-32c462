// host_interface: register file behind the PCI bridge's 8-bit local bus.
//
// The host program talks to the FPGA through byte registers (map in
// vd_pkg::reg_addr_e). It loads the reference image and each new frame into
// the board SRAM through the auto-incrementing data port, sets the
// binarisation threshold h and the minimum detection area (the "threshold"
// and "sensitivity" the user adjusts), starts the processing of a frame and
// reads back the detection index, the presence and peak flags and the
// vehicle count. An interrupt line is raised when the sequencer reports the
// frame done (the SRAM is then free again) and stays high until the host
// acknowledges it by writing CTRL bit 2.
//
// The data port takes gray bytes. With REG_MODE bit 0 set it instead takes
// R, G, B byte triplets and stores their luminance, converted by rgb2y; the
// pointer then advances once per triplet.
//
// Local-bus handshake: the host holds lb_cs (with lb_we, lb_addr, lb_wdata)
// until lb_ready is seen high; the access takes place in that clock, and read
// data is valid in it. lb_ready is low, stalling the host, for writes to the
// data port or start requests while a frame is being processed, since the
// sequencer then owns the SRAM. Accepted pixels reach the SRAM one clock
// (gray) or two clocks (colour) later through mem_we/mem_addr/mem_wdata.
// Reset values: h = 80, minimum area = 1000.
//
// The registers, their map and the handshake are this implementation's
// choices; the published detector states only which quantities the host
// sets and reads, that the bus is 8 bits wide and that completion is
// signalled by an interrupt.
module host_interface
  import vd_pkg::*;
#(
  parameter int unsigned AW = SRAM_AW
) (
  input  logic             clk,
  input  logic             rst_n,
  // local bus from the PCI bridge
  input  logic             lb_cs,
  input  logic             lb_we,
  input  logic [3:0]       lb_addr,
  input  logic [7:0]       lb_wdata,
  output logic [7:0]       lb_rdata,
  output logic             lb_ready,
  output logic             irq,
  // SRAM write port (used while the engine is idle)
  output logic             mem_we,
  output logic [AW-1:0]    mem_addr,
  output pix_t             mem_wdata,
  // engine control and parameters
  input  logic             engine_busy,
  input  logic             frame_done,
  output logic             start,
  output logic             clear,
  output pix_t             thresh,
  output logic [IDX_W-1:0] min_area,
  // per-frame results
  input  logic             res_valid,
  input  logic             res_present,
  input  logic             res_peak,
  input  logic [IDX_W-1:0] res_d,
  input  logic [IDX_W-1:0] res_peak_d,
  input  logic [CNT_W-1:0] res_count
);

  logic          rgb_mode;
  logic [AW-1:0] ptr;
  logic [1:0]    rgb_phase;
  pix_t          r_q, g_q;
  logic [AW-1:0] y_addr;
  logic          y_valid;
  pix_t          y;
  logic          present_q, peak_q;

  logic stall, acc_wr, data_wr, start_wr;

  reg_addr_e addr;
  assign addr = reg_addr_e'(lb_addr);

  assign data_wr  = lb_we && (addr == REG_DATA);
  assign start_wr = lb_we && (addr == REG_CTRL) && lb_wdata[0];
  assign stall    = (data_wr || start_wr) && (engine_busy || start);
  assign lb_ready = lb_cs && !stall;
  assign acc_wr   = lb_cs && lb_ready && lb_we;

  rgb2y u_rgb2y (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (acc_wr && data_wr && rgb_mode && rgb_phase == 2'd2),
    .in_r     (r_q),
    .in_g     (g_q),
    .in_b     (lb_wdata),
    .out_valid(y_valid),
    .out_y    (y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rgb_mode  <= 1'b0;
      ptr       <= '0;
      rgb_phase <= '0;
      r_q       <= '0;
      g_q       <= '0;
      y_addr    <= '0;
      mem_we    <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      start     <= 1'b0;
      clear     <= 1'b0;
      irq       <= 1'b0;
      thresh    <= H_DEFAULT;
      min_area  <= AREA_DEFAULT;
      present_q <= 1'b0;
      peak_q    <= 1'b0;
    end else begin
      start  <= 1'b0;
      clear  <= 1'b0;
      mem_we <= 1'b0;

      if (y_valid) begin
        mem_we    <= 1'b1;
        mem_addr  <= y_addr;
        mem_wdata <= y;
      end

      if (frame_done) irq <= 1'b1;

      if (res_valid) begin
        present_q <= res_present;
        peak_q    <= res_peak;
      end

      if (acc_wr) begin
        unique case (addr)
          REG_CTRL: begin
            start <= lb_wdata[0];
            clear <= lb_wdata[1];
            if (lb_wdata[2]) irq <= 1'b0;
          end
          REG_MODE: begin
            rgb_mode  <= lb_wdata[0];
            rgb_phase <= '0;
          end
          REG_PTR0:   ptr[7:0] <= lb_wdata;
          REG_PTR1:   ptr[15:8] <= lb_wdata;
          REG_PTR2:   ptr[AW-1:16] <= lb_wdata[AW-17:0];
          REG_DATA: begin
            if (!rgb_mode) begin
              mem_we    <= 1'b1;
              mem_addr  <= ptr;
              mem_wdata <= lb_wdata;
              ptr       <= ptr + 1'b1;
            end else begin
              unique case (rgb_phase)
                2'd0: begin r_q <= lb_wdata; rgb_phase <= 2'd1; end
                2'd1: begin g_q <= lb_wdata; rgb_phase <= 2'd2; end
                default: begin
                  y_addr    <= ptr;
                  ptr       <= ptr + 1'b1;
                  rgb_phase <= 2'd0;
                end
              endcase
            end
          end
          REG_THRESH: thresh <= lb_wdata;
          REG_AREA0:  min_area[7:0] <= lb_wdata;
          REG_AREA1:  min_area[15:8] <= lb_wdata;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    lb_rdata = '0;
    unique case (addr)
      REG_MODE:   lb_rdata = {7'd0, rgb_mode};
      REG_STATUS: lb_rdata = {4'd0, peak_q, present_q, irq, engine_busy || start};
      REG_PTR0:   lb_rdata = ptr[7:0];
      REG_PTR1:   lb_rdata = ptr[15:8];
      REG_PTR2:   lb_rdata = 8'(ptr[AW-1:16]);
      REG_THRESH: lb_rdata = thresh;
      REG_AREA0:  lb_rdata = min_area[7:0];
      REG_AREA1:  lb_rdata = min_area[15:8];
      REG_DIDX0:  lb_rdata = res_d[7:0];
      REG_DIDX1:  lb_rdata = res_d[15:8];
      REG_COUNT0: lb_rdata = res_count[7:0];
      REG_COUNT1: lb_rdata = res_count[15:8];
      REG_PEAKD0: lb_rdata = res_peak_d[7:0];
      REG_PEAKD1: lb_rdata = res_peak_d[15:8];
      default:    lb_rdata = '0;
    endcase
  end

  // Bus rule: ready only answers a request.
  a_ready_needs_cs: assert property (@(posedge clk) lb_ready |-> lb_cs);

endmodule
