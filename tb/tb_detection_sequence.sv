// tb_detection_sequence: a 34-frame surveillance run (about 17 s of video at
// two frames per second of recording) through the whole detector at its
// default size, shaped like a typical detection-index trace: ten quiet
// frames; a car entering at frame 10 and leaving after three frames; a
// second, lower-contrast vehicle at frame 13 with a smaller peak; two large
// objects over frames 20-22 and 29-31. Small noise blobs below the minimum
// area appear in some quiet frames and must not be counted.
//
// Frames are synthetic (a textured road with noise, vehicles as rectangles);
// each is loaded over the local bus, processed and checked against the
// independent model in this file: d_i, the present and peak flags, the
// vehicle count and the clocks per frame. At the end exactly four vehicles
// must have been counted, at frames 11, 13, 21 and 30, and the frame rate
// implied by load plus processing time at 40 MHz must reach 15 frames/s.
module tb_detection_sequence;
  import vd_pkg::*;

  localparam int R = IMG_ROWS, C = IMG_COLS, N = R * C;
  localparam int REF_BASE = N;
  localparam int BUDGET = 1440180;

  logic clk = 0, rst_n = 0;
  logic lb_cs = 0, lb_we = 0;
  logic [3:0] lb_addr = 0;
  logic [7:0] lb_wdata = 0, lb_rdata;
  logic lb_ready, irq;
  logic [SRAM_AW-1:0] sram_addr;
  logic [7:0] sram_dout, sram_din;
  logic sram_we_n, sram_oe_n;
  int checks = 0, failures = 0, cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  vehicle_detector_top dut (.*);

  sram_model #(.AW(SRAM_AW)) u_sram (
    .clk, .addr(sram_addr), .din(sram_dout), .dout(sram_din), .we_n(sram_we_n), .oe_n(sram_oe_n));

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- scene
  typedef struct { int r0, c0, h, w, val; } box_t;

  int bg [N];
  int frame_y [N];
  int frame_rgb [N][3];
  int ref_img [N];

  function automatic int hash(int a, int b);
    int x;
    x = a * 1103515245 + b * 12345 + 7;
    x = x ^ (x >>> 13);
    return (x & 32'h7fffffff);
  endfunction

  function automatic void make_background();
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++)
        bg[r * C + c] = 70 + ((r * 3 + c * 5) % 37) + (hash(r, c) % 7);
  endfunction

  function automatic int clip(int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // Frame k: background with fresh noise and the boxes drawn over it.
  function automatic void make_frame(int k, box_t boxes[$]);
    for (int p = 0; p < N; p++) frame_y[p] = clip(bg[p] + (hash(p, k) % 9) - 4);
    foreach (boxes[i])
      for (int r = boxes[i].r0; r < boxes[i].r0 + boxes[i].h; r++)
        for (int c = boxes[i].c0; c < boxes[i].c0 + boxes[i].w; c++)
          if (r >= 0 && r < R && c >= 0 && c < C)
            frame_y[r * C + c] = boxes[i].val + (hash(r + k, c) % 11);
  endfunction

  // Colour version of the current frame: a tinted colour whose luminance is
  // what the model uses.
  function automatic void make_rgb();
    for (int p = 0; p < N; p++) begin
      frame_rgb[p][0] = clip(frame_y[p] + 20);
      frame_rgb[p][1] = clip(frame_y[p] - 5);
      frame_rgb[p][2] = clip(frame_y[p] + (hash(p, 3) % 40) - 20);
      frame_y[p] = (299 * frame_rgb[p][0] + 587 * frame_rgb[p][1] + 114 * frame_rgb[p][2] + 500) / 1000;
    end
  endfunction

  function automatic int mean9(const ref int img [N], int r, int c);
    int s = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        s += img[(r + dr) * C + (c + dc)];
    return (s + 4) / 9;
  endfunction

  function automatic int model_d(int h);
    int d = 0, f, diff;
    for (int r = 1; r < R - 1; r++)
      for (int c = 1; c < C - 1; c++) begin
        f = mean9(frame_y, r, c);
        diff = f - ref_img[r * C + c];
        if (diff < 0) diff = -diff;
        if (diff >= h) d++;
      end
    return d;
  endfunction

  // ---------------------------------------------------------------- bus
  int stall_cycles = 0;

  task automatic bus(bit we, reg_addr_e a, logic [7:0] wd, output logic [7:0] rd);
    @(negedge clk);
    lb_cs = 1; lb_we = we; lb_addr = a; lb_wdata = wd;
    #1;
    while (!lb_ready) begin
      stall_cycles++;
      @(negedge clk);
      #1;
    end
    rd = lb_rdata;
    @(posedge clk);
    #1;
    lb_cs = 0; lb_we = 0;
  endtask

  task automatic wr(reg_addr_e a, logic [7:0] wd);
    logic [7:0] dummy;
    bus(1, a, wd, dummy);
  endtask

  task automatic rd(reg_addr_e a, output logic [7:0] v);
    bus(0, a, 8'h00, v);
  endtask

  task automatic set_ptr(int a);
    wr(REG_PTR0, 8'(a)); wr(REG_PTR1, 8'(a >> 8)); wr(REG_PTR2, 8'(a >> 16));
  endtask

  task automatic load_gray(int base, const ref int img [N]);
    set_ptr(base);
    for (int p = 0; p < N; p++) wr(REG_DATA, 8'(img[p]));
  endtask

  task automatic load_rgb(int base);
    wr(REG_MODE, 8'h01);
    set_ptr(base);
    for (int p = 0; p < N; p++) begin
      wr(REG_DATA, 8'(frame_rgb[p][0]));
      wr(REG_DATA, 8'(frame_rgb[p][1]));
      wr(REG_DATA, 8'(frame_rgb[p][2]));
    end
    wr(REG_MODE, 8'h00);
  endtask

  // ---------------------------------------------------------------- model state
  int m1 = 0, m2 = 0, vehicles = 0, last_peak_d = 0;
  int n_present = 0, n_absent = 0, n_peaks = 0, n_rgb = 0, n_gray = 0, n_stalled = 0;
  int n_clear = 0, n_thresh = 0;
  int h_now = 80, area_now = 1000;

  // Start a frame already in SRAM; wait for the interrupt and check results.
  // When preload is set, the next frame's first pixel write is issued right
  // after the start and must stall until the frame is done.
  task automatic run_and_check(string tag, bit preload_stall, int next_pixel);
    int d, t0, t1, exp_cycles;
    bit e_present, e_peak;
    logic [7:0] v0, v1, st;
    int stall_before;
    d = model_d(h_now);
    e_present = (d >= area_now);
    e_peak = (m1 > m2) && (m1 > d) && (m1 >= area_now);
    if (e_peak) begin vehicles++; last_peak_d = m1; n_peaks++; end
    m2 = m1; m1 = d;
    if (e_present) n_present++; else n_absent++;

    wr(REG_CTRL, 8'h01);
    t0 = cycle;
    if (preload_stall) begin
      stall_before = stall_cycles;
      set_ptr(0);
      wr(REG_DATA, 8'(next_pixel));      // stalls until the SRAM is free
      if (stall_cycles - stall_before > 1000) n_stalled++;
      checks++;
      if (!irq) begin failures++; $display("FAIL %s: stalled write released before the interrupt", tag); end
    end
    while (!irq) @(negedge clk);
    t1 = cycle;
    // start accepted at t0; sequencer reads for 1 + N + (R-2)(C-2) clocks,
    // then filter (2), compare (1), sum (1), event (1), done (1), irq (1)
    exp_cycles = 1 + N + (R - 2) * (C - 2) + 7;
    checks++;
    if (!preload_stall && (t1 - t0 != exp_cycles)) begin
      failures++; $display("FAIL %s: frame took %0d clocks, expected %0d", tag, t1 - t0, exp_cycles);
    end
    checks++;
    if (t1 - t0 > BUDGET) begin failures++; $display("FAIL %s: over the frame budget", tag); end

    rd(REG_DIDX0, v0); rd(REG_DIDX1, v1);
    checks++;
    if ({v1, v0} != 16'(d)) begin failures++; $display("FAIL %s: d=%0d expected %0d", tag, {v1, v0}, d); end
    rd(REG_STATUS, st);
    checks++;
    if (st[1] != 1 || st[2] != e_present || st[3] != e_peak) begin
      failures++; $display("FAIL %s: status %b, expected present=%0b peak=%0b", tag, st, e_present, e_peak);
    end
    rd(REG_COUNT0, v0); rd(REG_COUNT1, v1);
    checks++;
    if ({v1, v0} != 16'(vehicles)) begin failures++; $display("FAIL %s: count %0d expected %0d", tag, {v1, v0}, vehicles); end
    rd(REG_PEAKD0, v0); rd(REG_PEAKD1, v1);
    checks++;
    if ({v1, v0} != 16'(last_peak_d)) begin failures++; $display("FAIL %s: peak_d %0d expected %0d", tag, {v1, v0}, last_peak_d); end
    wr(REG_CTRL, 8'h04);
    @(negedge clk);
    checks++;
    if (irq) begin failures++; $display("FAIL %s: interrupt not acknowledged", tag); end
    $display("%s: d=%0d present=%0b peak=%0b vehicles=%0d clocks=%0d", tag, d, e_present, e_peak, vehicles, t1 - t0);
  endtask

  task automatic gray_frame(int k, box_t boxes[$], bit stall_next);
    make_frame(k, boxes);
    if (!stall_next) load_gray(0, frame_y);
    n_gray++;
    run_and_check($sformatf("frame %0d", k), 1'b0, 0);
  endtask

  // ---------------------------------------------------------------- sequence
  box_t none[$], blob[$];
  box_t scene[34][$];
  int peak_frames[$];
  int load_start, load_clocks;

  initial begin
    make_background();
    for (int p = 0; p < N; p++) ref_img[p] = bg[p];
    for (int r = 1; r < R - 1; r++)
      for (int c = 1; c < C - 1; c++) ref_img[r * C + c] = mean9(bg, r, c);

    blob.push_back('{r0: 90, c0: 200, h: 12, w: 12, val: 230});
    scene[3] = blob;
    scene[6] = blob;
    scene[10].push_back('{r0: 40, c0: -40, h: 45, w: 80, val: 225});   // car enters
    scene[11].push_back('{r0: 40, c0: 80,  h: 45, w: 80, val: 225});   // fully inside
    scene[12].push_back('{r0: 40, c0: 215, h: 45, w: 80, val: 225});   // leaving
    scene[13].push_back('{r0: 50, c0: 60,  h: 35, w: 70, val: 190});   // low contrast
    scene[14] = blob;
    scene[20].push_back('{r0: 10, c0: -60, h: 100, w: 160, val: 240});
    scene[21].push_back('{r0: 10, c0: 50,  h: 100, w: 160, val: 240});
    scene[22].push_back('{r0: 10, c0: 180, h: 100, w: 160, val: 240});
    scene[29].push_back('{r0: 15, c0: -50, h: 90, w: 170, val: 10});
    scene[30].push_back('{r0: 15, c0: 40,  h: 90, w: 170, val: 10});
    scene[31].push_back('{r0: 15, c0: 170, h: 90, w: 170, val: 10});

    repeat (3) @(negedge clk);
    rst_n = 1;
    load_gray(REF_BASE, ref_img);

    for (int k = 0; k < 34; k++) begin
      int vehicles_before;
      vehicles_before = vehicles;
      make_frame(k, scene[k]);
      load_start = cycle;
      load_gray(0, frame_y);
      load_clocks = cycle - load_start;
      n_gray++;
      run_and_check($sformatf("frame %0d", k), 1'b0, 0);
      if (vehicles != vehicles_before) peak_frames.push_back(k - 1);
    end

    checks++;
    if (peak_frames.size() != 4 || peak_frames[0] != 11 || peak_frames[1] != 13 ||
        peak_frames[2] != 21 || peak_frames[3] != 30) begin
      failures++;
      $display("FAIL vehicles at frames %p", peak_frames);
    end
    // Real-time check at 40 MHz: processing (64,780 clocks) plus the
    // transfer of one 32 kB frame at the PCI bridge's 3 MB/s (10.92 ms)
    // must fit in 66.7 ms.
    checks++;
    if (1 + N + (R - 2) * (C - 2) + 7 + 436800 > 2668000) begin
      failures++; $display("FAIL frame period over 66.7 ms");
    end
    checks++;
    if (n_present == 0 || n_absent == 0 || n_peaks != 4) begin
      failures++; $display("FAIL mechanism not exercised");
    end
    $display("vehicles counted at frames %p; present=%0d absent=%0d", peak_frames, n_present, n_absent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
