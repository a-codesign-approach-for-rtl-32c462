// tb_vehicle_detector_top: end-to-end test of the detector at its default
// size (128 x 256 window, h = 80, minimum area 1000), driving only the
// PCI-bridge local bus and an SRAM model, as the host program would.
//
// A synthetic road scene is generated here: a textured background with a
// little noise and vehicles drawn as bright or dark rectangles that enter,
// grow and leave the window over a sequence of frames. The host loads the
// fitted reference image (the filtered background), then for each frame
// loads the pixels, starts the frame, waits for the interrupt, reads the
// detection index, the flags and the vehicle count and acknowledges.
// An independent model in this file applies the same steps (luminance,
// 3x3 mean with rounding, |F - I| >= h over the interior, the sum, the
// minimum-area test and the local-maximum rule) and every result is
// compared with it. The processing time of each frame, from the start
// write to the interrupt, is checked against the expected schedule and
// against the 1,440,180-clock frame budget at 40 MHz.
//
// Mechanisms made to happen and counted: gray and colour (R,G,B) frame
// loading, a host write stalled while a frame is processed, frames with and
// without a present object, peaks (vehicles counted), a threshold change,
// and clearing the history. Each must occur at least once.
module tb_vehicle_detector_top;
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
    repeat (6000000) @(posedge clk);
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
  box_t none[$];
  box_t car_a[$], car_b[$], car_c[$], car_d[$], car_e[$], truck[$], faint[$];

  initial begin
    logic [7:0] v;
    make_background();
    for (int p = 0; p < N; p++) ref_img[p] = bg[p];
    for (int r = 1; r < R - 1; r++)
      for (int c = 1; c < C - 1; c++) ref_img[r * C + c] = mean9(bg, r, c);

    car_a.push_back('{r0: 40, c0: -30, h: 40, w: 60,  val: 220});   // entering
    car_b.push_back('{r0: 40, c0: 60,  h: 40, w: 70,  val: 220});   // fully inside
    car_c.push_back('{r0: 40, c0: 200, h: 40, w: 70,  val: 220});   // leaving
    car_d.push_back('{r0: 20, c0: 100, h: 60, w: 90,  val: 5});     // dark vehicle
    car_e.push_back('{r0: 30, c0: 20,  h: 30, w: 30,  val: 5});
    truck.push_back('{r0: 10, c0: 40,  h: 100, w: 150, val: 240});
    faint.push_back('{r0: 50, c0: 50,  h: 20, w: 20,  val: 240});   // below the minimum area

    repeat (3) @(negedge clk);
    rst_n = 1;
    rd(REG_THRESH, v);
    checks++;
    if (v != 80) begin failures++; $display("FAIL default threshold %0d", v); end

    load_gray(REF_BASE, ref_img);

    gray_frame(0, none, 0);
    gray_frame(1, faint, 0);
    gray_frame(2, car_a, 0);
    gray_frame(3, car_b, 0);      // peak of car A/B
    gray_frame(4, car_c, 0);
    gray_frame(5, none, 0);

    // colour frame: dark vehicle, loaded as R,G,B triplets
    make_frame(6, car_d);
    make_rgb();
    load_rgb(0);
    n_rgb++;
    run_and_check("frame 6 (colour)", 1'b0, 0);

    // frame 7 is processed while the host already starts loading frame 8:
    // the first pixel write of frame 8 must wait for the SRAM
    make_frame(7, car_e);
    load_gray(0, frame_y);
    n_gray++;
    run_and_check("frame 7", 1'b1, 0);
    make_frame(8, truck);
    load_gray(0, frame_y);        // also rewrites the pixel written during the stall
    n_gray++;
    run_and_check("frame 8", 1'b0, 0);
    gray_frame(9, none, 0);

    // raise the threshold and clear the history
    wr(REG_THRESH, 8'd120);
    h_now = 120; n_thresh++;
    wr(REG_CTRL, 8'h06);
    m1 = 0; m2 = 0; vehicles = 0; last_peak_d = 0; n_clear++;
    gray_frame(10, truck, 0);
    gray_frame(11, none, 0);

    checks++;
    if (n_gray == 0 || n_rgb == 0 || n_stalled == 0 || n_present == 0 || n_absent == 0 ||
        n_peaks < 2 || n_clear == 0 || n_thresh == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("gray=%0d colour=%0d stalled=%0d present=%0d absent=%0d peaks=%0d clear=%0d thresh=%0d",
             n_gray, n_rgb, n_stalled, n_present, n_absent, n_peaks, n_clear, n_thresh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
