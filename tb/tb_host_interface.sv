// tb_host_interface: drives the local bus like the PCI bridge would and
// checks the register file: reset values of h (80) and the minimum area
// (1000), pointer and gray pixel writes reaching the SRAM port with
// auto-increment, colour triplets stored as their exact NTSC luminance,
// the stall of data writes and start requests while the engine is busy,
// the start and clear pulses, the interrupt set by frame_done and cleared by
// the acknowledge bit, and read-back of the results.
module tb_host_interface;
  import vd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic lb_cs = 0, lb_we = 0;
  logic [3:0] lb_addr = 0;
  logic [7:0] lb_wdata = 0, lb_rdata;
  logic lb_ready, irq;
  logic mem_we;
  logic [SRAM_AW-1:0] mem_addr;
  pix_t mem_wdata;
  logic engine_busy = 0, frame_done = 0;
  logic start, clear;
  pix_t thresh;
  logic [IDX_W-1:0] min_area;
  logic res_valid = 0, res_present = 0, res_peak = 0;
  logic [IDX_W-1:0] res_d = 0, res_peak_d = 0;
  logic [CNT_W-1:0] res_count = 0;
  int checks = 0, failures = 0;
  int stall_cycles = 0, starts = 0, clears = 0;

  always #5 clk = ~clk;

  host_interface dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_addr[$], exp_data[$];

  always @(negedge clk) begin
    if (start) starts++;
    if (clear) clears++;
    if (rst_n && mem_we) begin
      checks++;
      if (exp_addr.size() == 0) begin
        failures++; $display("FAIL unexpected SRAM write");
      end else begin
        int a, d;
        a = exp_addr.pop_front();
        d = exp_data.pop_front();
        if (mem_addr != SRAM_AW'(a) || mem_wdata != pix_t'(d)) begin
          failures++;
          if (failures < 10) $display("FAIL SRAM write %0h=%0h exp %0h=%0h", mem_addr, mem_wdata, a, d);
        end
      end
    end
  end

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

  task automatic rd_check(reg_addr_e a, logic [7:0] exp);
    logic [7:0] v;
    bus(0, a, 8'h00, v);
    checks++;
    if (v != exp) begin failures++; $display("FAIL read %s = %0h exp %0h", a.name(), v, exp); end
  endtask

  initial begin
    int ptr, r, g, b;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rd_check(REG_THRESH, 8'd80);
    rd_check(REG_AREA0, 8'(1000));
    rd_check(REG_AREA1, 8'(1000 >> 8));
    checks++;
    if (thresh != 80 || min_area != 1000) begin failures++; $display("FAIL reset params"); end
    wr(REG_THRESH, 8'd55);
    wr(REG_AREA0, 8'h34);
    wr(REG_AREA1, 8'h12);
    @(negedge clk);
    checks++;
    if (thresh != 55 || min_area != 16'h1234) begin failures++; $display("FAIL params"); end
    // gray pixels at 0x48000
    ptr = 'h48000;
    wr(REG_PTR0, 8'(ptr)); wr(REG_PTR1, 8'(ptr >> 8)); wr(REG_PTR2, 8'(ptr >> 16));
    rd_check(REG_PTR2, 8'h04);
    for (int i = 0; i < 300; i++) begin
      exp_addr.push_back(ptr + i); exp_data.push_back((i * 13) & 255);
      wr(REG_DATA, 8'(i * 13));
    end
    rd_check(REG_PTR0, 8'((ptr + 300)));
    rd_check(REG_PTR1, 8'((ptr + 300) >> 8));
    // colour triplets
    wr(REG_MODE, 8'h01);
    rd_check(REG_MODE, 8'h01);
    ptr = ptr + 300;
    for (int i = 0; i < 200; i++) begin
      r = $urandom_range(255); g = $urandom_range(255); b = $urandom_range(255);
      if (i == 0) begin r = 255; g = 255; b = 255; end
      exp_addr.push_back(ptr + i);
      exp_data.push_back((299 * r + 587 * g + 114 * b + 500) / 1000);
      wr(REG_DATA, 8'(r)); wr(REG_DATA, 8'(g)); wr(REG_DATA, 8'(b));
    end
    wr(REG_MODE, 8'h00);
    // stall while the engine is busy
    engine_busy = 1;
    fork
      begin
        exp_addr.push_back(ptr + 200); exp_data.push_back(8'h5A);
        wr(REG_DATA, 8'h5A);
      end
      begin
        repeat (7) @(negedge clk);
        checks++;
        if (exp_addr.size() != 1) begin failures++; $display("FAIL write not stalled"); end
        engine_busy = 0;
      end
    join
    checks++;
    if (stall_cycles < 6) begin failures++; $display("FAIL stall cycles %0d", stall_cycles); end
    // start, ignored-while-busy start, clear
    wr(REG_CTRL, 8'h01);
    repeat (2) @(negedge clk);
    checks++;
    if (starts != 1) begin failures++; $display("FAIL start pulse %0d", starts); end
    wr(REG_CTRL, 8'h02);
    repeat (2) @(negedge clk);
    checks++;
    if (clears != 1) begin failures++; $display("FAIL clear pulse %0d", clears); end
    // results and interrupt
    rd_check(REG_STATUS, 8'h00);
    @(negedge clk);
    res_valid = 1; res_present = 1; res_peak = 1; res_d = 16'h0BCD; res_peak_d = 16'h0F00; res_count = 16'h0102;
    @(negedge clk);
    res_valid = 0; frame_done = 1;
    @(negedge clk);
    frame_done = 0;
    checks++;
    if (!irq) begin failures++; $display("FAIL irq not raised"); end
    rd_check(REG_STATUS, 8'h0E);
    rd_check(REG_DIDX0, 8'hCD); rd_check(REG_DIDX1, 8'h0B);
    rd_check(REG_COUNT0, 8'h02); rd_check(REG_COUNT1, 8'h01);
    rd_check(REG_PEAKD0, 8'h00); rd_check(REG_PEAKD1, 8'h0F);
    wr(REG_CTRL, 8'h04);
    @(negedge clk);
    checks++;
    if (irq) begin failures++; $display("FAIL irq not cleared"); end
    repeat (3) @(negedge clk);
    checks++;
    if (exp_addr.size() != 0 || starts != 1) begin
      failures++; $display("FAIL left %0d writes, %0d starts", exp_addr.size(), starts);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
