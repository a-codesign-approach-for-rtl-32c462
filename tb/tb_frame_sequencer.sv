// tb_frame_sequencer: runs the sequencer at its default 128 x 256 size over
// an SRAM model holding a random frame and reference image. Every pixel push
// is checked in order: the frame pixel, the start-of-frame flag and, for each
// push that completes an interior neighbourhood, the reference pixel of its
// centre. The testbench plays the end of the pipeline, returning
// result_valid a few clocks after the last push, and checks done, busy, that
// a start while busy is ignored, and the read schedule: the last push comes
// 1 + ROWS*COLS + (ROWS-2)*(COLS-2) clocks after the start request.
module tb_frame_sequencer;
  import vd_pkg::*;

  localparam int R = IMG_ROWS, C = IMG_COLS, REF = IMG_ROWS * IMG_COLS;

  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  logic mem_rd;
  logic [SRAM_AW-1:0] mem_addr;
  pix_t mem_rdata;
  logic pix_valid, pix_sof;
  pix_t pix, ref_pix;
  logic result_valid = 0;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  frame_sequencer dut (.*);

  sram_model #(.AW(SRAM_AW)) u_sram (
    .clk, .addr(mem_addr), .din(8'h00), .dout(mem_rdata), .we_n(1'b1), .oe_n(!mem_rd));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pushes = 0, last_push_cycle = 0, start_cycle = 0;

  // Check each push as it appears.
  always @(negedge clk) begin
    if (rst_n && pix_valid) begin
      int p, r, c;
      p = pushes; r = p / C; c = p % C;
      checks++;
      if (pix != u_sram.mem[p] || pix_sof != (p == 0) ||
          (r >= 2 && c >= 2 && ref_pix != u_sram.mem[REF + (r - 1) * C + (c - 1)])) begin
        failures++;
        if (failures < 10) $display("FAIL push %0d pix=%0h ref=%0h sof=%0b", p, pix, ref_pix, pix_sof);
      end
      pushes++;
      last_push_cycle = cycle;
    end
  end

  task automatic run_frame();
    pushes = 0;
    @(negedge clk);
    start = 1; start_cycle = cycle;
    @(negedge clk);
    start = 0;
    while (pushes < R * C) begin
      @(negedge clk);
      if (pushes == 100) start = 1;          // ignored while busy
      else start = 0;
    end
    start = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (!busy || done) begin failures++; $display("FAIL busy/done before result"); end
    result_valid = 1;
    @(negedge clk);
    result_valid = 0;
    checks++;
    if (!done) begin failures++; $display("FAIL no done"); end
    @(negedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL still busy"); end
    checks++;
    if (last_push_cycle - start_cycle != 1 + R * C + (R - 2) * (C - 2)) begin
      failures++;
      $display("FAIL schedule %0d exp %0d", last_push_cycle - start_cycle, 1 + R * C + (R - 2) * (C - 2));
    end
    checks++;
    if (pushes != R * C) begin failures++; $display("FAIL pushes %0d", pushes); end
  endtask

  initial begin
    foreach (u_sram.mem[i]) if (i < 2 * REF) u_sram.mem[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame();
    for (int i = 0; i < 2 * REF; i++) u_sram.mem[i] = 8'(i * 7 + 3);
    run_frame();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
