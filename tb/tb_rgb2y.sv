// tb_rgb2y: checks the luminance converter against the exact decimal
// definition Y = floor((299 R + 587 G + 114 B + 500) / 1000), i.e. the
// nearest integer to 0.299 R + 0.587 G + 0.114 B with halves rounded up.
// Covers corner values, a sweep of gray levels and random triplets, and
// checks the one-clock latency and that out_valid follows in_valid.
module tb_rgb2y;
  import vd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  pix_t in_r = 0, in_g = 0, in_b = 0;
  logic out_valid;
  pix_t out_y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rgb2y dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_y(int r, int g, int b);
    return (299 * r + 587 * g + 114 * b + 500) / 1000;
  endfunction

  task automatic apply(int r, int g, int b);
    in_valid <= 1; in_r <= pix_t'(r); in_g <= pix_t'(g); in_b <= pix_t'(b);
    @(posedge clk);
    in_valid <= 0;
    #1;
    checks++;
    if (!out_valid || out_y !== pix_t'(ref_y(r, g, b))) begin
      failures++;
      if (failures < 10) $display("FAIL rgb=(%0d,%0d,%0d) y=%0d exp=%0d v=%0b", r, g, b, out_y, ref_y(r, g, b), out_valid);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    apply(0, 0, 0);
    apply(255, 255, 255);
    apply(255, 0, 0);
    apply(0, 255, 0);
    apply(0, 0, 255);
    apply(10, 0, 0);     // 2.99 -> 3
    apply(5, 0, 0);      // 1.495 -> 1
    apply(0, 0, 13);     // 1.482 -> 1
    apply(1, 1, 3);      // 0.299+0.587+0.342 = 1.228
    apply(0, 1, 2);      // 0.815 -> 1
    for (int v = 0; v < 256; v++) apply(v, v, v);
    for (int i = 0; i < 20000; i++) apply($urandom_range(255), $urandom_range(255), $urandom_range(255));
    // out_valid must drop when no input
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
