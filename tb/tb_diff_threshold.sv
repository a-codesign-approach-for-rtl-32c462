// tb_diff_threshold: checks C = |F - I| and B = (C >= h) on edge cases
// (equal inputs, C exactly h and h - 1, h = 0, h = 255) and random data,
// the one-clock latency, and that out_last is only given with in_valid.
module tb_diff_threshold;
  import vd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0;
  pix_t in_f = 0, in_ref = 0, h = 80;
  logic out_valid, out_last, out_b;
  pix_t out_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  diff_threshold dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(int f, int r, int hh, bit last);
    int c;
    c = (f > r) ? f - r : r - f;
    in_valid <= 1; in_last <= last; in_f <= pix_t'(f); in_ref <= pix_t'(r); h <= pix_t'(hh);
    @(posedge clk);
    in_valid <= 0; in_last <= 0;
    #1;
    checks++;
    if (!out_valid || out_c != pix_t'(c) || out_b != (c >= hh) || out_last != last) begin
      failures++;
      if (failures < 10) $display("FAIL f=%0d r=%0d h=%0d c=%0d b=%0b", f, r, hh, out_c, out_b);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    apply(100, 100, 80, 0);
    apply(180, 100, 80, 0);
    apply(100, 180, 80, 0);
    apply(179, 100, 80, 0);
    apply(20, 99, 80, 1);
    apply(0, 255, 255, 0);
    apply(7, 7, 0, 0);
    apply(255, 0, 80, 0);
    for (int i = 0; i < 5000; i++)
      apply($urandom_range(255), $urandom_range(255), (i % 3 == 0) ? 80 : $urandom_range(255), i[0]);
    // in_last without in_valid is ignored
    in_last <= 1; @(posedge clk); in_last <= 0; #1;
    checks++;
    if (out_valid || out_last) begin failures++; $display("FAIL idle output"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
