// tb_detection_index: feeds frames of random binary pixels (with random gaps
// and different densities, including all-zero and all-one frames) and checks
// the per-frame sum, the d_valid pulse one clock after the last pixel, and
// that `clear` discards a partly accumulated frame.
module tb_detection_index;
  import vd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear = 0, in_valid = 0, in_last = 0, in_b = 0;
  logic d_valid;
  logic [IDX_W-1:0] d;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  detection_index dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic frame(int n, int density);
    int expected = 0;
    bit bit_v;
    for (int i = 0; i < n; i++) begin
      while ($urandom_range(3) == 0) begin
        in_valid <= 0; @(posedge clk);
        #1; checks++; if (d_valid) begin failures++; $display("FAIL early d_valid"); end
      end
      bit_v = ($urandom_range(99) < density);
      expected += bit_v;
      in_valid <= 1; in_b <= bit_v; in_last <= (i == n - 1);
      @(posedge clk);
    end
    in_valid <= 0; in_last <= 0;
    #1;
    checks++;
    if (!d_valid || d != IDX_W'(expected)) begin
      failures++;
      $display("FAIL frame n=%0d d=%0d exp=%0d valid=%0b", n, d, expected, d_valid);
    end
    @(posedge clk); #1;
    checks++;
    if (d_valid) begin failures++; $display("FAIL d_valid longer than a clock"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    frame(100, 50);
    frame(1000, 0);
    frame(1000, 100);
    frame(32004, 30);
    // partial frame, then clear, then a full frame
    for (int i = 0; i < 50; i++) begin in_valid <= 1; in_b <= 1; @(posedge clk); end
    in_valid <= 0; clear <= 1; @(posedge clk); clear <= 0;
    frame(300, 20);
    frame(5, 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
