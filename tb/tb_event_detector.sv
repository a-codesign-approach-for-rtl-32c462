// tb_event_detector: drives sequences of detection indices, including the
// shape of a typical surveillance run (quiet frames, single-frame and
// multi-frame vehicle passages, a plateau, a peak below the minimum area) and
// random sequences, and checks present, peak, peak_d and the vehicle count
// against a reference computed in the testbench. Also checks `clear`.
module tb_event_detector;
  import vd_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear = 0, d_valid = 0;
  logic [IDX_W-1:0] d = 0, min_area = AREA_DEFAULT;
  logic res_valid, present, peak;
  logic [IDX_W-1:0] last_d, peak_d;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;
  int m1 = 0, m2 = 0, cnt = 0, pk_d = 0, peaks_seen = 0;

  always #5 clk = ~clk;

  event_detector dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(int val, int area);
    bit exp_peak, exp_present;
    exp_peak    = (m1 > m2) && (m1 > val) && (m1 >= area);
    exp_present = (val >= area);
    if (exp_peak) begin cnt++; pk_d = m1; peaks_seen++; end
    m2 = m1; m1 = val;
    min_area <= IDX_W'(area);
    d <= IDX_W'(val); d_valid <= 1;
    @(posedge clk);
    d_valid <= 0;
    #1;
    checks++;
    if (!res_valid || present != exp_present || peak != exp_peak || count != CNT_W'(cnt)
        || peak_d != IDX_W'(pk_d) || last_d != IDX_W'(val)) begin
      failures++;
      $display("FAIL d=%0d present=%0b/%0b peak=%0b/%0b count=%0d/%0d peak_d=%0d/%0d",
               val, present, exp_present, peak, exp_peak, count, cnt, peak_d, pk_d);
    end
    @(posedge clk);
  endtask

  int seq1[] = '{0, 0, 12, 5, 0, 0, 0, 0, 0, 3, 2400, 3100, 1500, 1800, 1200, 0, 0, 0, 0,
                 0, 2000, 4200, 2500, 900, 0, 0, 0, 0, 0, 1500, 3000, 2800, 0, 0,
                 1500, 1500, 200, 800, 990, 10, 0};

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    foreach (seq1[i]) push(seq1[i], 1000);
    // expected peaks: 3100, 1800, 4200, 3000 (plateau at 1500 and 990 < area are not peaks)
    checks++;
    if (cnt != 4 || count != 4) begin failures++; $display("FAIL count %0d", count); end
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    m1 = 0; m2 = 0; cnt = 0; pk_d = 0;
    #1; checks++;
    if (count != 0 || peak_d != 0) begin failures++; $display("FAIL clear"); end
    for (int i = 0; i < 3000; i++) push($urandom_range(4000), (i < 1500) ? 1000 : $urandom_range(3000));
    $display("peaks seen %0d", peaks_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
