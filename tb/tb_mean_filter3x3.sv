// tb_mean_filter3x3: streams random images (a small 6 x 10 image with gaps
// between pixels and a full 128 x 256 image back to back) through the 3x3
// mean filter and checks every interior output against round(sum / 9)
// computed here, in raster order, with its tag (the centre's linear index),
// the out_last flag, the number of outputs ((ROWS-2) x (COLS-2)) and the
// two-clock latency from the completing pixel to the result.
module tb_mean_filter3x3;
  import vd_pkg::*;

  localparam int SC = 10, SR = 6;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // small instance
  logic s_in_valid = 0, s_in_sof = 0;
  pix_t s_in_pix = 0;
  logic [15:0] s_in_tag = 0;
  logic s_out_valid, s_out_last;
  pix_t s_out_mean;
  logic [15:0] s_out_tag;

  mean_filter3x3 #(.COLS(SC), .ROWS(SR), .TAG_W(16)) dut_s (
    .clk, .rst_n, .in_valid(s_in_valid), .in_sof(s_in_sof), .in_pix(s_in_pix),
    .in_tag(s_in_tag), .out_valid(s_out_valid), .out_last(s_out_last),
    .out_mean(s_out_mean), .out_tag(s_out_tag));

  // full-size instance (the detector's 128 x 256 window)
  logic f_in_valid = 0, f_in_sof = 0;
  pix_t f_in_pix = 0;
  logic [15:0] f_in_tag = 0;
  logic f_out_valid, f_out_last;
  pix_t f_out_mean;
  logic [15:0] f_out_tag;

  mean_filter3x3 #(.TAG_W(16)) dut_f (
    .clk, .rst_n, .in_valid(f_in_valid), .in_sof(f_in_sof), .in_pix(f_in_pix),
    .in_tag(f_in_tag), .out_valid(f_out_valid), .out_last(f_out_last),
    .out_mean(f_out_mean), .out_tag(f_out_tag));

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results queue, shared by whichever instance is being driven
  int exp_mean[$], exp_tag[$], exp_last[$], exp_time[$];
  int outputs = 0;
  int img[];
  int cycle = 0;
  always @(posedge clk) cycle++;

  function automatic int mean_at(int rows, int cols, int r, int c);
    int s = 0;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        s += img[(r + dr) * cols + (c + dc)];
    return (s + 4) / 9;   // nearest integer; s/9 never ends in exactly .5
  endfunction

  task automatic run_image(bit is_small, int rows, int cols, bit gaps);
    int r, c;
    img = new[rows * cols];
    foreach (img[i]) img[i] = (i % 7 == 0) ? 255 : $urandom_range(255);
    for (int p = 0; p < rows * cols; p++) begin
      r = p / cols;
      c = p % cols;
      @(negedge clk);
      s_in_valid = 0; f_in_valid = 0; s_in_sof = 0; f_in_sof = 0;
      if (gaps) while ($urandom_range(2) == 0) @(negedge clk);
      if (r >= 2 && c >= 2) begin
        exp_mean.push_back(mean_at(rows, cols, r - 1, c - 1));
        exp_tag.push_back((r - 1) * cols + (c - 1));
        exp_last.push_back(p == rows * cols - 1);
        exp_time.push_back(cycle + 2);
      end
      if (is_small) begin
        s_in_valid = 1; s_in_sof = (p == 0); s_in_pix = pix_t'(img[p]);
        s_in_tag = 16'((r - 1) * cols + (c - 1));
      end else begin
        f_in_valid = 1; f_in_sof = (p == 0); f_in_pix = pix_t'(img[p]);
        f_in_tag = 16'((r - 1) * cols + (c - 1));
      end
    end
    @(negedge clk);
    s_in_valid = 0; f_in_valid = 0; s_in_sof = 0; f_in_sof = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic check_out(logic v, logic last, pix_t m, logic [15:0] t);
    if (v) begin
      outputs++;
      checks++;
      if (exp_mean.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        int em, et, el, etm;
        em = exp_mean.pop_front();
        et = exp_tag.pop_front();
        el = exp_last.pop_front();
        etm = exp_time.pop_front();
        if (m != pix_t'(em) || t != 16'(et) || last != el[0] || cycle != etm) begin
          failures++;
          if (failures < 10) $display("FAIL mean=%0d exp=%0d tag=%0d exp=%0d last=%0b cyc=%0d exp=%0d",
                                      m, em, t, et, last, cycle, etm);
        end
      end
    end
  endtask

  always @(negedge clk) begin
    check_out(s_out_valid, s_out_last, s_out_mean, s_out_tag);
    check_out(f_out_valid, f_out_last, f_out_mean, f_out_tag);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_image(1, SR, SC, 1);
    run_image(1, SR, SC, 0);
    checks++;
    if (outputs != 2 * (SR - 2) * (SC - 2) || exp_mean.size() != 0) begin
      failures++; $display("FAIL small output count %0d", outputs);
    end
    outputs = 0;
    run_image(0, IMG_ROWS, IMG_COLS, 0);
    checks++;
    if (outputs != (IMG_ROWS - 2) * (IMG_COLS - 2) || exp_mean.size() != 0) begin
      failures++; $display("FAIL full output count %0d", outputs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
