// event_detector: minimum-area test and local-maximum search on the
// sequence of detection indices, and vehicle counting.
//
// Each new detection index d_i (d_valid) is compared once with the minimum
// area: present = (d_i >= min_area). The previous two indices d_{i-1} and
// d_{i-2} are kept; frame i-1 is the moment of maximum invasion of a vehicle
// (a peak) when d_{i-1} > d_{i-2} and d_{i-1} > d_i, the two comparisons of
// the detector's algorithm, and when d_{i-1} also reaches the minimum area.
// Each peak increments the vehicle count and records d_{i-1} in peak_d.
// Before the first frames, and after `clear`, the history reads as zero.
//
// The comparisons follow the algorithm; gating the peak with the minimum area,
// the zero history and the counter held in hardware are this implementation's
// choices. Timing: res_valid, present and peak one clock after d_valid; a
// peak is reported with the frame after it.
module event_detector
  import vd_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             d_valid,
  input  logic [IDX_W-1:0] d,
  input  logic [IDX_W-1:0] min_area,
  output logic             res_valid,
  output logic             present,     // d_i >= min_area
  output logic             peak,        // frame i-1 was a local maximum
  output logic [IDX_W-1:0] last_d,      // d_i
  output logic [IDX_W-1:0] peak_d,      // d of the last peak
  output logic [CNT_W-1:0] count        // vehicles counted
);

  logic [IDX_W-1:0] d_m1, d_m2;
  logic             is_peak;

  assign is_peak = (d_m1 > d_m2) && (d_m1 > d) && (d_m1 >= min_area);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_m1      <= '0;
      d_m2      <= '0;
      res_valid <= 1'b0;
      present   <= 1'b0;
      peak      <= 1'b0;
      last_d    <= '0;
      peak_d    <= '0;
      count     <= '0;
    end else begin
      res_valid <= 1'b0;
      if (clear) begin
        d_m1    <= '0;
        d_m2    <= '0;
        present <= 1'b0;
        peak    <= 1'b0;
        last_d  <= '0;
        peak_d  <= '0;
        count   <= '0;
      end else if (d_valid) begin
        d_m2      <= d_m1;
        d_m1      <= d;
        last_d    <= d;
        res_valid <= 1'b1;
        present   <= (d >= min_area);
        peak      <= is_peak;
        if (is_peak) begin
          peak_d <= d_m1;
          count  <= count + 1'b1;
        end
      end
    end
  end

endmodule
