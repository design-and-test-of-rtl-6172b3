// rf_interlock: fast RF interlock, loss-of-power and reverse-power protection.
//
// Two checks run on every power sample:
//   - loss of power: while the RF pulse window (rf_on) is open, the forward
//     power must stay at or above fwd_min; LOSS_COUNT low samples in a row
//     trip the interlock (the count skips over short dips at the pulse edges);
//   - reverse power over limit: a single sample with rev_pwr above rev_max
//     trips it at once.
// A trip is latched, with the cause, and drops rf_permit until clear is
// pulsed. The published LLRF design asks for loss-of-power and reverse-power protection
// from a fast interlock module; the thresholds as inputs, the sample
// interface, the loss counter and the latching are this design's own.
//
// Timing: pwr_valid marks a sample pair; a trip shows on rf_permit one clock
// after the sample that causes it. clear wins over a trip in the same clock.
module rf_interlock #(
  parameter int PWR_W      = 16,
  parameter int LOSS_COUNT = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rf_on,
  input  logic             pwr_valid,
  input  logic [PWR_W-1:0] fwd_pwr,
  input  logic [PWR_W-1:0] rev_pwr,
  input  logic [PWR_W-1:0] fwd_min,
  input  logic [PWR_W-1:0] rev_max,
  input  logic             clear,
  output logic             rf_permit,
  output logic             trip_loss,
  output logic             trip_rev
);

  localparam int CW = $clog2(LOSS_COUNT + 1);

  logic [CW-1:0] low_cnt;

  assign rf_permit = !(trip_loss || trip_rev);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      low_cnt   <= '0;
      trip_loss <= 1'b0;
      trip_rev  <= 1'b0;
    end else if (pwr_valid) begin
      if (rev_pwr > rev_max) trip_rev <= 1'b1;
      if (rf_on && fwd_pwr < fwd_min) begin
        if (low_cnt == CW'(LOSS_COUNT - 1)) trip_loss <= 1'b1;
        else                                 low_cnt   <= low_cnt + CW'(1);
      end else begin
        low_cnt <= '0;
      end
    end
  end

endmodule
