// iq_demod: I/Q demodulator for an IF at exactly one quarter of the sample clock.
//
// With the IF at clock/4 (23.8 MHz at 95.2 MHz) successive samples of
// A*cos(pi/2*n + phi) are A*cos(phi), -A*sin(phi), -A*cos(phi), A*sin(phi).
// A 2-bit counter names the sample position; after every group of four
// samples the block outputs I = x0 - x2 = 2*A*cos(phi) and
// Q = x3 - x1 = 2*A*sin(phi). Taking the differences cancels any ADC offset.
// The clock/4 relation is from the published LLRF design; the non-overlapping four-sample
// window, the factor of two kept in the output and the reset behaviour are
// this design's own choices.
//
// Timing: one sample per clock; iq_valid pulses for one clock, one clock
// after the fourth sample of a group, i.e. every fourth clock. The sample
// counter starts at 0 after reset, so the phase reference is the reset instant
// (the DDS accumulator starts from the same instant).
module iq_demod #(
  parameter int ADC_W = 14
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic                    iq_valid,
  output logic signed [ADC_W:0]   i_out,
  output logic signed [ADC_W:0]   q_out
);

  logic [1:0]              pos;
  logic signed [ADC_W-1:0] x0, x1, x2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pos      <= '0;
      x0       <= '0;
      x1       <= '0;
      x2       <= '0;
      iq_valid <= 1'b0;
      i_out    <= '0;
      q_out    <= '0;
    end else begin
      pos      <= pos + 2'd1;
      iq_valid <= 1'b0;
      unique case (pos)
        2'd0: x0 <= adc_data;
        2'd1: x1 <= adc_data;
        2'd2: x2 <= adc_data;
        2'd3: begin
          i_out    <= (ADC_W+1)'(x0) - (ADC_W+1)'(x2);
          q_out    <= (ADC_W+1)'(adc_data) - (ADC_W+1)'(x1);
          iq_valid <= 1'b1;
        end
      endcase
    end
  end

endmodule
