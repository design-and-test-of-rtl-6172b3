// dds: direct digital synthesiser that produces the klystron drive IF for the DAC.
//
// A 32-bit phase accumulator advances by the frequency tuning word every
// clock (FTW = 2^30 gives clock/4, the 23.8 MHz IF). The phase set by the
// phase controller is added to the accumulator, the top LUT_AW bits address a
// cosine table, and the table value is scaled by the amplitude from the
// amplitude controller:
//     dac = cos(2*pi*(acc + pha*2^(32-PHASE_W))/2^32) * amp/2^AMP_W * (2^(DAC_W-1)-1)
// The published LLRF design names a DDS core driven by the two PI/FF channels; the table
// size, the word widths and the scaling are this design's own choices. The
// table holds round(32767*cos(2*pi*n/2^LUT_AW)) and is filled at start-up,
// so it synthesises to a ROM.
//
// Timing: the accumulator starts at 0 at reset (the same instant the I/Q
// demodulator's sample counter starts). amp and pha are sampled every clock;
// a change of either reaches dac_data 2 clocks later, and dac_data at clock m
// carries the accumulator value of clock m-2.
module dds #(
  parameter int DAC_W   = 14,
  parameter int AMP_W   = 16,
  parameter int PHASE_W = 16,
  parameter int LUT_AW  = 12
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [31:0]             ftw,
  input  logic [AMP_W-1:0]        amp,
  input  logic [PHASE_W-1:0]      pha,
  output logic signed [DAC_W-1:0] dac_data
);

  logic signed [15:0] cos_lut [2**LUT_AW];

  initial begin
    for (int n = 0; n < 2**LUT_AW; n++) begin
      cos_lut[n] = 16'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * n / (2.0 ** LUT_AW)) + 0.5)));
    end
  end

  logic [31:0]              acc;
  logic [31:0]              ph_sum;
  logic [AMP_W-1:0]         amp_r1;
  logic signed [15:0]       lut_q;
  logic signed [AMP_W+16:0] prod;

  assign ph_sum = acc + {pha, {(32-PHASE_W){1'b0}}};
  assign prod   = lut_q * $signed({1'b0, amp_r1});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      amp_r1   <= '0;
      lut_q    <= '0;
      dac_data <= '0;
    end else begin
      acc      <= acc + ftw;
      amp_r1   <= amp;
      lut_q    <= cos_lut[ph_sum[31 -: LUT_AW]];
      // 32767 * (2^AMP_W - 1) >> (AMP_W + 2) <= 2^(DAC_W-1) - 1 for DAC_W = 14
      dac_data <= DAC_W'(prod >>> (AMP_W + 15 - (DAC_W - 1)));
    end
  end

endmodule
