// cordic_vec: pipelined CORDIC in vectoring mode, I/Q to amplitude and phase.
//
// The input vector is first folded into the right half plane (a rotation by
// 180 degrees when I < 0). Each of the STAGES pipeline stages then rotates it
// by +/- atan(2^-k), driving Q towards zero and accumulating the rotation
// angle. At the end x holds K*|v| (K = 1.6468, the CORDIC gain) and z holds
// atan2(Q, I). A final stage multiplies x by round(2^16/K) = 39797 to remove
// the gain. The published LLRF design names a CORDIC that turns I/Q into amplitude and
// phase; the stage count, word widths and gain correction are this design's
// own.
//
// Phase: unsigned PHASE_W-bit fraction of a turn (2^PHASE_W = 360 degrees).
// Amplitude: |v| in input units, AMP_W bits, saturating.
// Timing: fully pipelined, one vector per clock, latency STAGES + 2 clocks;
// out_valid follows in_valid through the pipeline.
module cordic_vec #(
  parameter int IN_W    = 15,
  parameter int AMP_W   = 16,
  parameter int PHASE_W = 16,
  parameter int STAGES  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  output logic                   out_valid,
  output logic [AMP_W-1:0]       amp,
  output logic [PHASE_W-1:0]     phase
);

  // Two guard bits for the gain growth, FRAC fraction bits for rounding
  localparam int FRAC = 4;
  localparam int XW   = IN_W + 2 + FRAC;
  localparam int ZW   = 32;  // internal angle: 2^32 = one turn

  // atan(2^-k) as a fraction of a turn times 2^32
  localparam logic [31:0] ATAN_TAB [24] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861,
    32'd10430,     32'd5215,      32'd2608,      32'd1304,
    32'd652,       32'd326,       32'd163,       32'd81
  };
  localparam logic [16:0] INV_GAIN = 17'd39797;  // round(2^16 / 1.6467602)

  logic signed [XW-1:0] xs [STAGES+1];
  logic signed [XW-1:0] ys [STAGES+1];
  logic        [ZW-1:0] zs [STAGES+1];
  logic                 vs [STAGES+1];

  // Stage 0: fold into the right half plane
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      vs[0] <= 1'b0;
    end else begin
      vs[0] <= in_valid;
      if (i_in < 0) begin
        xs[0] <= -(XW'(i_in) <<< FRAC);
        ys[0] <= -(XW'(q_in) <<< FRAC);
        zs[0] <= 32'h8000_0000;
      end else begin
        xs[0] <= XW'(i_in) <<< FRAC;
        ys[0] <= XW'(q_in) <<< FRAC;
        zs[0] <= '0;
      end
    end
  end

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        xs[k+1] <= '0;
        ys[k+1] <= '0;
        zs[k+1] <= '0;
        vs[k+1] <= 1'b0;
      end else begin
        vs[k+1] <= vs[k];
        if (ys[k] >= 0) begin
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + ATAN_TAB[k];
        end else begin
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - ATAN_TAB[k];
        end
      end
    end
  end

  // Gain correction and output rounding
  logic [XW+16:0] amp_full;
  logic [XW+16:0] amp_scaled;
  logic [ZW-1:0]  z_round;
  assign amp_full   = (XW+17)'($unsigned(xs[STAGES])) * (XW+17)'(INV_GAIN);
  assign amp_scaled = (amp_full + (XW+17)'(1 << (16 + FRAC - 1))) >> (16 + FRAC);
  assign z_round    = zs[STAGES] + ZW'(1 << (ZW - PHASE_W - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      amp       <= '0;
      phase     <= '0;
    end else begin
      out_valid <= vs[STAGES];
      amp       <= (amp_scaled > (XW+17)'({AMP_W{1'b1}})) ? {AMP_W{1'b1}} : AMP_W'(amp_scaled);
      phase     <= z_round[ZW-1 -: PHASE_W];
    end
  end

endmodule
