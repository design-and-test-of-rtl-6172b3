// pi_ff_ctrl: one channel of PI feedback plus a feed-forward table.
//
// Two of these run side by side, one on amplitude and one on phase. For every
// measurement the channel forms the error e = set point - measurement, adds
// Ki*e to an integrator, and drives
//     u = FF[k] (if ff_en)  +  (Kp*e + integrator) >>> GAIN_SHIFT (if fb_en)
// where k counts measurements since the last trigger, so the table plays out a
// drive waveform over the RF pulse (and can hold the beam-loading
// compensation). In PHASE_MODE the error and the output wrap modulo one turn;
// otherwise the output is clamped to 0 .. 2^W-1 and the integrator is frozen
// while the output is clamped (anti-windup). The trigger restarts the table
// index and clears the integrator.
// The published LLRF design gives the structure (two separate PI channels, feed-forward
// table in the data flow); gain format, table depth, trigger, clamping and
// enables are this design's own choices. Kp and Ki are signed with
// GAIN_SHIFT fraction bits (default 8: 256 = gain 1).
//
// Timing: meas_valid may come every clock. The table read and the error are
// registered in the first clock, u appears on out_val with out_valid two
// clocks after meas_valid. The table is written from the host port
// (ff_we/ff_waddr/ff_wdata) at any time.
module pi_ff_ctrl #(
  parameter int W          = 16,
  parameter int DEPTH      = 1024,
  parameter bit PHASE_MODE = 1'b0,
  parameter int GAIN_SHIFT = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     trig,
  input  logic                     fb_en,
  input  logic                     ff_en,
  input  logic signed [15:0]       kp,
  input  logic signed [15:0]       ki,
  input  logic [W-1:0]             setpoint,
  input  logic                     meas_valid,
  input  logic [W-1:0]             meas,
  input  logic                     ff_we,
  input  logic [$clog2(DEPTH)-1:0] ff_waddr,
  input  logic [W-1:0]             ff_wdata,
  output logic                     out_valid,
  output logic [W-1:0]             out_val,
  output logic                     sat
);

  localparam int AW   = $clog2(DEPTH);
  localparam int EW   = W + 1;        // error width
  localparam int ACCW = W + 24;       // integrator width
  localparam int SW   = ACCW + 2;     // sum width

  logic [W-1:0]            ff_mem [DEPTH];
  logic [W-1:0]            ff_q;
  logic [AW-1:0]           idx;
  logic signed [EW-1:0]    err, err_r;
  logic                    v1;
  logic signed [ACCW-1:0]  acc;

  always_ff @(posedge clk) begin
    if (ff_we) ff_mem[ff_waddr] <= ff_wdata;
  end

  // Error: wrap to (-half turn, +half turn] for phase
  always_comb begin
    if (PHASE_MODE) err = EW'($signed(setpoint - meas));
    else            err = $signed({1'b0, setpoint}) - $signed({1'b0, meas});
  end

  // Stage 1: error and table read
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx   <= '0;
      err_r <= '0;
      v1    <= 1'b0;
      ff_q  <= '0;
    end else begin
      v1 <= meas_valid && !trig;
      if (trig) begin
        idx <= '0;
      end else if (meas_valid) begin
        err_r <= err;
        ff_q  <= ff_mem[idx];
        if (idx != AW'(DEPTH - 1)) idx <= idx + AW'(1);
      end
    end
  end

  // Stage 2: PI and sum
  logic signed [ACCW-1:0] acc_next, acc_lim;
  logic signed [SW-1:0]   p_term, pi_sum, u_full;
  logic                   clamp_lo, clamp_hi;

  localparam logic signed [ACCW-1:0] ACC_MAX = {2'b00, {(ACCW-2){1'b1}}};
  localparam logic signed [ACCW-1:0] ACC_MIN = -ACC_MAX;

  always_comb begin
    acc_next = acc + ACCW'(ki * err_r);
    // keep the integrator away from its own overflow
    if (acc_next > ACC_MAX)      acc_lim = ACC_MAX;
    else if (acc_next < ACC_MIN) acc_lim = ACC_MIN;
    else                         acc_lim = acc_next;
    p_term = SW'(kp * err_r);
    pi_sum = (p_term + SW'(acc_lim)) >>> GAIN_SHIFT;
    u_full = (ff_en ? SW'($signed({1'b0, ff_q})) : '0) + (fb_en ? pi_sum : '0);
    clamp_lo = !PHASE_MODE && (u_full < 0);
    clamp_hi = !PHASE_MODE && (u_full > SW'($signed({1'b0, {W{1'b1}}})));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_val   <= '0;
      sat       <= 1'b0;
    end else begin
      out_valid <= v1;
      if (trig || !fb_en) begin
        acc <= '0;
      end else if (v1 && !((clamp_lo && err_r < 0) || (clamp_hi && err_r > 0))) begin
        acc <= acc_lim;
      end
      if (v1) begin
        if (clamp_lo)      out_val <= '0;
        else if (clamp_hi) out_val <= '1;
        else               out_val <= u_full[W-1:0];
        sat <= clamp_lo || clamp_hi;
      end
    end
  end

endmodule
