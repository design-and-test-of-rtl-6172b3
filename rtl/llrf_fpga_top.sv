// llrf_fpga_top: FPGA of one LLRF control unit, pickup ADC in, klystron drive DAC out.
//
// The pickup IF (23.8 MHz, sampled at 95.2 MHz) is demodulated into I and Q,
// turned into amplitude and phase by a CORDIC, and compared with the set
// points in two separate PI channels, each with a feed-forward table that
// plays out a drive waveform after every trigger. The channel outputs set the
// amplitude and phase of the DDS that feeds the DAC. A PCI controller maps
// set points, gains, tables, live readings and a captured amplitude/phase
// waveform into BAR0 of the PCI bridge. This chain (Demod - CORDIC - PI/FF -
// DDS, with data reads and register writes over PCI) is the published LLRF design's; the
// trigger input, the register map and all word widths are this design's own.
//
// The fast RF interlock sits beside this chain with ports of its own (il_*):
// it watches forward and reverse power samples and drops il_rf_permit on a
// loss of forward power or on reverse power over the limit.
//
// Interface: adc_data is a signed 14-bit sample every clock, dac_data a
// signed 14-bit sample every clock. trig (or the CTRL soft trigger) marks the
// start of an RF pulse. The local bus is described in pci_ctrl.
// Timing: from a pickup sample to the drive it causes, about 27 clocks
// (demodulator 1-4, CORDIC 18, PI/FF 2, DDS 2).
module llrf_fpga_top
  import llrf_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    trig,
  input  logic signed [ADC_W-1:0] adc_data,
  output logic signed [DAC_W-1:0] dac_data,
  input  logic                    lb_wr,
  input  logic                    lb_rd,
  input  logic [LB_AW-1:0]        lb_addr,
  input  logic [LB_DW-1:0]        lb_wdata,
  output logic [LB_DW-1:0]        lb_rdata,
  output logic                    lb_rvalid,
  // fast RF interlock, a unit of its own beside the control chain
  input  logic                    il_rf_on,
  input  logic                    il_pwr_valid,
  input  logic [15:0]             il_fwd_pwr,
  input  logic [15:0]             il_rev_pwr,
  input  logic [15:0]             il_fwd_min,
  input  logic [15:0]             il_rev_max,
  input  logic                    il_clear,
  output logic                    il_rf_permit,
  output logic                    il_trip_loss,
  output logic                    il_trip_rev
);

  localparam int FF_AW   = $clog2(FF_DEPTH);
  localparam int WAVE_AW = $clog2(WAVE_DEPTH);

  settings_t               settings;
  readback_t               readback;
  logic                    soft_trig, pulse;
  logic                    ff_amp_we, ff_pha_we;
  logic [FF_AW-1:0]        ff_waddr;
  logic [15:0]             ff_wdata;
  logic [WAVE_AW-1:0]      wave_raddr;
  logic [31:0]             wave_rdata;
  logic                    wave_done;

  logic                    iq_valid;
  logic signed [IQ_W-1:0]  i_val, q_val;
  logic                    ap_valid;
  logic [AMP_W-1:0]        amp;
  logic [PHASE_W-1:0]      pha;
  logic                    drv_amp_valid, drv_pha_valid;
  logic [AMP_W-1:0]        drv_amp;
  logic [PHASE_W-1:0]      drv_pha;
  logic                    sat_amp, sat_pha;

  assign pulse = trig || soft_trig;

  iq_demod #(.ADC_W(ADC_W)) u_demod (
    .clk, .rst_n, .adc_data,
    .iq_valid, .i_out(i_val), .q_out(q_val)
  );

  cordic_vec #(.IN_W(IQ_W), .AMP_W(AMP_W), .PHASE_W(PHASE_W)) u_cordic (
    .clk, .rst_n,
    .in_valid(iq_valid), .i_in(i_val), .q_in(q_val),
    .out_valid(ap_valid), .amp, .phase(pha)
  );

  pi_ff_ctrl #(.W(AMP_W), .DEPTH(FF_DEPTH), .PHASE_MODE(1'b0)) u_ctrl_amp (
    .clk, .rst_n, .trig(pulse),
    .fb_en(settings.ctrl.fb_en_amp), .ff_en(settings.ctrl.ff_en_amp),
    .kp(settings.kp_amp), .ki(settings.ki_amp), .setpoint(settings.amp_sp),
    .meas_valid(ap_valid), .meas(amp),
    .ff_we(ff_amp_we), .ff_waddr, .ff_wdata(ff_wdata[AMP_W-1:0]),
    .out_valid(drv_amp_valid), .out_val(drv_amp), .sat(sat_amp)
  );

  pi_ff_ctrl #(.W(PHASE_W), .DEPTH(FF_DEPTH), .PHASE_MODE(1'b1)) u_ctrl_pha (
    .clk, .rst_n, .trig(pulse),
    .fb_en(settings.ctrl.fb_en_pha), .ff_en(settings.ctrl.ff_en_pha),
    .kp(settings.kp_pha), .ki(settings.ki_pha), .setpoint(settings.pha_sp),
    .meas_valid(ap_valid), .meas(pha),
    .ff_we(ff_pha_we), .ff_waddr, .ff_wdata(ff_wdata[PHASE_W-1:0]),
    .out_valid(drv_pha_valid), .out_val(drv_pha), .sat(sat_pha)
  );

  dds #(.DAC_W(DAC_W), .AMP_W(AMP_W), .PHASE_W(PHASE_W)) u_dds (
    .clk, .rst_n, .ftw(settings.dds_ftw),
    .amp(drv_amp), .pha(drv_pha), .dac_data
  );

  wave_capture #(.DEPTH(WAVE_DEPTH), .W(32)) u_wave (
    .clk, .rst_n, .trig(pulse),
    .in_valid(ap_valid), .in_data({pha, amp}),
    .rd_addr(wave_raddr), .rd_data(wave_rdata), .done(wave_done)
  );

  // Live values for the host, updated with each measurement
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      readback <= '0;
    end else begin
      if (iq_valid) begin
        readback.i <= i_val;
        readback.q <= q_val;
      end
      if (ap_valid) begin
        readback.amp <= amp;
        readback.pha <= pha;
      end
      if (drv_amp_valid) begin
        readback.drv_amp <= drv_amp;
        readback.sat_amp <= sat_amp;
      end
      if (drv_pha_valid) begin
        readback.drv_pha <= drv_pha;
        readback.sat_pha <= sat_pha;
      end
      readback.wave_done <= wave_done;
    end
  end

  pci_ctrl #(.FF_AW(FF_AW), .WAVE_AW(WAVE_AW)) u_pci (
    .clk, .rst_n,
    .lb_wr, .lb_rd, .lb_addr, .lb_wdata, .lb_rdata, .lb_rvalid,
    .settings, .soft_trig,
    .ff_amp_we, .ff_pha_we, .ff_waddr, .ff_wdata,
    .readback, .wave_raddr, .wave_rdata
  );

  rf_interlock #(.PWR_W(16)) u_interlock (
    .clk, .rst_n,
    .rf_on(il_rf_on), .pwr_valid(il_pwr_valid),
    .fwd_pwr(il_fwd_pwr), .rev_pwr(il_rev_pwr),
    .fwd_min(il_fwd_min), .rev_max(il_rev_max),
    .clear(il_clear),
    .rf_permit(il_rf_permit), .trip_loss(il_trip_loss), .trip_rev(il_trip_rev)
  );

endmodule
