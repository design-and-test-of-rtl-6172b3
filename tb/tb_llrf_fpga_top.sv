// tb_llrf_fpga_top: end-to-end test of the LLRF FPGA with the DAC looped back to the ADC.
//
// The bench closes the RF loop in the simplest way: the DAC output reaches
// the ADC after a delay of PLANT_DELAY clocks (a fixed phase shift of the IF)
// with uniform noise of +/-NOISE counts added. All settings go through the
// local bus, as the host would do them. At the design's default parameters it
// runs these pulses:
//   1. open loop, feed-forward only, a drive step half-way through the table:
//      the measured amplitude and phase must follow the table, and the
//      captured waveform read over the bus must show both halves;
//   2. closed loop on amplitude and phase, with the phase set point needing
//      the phase output to wrap through zero: both must settle on the set
//      points;
//   3. an amplitude set point the DAC cannot reach: the output clamps and the
//      status register shows saturation;
//   4. open loop at a large amplitude, started by the soft trigger: the rms
//      spread of 1024 captured amplitude and phase samples is the detection
//      resolution, checked against 0.03 degree and 0.1 %;
//   5. the fast interlock: a loss of forward power inside the RF window and
//      a reverse-power sample over the limit must each drop the permit,
//      and clear must restore it.
// Each mechanism is counted and a mechanism that never happened is a failure.
module tb_llrf_fpga_top;
  import llrf_pkg::*;

  localparam int PLANT_DELAY = 5;
  localparam int NOISE = 3;
  localparam int PULSE_CLKS = 4 * FF_DEPTH + 200;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic trig;
  logic signed [ADC_W-1:0] adc_data;
  logic signed [DAC_W-1:0] dac_data;
  logic lb_wr, lb_rd;
  logic [LB_AW-1:0] lb_addr;
  logic [LB_DW-1:0] lb_wdata, lb_rdata;
  logic lb_rvalid;
  logic il_rf_on, il_pwr_valid, il_clear, il_rf_permit, il_trip_loss, il_trip_rev;
  logic [15:0] il_fwd_pwr, il_rev_pwr, il_fwd_min, il_rev_max;

  int checks = 0, failures = 0;
  int n_ff_step = 0, n_wave = 0, n_fb_amp = 0, n_fb_pha = 0, n_wrap = 0;
  int n_sat = 0, n_soft_trig = 0, n_ext_trig = 0, n_resolution = 0;
  int n_il_loss = 0, n_il_rev = 0;

  llrf_fpga_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Loop-back plant
  logic signed [DAC_W-1:0] dline [PLANT_DELAY];
  always @(posedge clk) begin
    int v;
    dline[0] <= dac_data;
    for (int k = 1; k < PLANT_DELAY; k++) dline[k] <= dline[k-1];
    v = int'(dline[PLANT_DELAY-1]) + $urandom_range(0, 2 * NOISE) - NOISE;
    if (v > 8191) v = 8191;
    if (v < -8192) v = -8192;
    adc_data <= ADC_W'(v);
  end

  // ---------------------------------------------------------------- bus
  task automatic bus_write(input logic [LB_AW-1:0] a, input logic [31:0] d);
    @(negedge clk);
    lb_wr = 1; lb_addr = a; lb_wdata = d;
    @(negedge clk);
    lb_wr = 0;
  endtask

  task automatic bus_read(input logic [LB_AW-1:0] a, output logic [31:0] d);
    @(negedge clk);
    lb_rd = 1; lb_addr = a;
    @(negedge clk);
    lb_rd = 0;
    @(negedge clk);
    checks++;
    if (!lb_rvalid) begin failures++; $display("read of %h not answered", a); end
    d = lb_rdata;
  endtask

  task automatic load_tables(input int amp0, input int amp1, input int pha0, input int pha1);
    for (int k = 0; k < FF_DEPTH; k++) begin
      bus_write(LB_AW'(12'h400 + k), 32'(k < FF_DEPTH / 2 ? amp0 : amp1));
      bus_write(LB_AW'(12'h800 + k), 32'(k < FF_DEPTH / 2 ? pha0 : pha1));
    end
  endtask

  task automatic ext_pulse();
    @(negedge clk); trig = 1;
    @(negedge clk); trig = 0;
    n_ext_trig++;
  endtask

  task automatic read_ap(output int a, output int p);
    logic [31:0] d;
    bus_read(REG_AMPPHA, d);
    a = int'(d[15:0]);
    p = int'(d[31:16]);
  endtask

  // mean amplitude and mean phase (relative to pref) of n captured samples
  task automatic wave_avg(input int first, input int n, input int pref, output real ma, output real mp);
    logic [31:0] w;
    ma = 0.0; mp = 0.0;
    for (int k = first; k < first + n; k++) begin
      bus_read(LB_AW'(12'hC00 + k), w);
      ma += real'(w[15:0]);
      mp += real'(pdiff(int'(w[31:16]), pref));
    end
    ma = ma / n; mp = mp / n;
  endtask

  function automatic int pdiff(input int a, input int b);  // a - b in (-32768, 32768]
    int d;
    d = (a - b) & 16'hFFFF;
    return (d > 32768) ? d - 65536 : d;
  endfunction

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic bit near(input real got, input real want, input real tol);
    return absr(got - want) <= tol;
  endfunction

  // ---------------------------------------------------------------- test
  int a1, p1, a2, p2, p0;
  real ma1, mp1, ma2, mp2;
  logic [31:0] d;

  initial begin
    trig = 0; lb_wr = 0; lb_rd = 0; lb_addr = 0; lb_wdata = 0;
    il_rf_on = 0; il_pwr_valid = 0; il_clear = 0; il_fwd_pwr = 16'd30000; il_rev_pwr = 16'd100;
    il_fwd_min = 16'd20000; il_rev_max = 16'd8000;
    for (int k = 0; k < PLANT_DELAY; k++) dline[k] = '0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    bus_read(REG_ID, d);
    checks++;
    if (d != ID_VALUE) begin failures++; $display("ID %h", d); end

    // ---- 1. open loop, feed-forward step
    load_tables(16000, 24000, 0, 16'h2000);
    bus_write(REG_CTRL, 32'h0C);  // ff_en_amp, ff_en_pha
    ext_pulse();
    repeat (4 * 400) @(posedge clk);
    read_ap(a1, p1);
    repeat (4 * 500) @(posedge clk);
    read_ap(a2, p2);
    $display("open loop, live: amp %0d -> %0d, phase %0d -> %0d", a1, a2, p1, p2);
    checks++;
    if (near(a1, 4000.0, 12.0) && near(a2, 6000.0, 18.0) &&
        near(pdiff(p2, p1), 8192.0, 30.0)) n_ff_step++;
    else begin failures++; $display("feed-forward step not followed"); end
    repeat (PULSE_CLKS - 4 * 900) @(posedge clk);
    bus_read(REG_STATUS, d);
    checks++;
    if (!d[0]) begin failures++; $display("waveform capture not done"); end
    // the captured waveform gives the loop phase with drive phase 0
    bus_read(LB_AW'(12'hC00 + 100), d);
    p0 = int'(d[31:16]);
    wave_avg(100, 300, p0, ma1, mp1);
    p0 = (p0 + int'($floor(mp1 + 0.5))) & 16'hFFFF;
    wave_avg(600, 300, p0, ma2, mp2);
    $display("open loop, captured: amp %f -> %f, phase step %f LSB", ma1, ma2, mp2);
    checks++;
    if (near(ma1, 4000.0, 8.0) && near(ma2, 6000.0, 12.0) && near(mp2, 8192.0, 3.0)) n_wave++;
    else begin failures++; $display("captured waveform wrong"); end

    // ---- 2. closed loop, phase output wraps through zero
    load_tables(16000, 16000, 16'hF000, 16'hF000);
    bus_write(REG_AMP_SP, 32'd5000);
    bus_write(REG_PHA_SP, 32'((p0 + 16'h1000) & 16'hFFFF));
    bus_write(REG_KP_AMP, 32'd0);
    bus_write(REG_KI_AMP, 32'd32);
    bus_write(REG_KP_PHA, 32'd32);
    bus_write(REG_KI_PHA, 32'd8);
    bus_write(REG_CTRL, 32'h0F);
    ext_pulse();
    repeat (PULSE_CLKS) @(posedge clk);
    wave_avg(FF_DEPTH - 256, 256, p0 + 16'h1000, ma1, mp1);
    bus_read(REG_DRIVE, d);
    $display("closed loop: amp %f phase error %f LSB, drive amp %0d phase %h",
             ma1, mp1, d[15:0], d[31:16]);
    checks++;
    if (near(ma1, 5000.0, 3.0)) n_fb_amp++;
    else begin failures++; $display("amplitude loop did not settle"); end
    checks++;
    if (near(mp1, 0.0, 3.0)) n_fb_pha++;
    else begin failures++; $display("phase loop did not settle"); end
    checks++;
    if (near(real'(d[15:0]), 20000.0, 100.0) && near(pdiff(int'(d[31:16]), 16'h1000), 0.0, 40.0)) n_wrap++;
    else begin failures++; $display("drive not as expected (wrap)"); end
    bus_read(REG_STATUS, d);
    checks++;
    if (d[1] || d[2]) begin failures++; $display("unexpected saturation flag"); end

    // ---- 3. unreachable amplitude: clamp
    bus_write(REG_AMP_SP, 32'd20000);
    ext_pulse();
    repeat (PULSE_CLKS - 400) @(posedge clk);
    read_ap(a1, p1);
    bus_read(REG_STATUS, d);
    $display("saturation: amp %0d status %h", a1, d);
    checks++;
    if (d[1] && near(a1, 16383.0, 40.0)) n_sat++;
    else begin failures++; $display("saturation not seen"); end

    // ---- 4. detection resolution, soft trigger
    load_tables(60000, 60000, 16'h3000, 16'h3000);
    bus_write(REG_CTRL, 32'h1C);  // feed-forward only, soft trigger
    n_soft_trig++;
    repeat (PULSE_CLKS) @(posedge clk);
    bus_read(REG_STATUS, d);
    checks++;
    if (!d[0]) begin failures++; $display("capture after soft trigger not done"); end
    begin
      real sa = 0, saa = 0, sp = 0, spp = 0, ma, mp, ra, rp;
      int n = 0;
      for (int k = 64; k < FF_DEPTH; k++) begin
        bus_read(LB_AW'(12'hC00 + k), d);
        sa += real'(d[15:0]); saa += real'(d[15:0]) ** 2;
        sp += real'(pdiff(int'(d[31:16]), p0 + 16'h3000));
        spp += real'(pdiff(int'(d[31:16]), p0 + 16'h3000)) ** 2;
        n++;
      end
      ma = sa / n; mp = sp / n;
      ra = $sqrt(saa / n - ma * ma) / ma * 100.0;
      rp = $sqrt(spp / n - mp * mp) * 360.0 / 65536.0;
      $display("resolution: mean amp %f rms %f %%, mean phase offset %f LSB rms %f deg",
               ma, ra, mp, rp);
      checks++;
      if (ra < 0.1 && rp < 0.03 && rp > 0.0 && near(ma, 15000.0, 40.0) && near(mp, 0.0, 10.0))
        n_resolution++;
      else begin failures++; $display("resolution check failed"); end
    end

    // ---- 5. fast interlock: loss of forward power, then reverse power
    il_rf_on = 1; il_pwr_valid = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (!il_rf_permit) begin failures++; $display("interlock tripped on good power"); end
    il_fwd_pwr = 16'd500;
    repeat (6) @(negedge clk);
    checks++;
    if (!il_rf_permit && il_trip_loss && !il_trip_rev) n_il_loss++;
    else begin failures++; $display("loss of power did not trip"); end
    il_fwd_pwr = 16'd30000;
    il_clear = 1; @(negedge clk); il_clear = 0;
    il_rev_pwr = 16'd9000; @(negedge clk); il_rev_pwr = 16'd100;
    @(negedge clk);
    checks++;
    if (!il_rf_permit && il_trip_rev && !il_trip_loss) n_il_rev++;
    else begin failures++; $display("reverse power did not trip"); end
    il_clear = 1; @(negedge clk); il_clear = 0;
    @(negedge clk);
    checks++;
    if (!il_rf_permit) begin failures++; $display("clear did not restore the permit"); end

    // ---- every mechanism seen?
    $display("mechanisms: ff_step=%0d wave=%0d fb_amp=%0d fb_pha=%0d wrap=%0d sat=%0d soft_trig=%0d ext_trig=%0d resolution=%0d il_loss=%0d il_rev=%0d",
             n_ff_step, n_wave, n_fb_amp, n_fb_pha, n_wrap, n_sat, n_soft_trig, n_ext_trig, n_resolution, n_il_loss, n_il_rev);
    checks++;
    if (n_ff_step == 0 || n_wave == 0 || n_fb_amp == 0 || n_fb_pha == 0 || n_wrap == 0 ||
        n_sat == 0 || n_soft_trig == 0 || n_ext_trig == 0 || n_resolution == 0 ||
        n_il_loss == 0 || n_il_rev == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
