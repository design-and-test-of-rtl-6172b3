// tb_pci_ctrl: self-checking test of the BAR0 register map.
//
// Checks the reset values (identification word, tuning word for clock/4),
// writes every control register with random data and reads it back through
// the local bus, checks the settings outputs, the one-clock soft trigger,
// the write strobes of the two feed-forward windows (and that other writes
// do not strobe them), reads of the live values from a driven readback
// struct, and reads of the waveform window from a small RAM model. Every
// read must return data exactly two clocks after its strobe.
module tb_pci_ctrl;
  import llrf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lb_wr, lb_rd;
  logic [LB_AW-1:0] lb_addr;
  logic [LB_DW-1:0] lb_wdata, lb_rdata;
  logic lb_rvalid;
  settings_t settings;
  logic soft_trig, ff_amp_we, ff_pha_we;
  logic [9:0] ff_waddr, wave_raddr;
  logic [15:0] ff_wdata;
  readback_t readback;
  logic [31:0] wave_rdata;

  int checks = 0, failures = 0;
  int n_trig = 0, n_ffa = 0, n_ffp = 0;
  logic [9:0] last_ffa_addr, last_ffp_addr;
  logic [15:0] last_ffa_data, last_ffp_data;

  pci_ctrl #(.FF_AW(10), .WAVE_AW(10)) dut (.*);

  always #5 clk = ~clk;

  // waveform RAM model: one-clock read of a fixed pattern
  always @(posedge clk) wave_rdata <= {wave_raddr, 6'h2A, ~wave_raddr, 6'h15};

  always @(posedge clk) begin
    if (soft_trig) n_trig++;
    if (ff_amp_we) begin n_ffa++; last_ffa_addr <= ff_waddr; last_ffa_data <= ff_wdata; end
    if (ff_pha_we) begin n_ffp++; last_ffp_addr <= ff_waddr; last_ffp_data <= ff_wdata; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    checks++;
    if (lb_rvalid) begin failures++; $display("rvalid one clock early"); end
    @(negedge clk);
    checks++;
    if (!lb_rvalid) begin failures++; $display("rvalid missing two clocks after read"); end
    d = lb_rdata;
  endtask

  task automatic expect_read(input logic [LB_AW-1:0] a, input logic [31:0] e);
    logic [31:0] d;
    bus_read(a, d);
    checks++;
    if (d != e) begin
      failures++;
      $display("read %h: %h, expected %h", a, d, e);
    end
  endtask

  logic [31:0] val [9];
  localparam logic [LB_AW-1:0] RW_ADDR [8] = '{REG_AMP_SP, REG_PHA_SP, REG_KP_AMP, REG_KI_AMP,
                                               REG_KP_PHA, REG_KI_PHA, REG_DDS_FTW, REG_CTRL};
  localparam logic [31:0] RW_MASK [8] = '{32'hFFFF, 32'hFFFF, 32'hFFFF, 32'hFFFF,
                                          32'hFFFF, 32'hFFFF, 32'hFFFF_FFFF, 32'hFFFF_FFEF};

  initial begin
    lb_wr = 0; lb_rd = 0; lb_addr = 0; lb_wdata = 0;
    readback = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    expect_read(REG_ID, 32'h4C4C_5246);
    expect_read(REG_DDS_FTW, 32'h4000_0000);
    expect_read(REG_CTRL, 32'h0);
    for (int rep = 0; rep < 20; rep++) begin
      for (int r = 0; r < 8; r++) begin
        val[r] = $urandom() & RW_MASK[r];
        bus_write(RW_ADDR[r], val[r]);
      end
      for (int r = 0; r < 8; r++) expect_read(RW_ADDR[r], val[r]);
      checks++;
      if (settings.amp_sp != val[0][15:0] || settings.pha_sp != val[1][15:0] ||
          settings.kp_amp != val[2][15:0] || settings.ki_amp != val[3][15:0] ||
          settings.kp_pha != val[4][15:0] || settings.ki_pha != val[5][15:0] ||
          settings.dds_ftw != val[6] || 32'(settings.ctrl) != val[7]) begin
        failures++;
        $display("settings outputs do not match the registers");
      end
    end
    // soft trigger: one pulse per write with bit 4, bit reads back 0
    bus_write(REG_CTRL, 32'h1F);
    repeat (2) @(negedge clk);
    checks++;
    if (n_trig != 1) begin failures++; $display("soft trigger pulses: %0d", n_trig); end
    expect_read(REG_CTRL, 32'h0F);
    checks++;
    if (!settings.ctrl.fb_en_amp || !settings.ctrl.ff_en_pha) begin
      failures++; $display("ctrl fields wrong");
    end
    // feed-forward windows
    bus_write(12'h400 + 12'd5, 32'h0001_1234);
    @(negedge clk);
    checks++;
    if (n_ffa != 1 || n_ffp != 0 || last_ffa_addr != 10'd5 || last_ffa_data != 16'h1234) begin
      failures++; $display("FF amp write wrong: %0d %0d %h %h", n_ffa, n_ffp, last_ffa_addr, last_ffa_data);
    end
    bus_write(12'hBFF, 32'h0000_ABCD);
    @(negedge clk);
    checks++;
    if (n_ffa != 1 || n_ffp != 1 || last_ffp_addr != 10'h3FF || last_ffp_data != 16'hABCD) begin
      failures++; $display("FF phase write wrong");
    end
    bus_write(REG_AMPPHA, 32'h5555_5555);  // read-only: ignored, no strobe
    bus_write(12'hC10, 32'h5555_5555);     // waveform window: read-only
    @(negedge clk);
    checks++;
    if (n_ffa != 1 || n_ffp != 1) begin failures++; $display("stray FF strobe"); end
    // live values
    readback.i = -15'sd1234; readback.q = 15'sd4321;
    readback.amp = 16'hBEEF; readback.pha = 16'h1357;
    readback.drv_amp = 16'h2468; readback.drv_pha = 16'hFACE;
    readback.wave_done = 1; readback.sat_amp = 0; readback.sat_pha = 1;
    expect_read(REG_IQ, {16'd4321, 16'hFB2E});
    expect_read(REG_AMPPHA, 32'h1357_BEEF);
    expect_read(REG_DRIVE, 32'hFACE_2468);
    expect_read(REG_STATUS, 32'h5);
    expect_read(REG_AMPPHA, 32'h1357_BEEF);
    // waveform window
    for (int k = 0; k < 30; k++) begin
      logic [9:0] a;
      a = 10'($urandom_range(0, 1023));
      expect_read({2'b11, a}, {a, 6'h2A, ~a, 6'h15});
    end
    expect_read(12'h0FF, 32'h0);  // unmapped
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
