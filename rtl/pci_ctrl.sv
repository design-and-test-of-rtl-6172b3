// pci_ctrl: FPGA side of the PCI bridge, the BAR0 register map of the LLRF FPGA.
//
// The PCI bridge chip (a QL5064) turns host accesses to BAR0 into single
// 32-bit reads and writes on a local bus; this block decodes them. Writes
// go to the control registers (loop enables, set points, PI gains, DDS tuning
// word) or, in two address windows, into the amplitude and phase
// feed-forward tables. Reads return the identification word, the settings,
// the live I/Q, amplitude and phase of the pickup, the drive values, status
// flags, or a sample of the captured waveform. The address map is in
// llrf_pkg. That registers are mapped into BAR0, and what is written and read,
// follow the published LLRF design; the local-bus protocol, the map and the reset values
// are this design's own. The local bus is taken to run on the 95.2 MHz
// processing clock.
//
// Timing: lb_wr or lb_rd is a one-clock strobe with lb_addr (and lb_wdata)
// valid in that clock; never both at once. A write takes effect at the next
// clock edge. Read data appears on lb_rdata with lb_rvalid two clocks after
// lb_rd. Writing CTRL with bit 4 set gives a one-clock soft_trig pulse; the
// bit reads back as 0.
module pci_ctrl
  import llrf_pkg::*;
#(
  parameter int FF_AW   = 10,
  parameter int WAVE_AW = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  // local bus from the PCI bridge
  input  logic                lb_wr,
  input  logic                lb_rd,
  input  logic [LB_AW-1:0]    lb_addr,
  input  logic [LB_DW-1:0]    lb_wdata,
  output logic [LB_DW-1:0]    lb_rdata,
  output logic                lb_rvalid,
  // to the signal chain
  output settings_t           settings,
  output logic                soft_trig,
  output logic                ff_amp_we,
  output logic                ff_pha_we,
  output logic [FF_AW-1:0]    ff_waddr,
  output logic [15:0]         ff_wdata,
  // from the signal chain
  input  readback_t           readback,
  output logic [WAVE_AW-1:0]  wave_raddr,
  input  logic [31:0]         wave_rdata
);

  logic [1:0]       win;
  logic [LB_AW-1:0] rd_addr;
  logic             rd_pend;

  assign win        = lb_addr[LB_AW-1 -: 2];
  assign ff_waddr   = lb_addr[FF_AW-1:0];
  assign ff_wdata   = lb_wdata[15:0];
  assign ff_amp_we  = lb_wr && (win == WIN_FF_AMP);
  assign ff_pha_we  = lb_wr && (win == WIN_FF_PHA);
  assign wave_raddr = lb_addr[WAVE_AW-1:0];

  // Register writes
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      settings         <= '0;
      settings.dds_ftw <= FTW_IF;
      soft_trig        <= 1'b0;
    end else begin
      soft_trig <= 1'b0;
      if (lb_wr && win == WIN_REGS) begin
        unique case (lb_addr)
          REG_CTRL: begin
            settings.ctrl <= ctrl_t'({lb_wdata[31:5], 1'b0, lb_wdata[3:0]});
            soft_trig     <= lb_wdata[4];
          end
          REG_AMP_SP:  settings.amp_sp  <= lb_wdata[AMP_W-1:0];
          REG_PHA_SP:  settings.pha_sp  <= lb_wdata[PHASE_W-1:0];
          REG_KP_AMP:  settings.kp_amp  <= lb_wdata[15:0];
          REG_KI_AMP:  settings.ki_amp  <= lb_wdata[15:0];
          REG_KP_PHA:  settings.kp_pha  <= lb_wdata[15:0];
          REG_KI_PHA:  settings.ki_pha  <= lb_wdata[15:0];
          REG_DDS_FTW: settings.dds_ftw <= lb_wdata;
          default: ;  // read-only or unmapped: ignored
        endcase
      end
    end
  end

  // Register reads: address in clock 0, mux in clock 1
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_pend   <= 1'b0;
      rd_addr   <= '0;
      lb_rvalid <= 1'b0;
      lb_rdata  <= '0;
    end else begin
      rd_pend   <= lb_rd;
      if (lb_rd) rd_addr <= lb_addr;
      lb_rvalid <= rd_pend;
      if (rd_pend) begin
        if (rd_addr[LB_AW-1 -: 2] == WIN_WAVE) begin
          lb_rdata <= wave_rdata;
        end else if (rd_addr[LB_AW-1 -: 2] == WIN_REGS) begin
          unique case (rd_addr)
            REG_ID:      lb_rdata <= ID_VALUE;
            REG_CTRL:    lb_rdata <= 32'(settings.ctrl);
            REG_AMP_SP:  lb_rdata <= 32'(settings.amp_sp);
            REG_PHA_SP:  lb_rdata <= 32'(settings.pha_sp);
            REG_KP_AMP:  lb_rdata <= 32'($unsigned(settings.kp_amp));
            REG_KI_AMP:  lb_rdata <= 32'($unsigned(settings.ki_amp));
            REG_KP_PHA:  lb_rdata <= 32'($unsigned(settings.kp_pha));
            REG_KI_PHA:  lb_rdata <= 32'($unsigned(settings.ki_pha));
            REG_DDS_FTW: lb_rdata <= settings.dds_ftw;
            REG_IQ:      lb_rdata <= {16'($signed(readback.q)), 16'($signed(readback.i))};
            REG_AMPPHA:  lb_rdata <= {readback.pha, readback.amp};
            REG_DRIVE:   lb_rdata <= {readback.drv_pha, readback.drv_amp};
            REG_STATUS:  lb_rdata <= {29'd0, readback.sat_pha, readback.sat_amp, readback.wave_done};
            default:     lb_rdata <= '0;
          endcase
        end else begin
          lb_rdata <= '0;  // feed-forward windows are write-only
        end
      end
    end
  end

  // A bus cycle is either a read or a write
  assert property (@(posedge clk) disable iff (!rst_n) !(lb_wr && lb_rd))
    else $error("pci_ctrl: lb_wr and lb_rd asserted together");

endmodule
