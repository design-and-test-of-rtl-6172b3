// llrf_pkg: widths, register map and shared types of the LLRF control-unit FPGA.
//
// The signal chain runs at the 95.2 MHz sample clock with the IF at clock/4
// (23.8 MHz). The ADC and DAC are 14 bits wide, as on the ICS572F board.
// Phase is carried as an unsigned fraction of a full turn (2^PHASE_W = 360
// degrees); amplitude as an unsigned magnitude in ADC-derived units.
// The 32-bit register bus and the address map below are this design's own
// choice: the host sees them in BAR0 of the PCI bridge.
package llrf_pkg;

  localparam int ADC_W   = 14;  // ICS572F ADC resolution
  localparam int DAC_W   = 14;  // ICS572F DAC resolution
  localparam int IQ_W    = ADC_W + 1;  // I = x0 - x2 needs one more bit
  localparam int AMP_W   = 16;  // amplitude word
  localparam int PHASE_W = 16;  // phase word, 2^16 = one turn

  // Register bus (local side of the PCI bridge)
  localparam int LB_AW = 12;    // 32-bit word address inside BAR0
  localparam int LB_DW = 32;

  // Feed-forward table and waveform buffer depth (entries)
  localparam int FF_DEPTH   = 1024;
  localparam int WAVE_DEPTH = 1024;

  // BAR0 word-address map
  localparam logic [LB_AW-1:0] REG_ID       = 12'h000;  // RO identification
  localparam logic [LB_AW-1:0] REG_CTRL     = 12'h001;  // loop enables, soft trigger
  localparam logic [LB_AW-1:0] REG_AMP_SP   = 12'h002;  // amplitude set point
  localparam logic [LB_AW-1:0] REG_PHA_SP   = 12'h003;  // phase set point
  localparam logic [LB_AW-1:0] REG_KP_AMP   = 12'h004;
  localparam logic [LB_AW-1:0] REG_KI_AMP   = 12'h005;
  localparam logic [LB_AW-1:0] REG_KP_PHA   = 12'h006;
  localparam logic [LB_AW-1:0] REG_KI_PHA   = 12'h007;
  localparam logic [LB_AW-1:0] REG_DDS_FTW  = 12'h008;  // DDS frequency tuning word
  localparam logic [LB_AW-1:0] REG_IQ       = 12'h010;  // RO {Q, I}
  localparam logic [LB_AW-1:0] REG_AMPPHA   = 12'h011;  // RO {phase, amplitude} of pickup
  localparam logic [LB_AW-1:0] REG_DRIVE    = 12'h012;  // RO {drive phase, drive amplitude}
  localparam logic [LB_AW-1:0] REG_STATUS   = 12'h013;  // RO capture done, saturation flags
  // Windows (upper two address bits select)
  localparam logic [1:0] WIN_REGS   = 2'd0;
  localparam logic [1:0] WIN_FF_AMP = 2'd1;  // 0x400..0x7FF, write: FF amplitude table
  localparam logic [1:0] WIN_FF_PHA = 2'd2;  // 0x800..0xBFF, write: FF phase table
  localparam logic [1:0] WIN_WAVE   = 2'd3;  // 0xC00..0xFFF, read: captured waveform

  localparam logic [31:0] ID_VALUE = 32'h4C4C_5246;  // "LLRF"

  // Default frequency tuning word: IF = clock/4
  localparam logic [31:0] FTW_IF = 32'h4000_0000;

  // Control register fields
  typedef struct packed {
    logic [26:0] rsvd;
    logic        soft_trig;  // bit 4, self-clearing
    logic        ff_en_pha;  // bit 3
    logic        ff_en_amp;  // bit 2
    logic        fb_en_pha;  // bit 1
    logic        fb_en_amp;  // bit 0
  } ctrl_t;

  // Settings the host writes, as seen by the signal chain
  typedef struct packed {
    ctrl_t              ctrl;
    logic [AMP_W-1:0]   amp_sp;
    logic [PHASE_W-1:0] pha_sp;
    logic signed [15:0] kp_amp;
    logic signed [15:0] ki_amp;
    logic signed [15:0] kp_pha;
    logic signed [15:0] ki_pha;
    logic [31:0]        dds_ftw;
  } settings_t;

  // Values the host reads back
  typedef struct packed {
    logic signed [IQ_W-1:0] i;
    logic signed [IQ_W-1:0] q;
    logic [AMP_W-1:0]       amp;
    logic [PHASE_W-1:0]     pha;
    logic [AMP_W-1:0]       drv_amp;
    logic [PHASE_W-1:0]     drv_pha;
    logic                   wave_done;
    logic                   sat_amp;
    logic                   sat_pha;
  } readback_t;

endpackage
