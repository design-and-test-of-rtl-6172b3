// wave_capture: buffer that records the pickup amplitude and phase over a pulse.
//
// A trigger restarts recording at address 0. Each valid measurement is
// written as {phase, amplitude} until DEPTH samples are stored; then the
// buffer stops and raises done, so the host can read the waveform over the
// PCI bus while the next trigger is awaited. The published LLRF design says that
// waveforms are transferred over the PCI local bus; the buffer depth, the
// word format and the trigger-driven single-shot recording are this design's
// own choices.
//
// Timing: rd_addr to rd_data is one clock (synchronous block RAM read).
// done rises one clock after the last sample is written and clears on trig.
module wave_capture #(
  parameter int DEPTH = 1024,
  parameter int W     = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     trig,
  input  logic                     in_valid,
  input  logic [W-1:0]             in_data,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  output logic                     done
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_addr;
  logic          active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_addr <= '0;
      active  <= 1'b0;
      done    <= 1'b0;
    end else if (trig) begin
      wr_addr <= '0;
      active  <= 1'b1;
      done    <= 1'b0;
    end else if (active && in_valid) begin
      if (wr_addr == AW'(DEPTH - 1)) begin
        active <= 1'b0;
        done   <= 1'b1;
      end else begin
        wr_addr <= wr_addr + AW'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (active && in_valid && !trig) mem[wr_addr] <= in_data;
    rd_data <= mem[rd_addr];
  end

endmodule
