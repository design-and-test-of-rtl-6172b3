// tb_dds: self-checking test of the drive DDS.
//
// For a series of random amplitude and phase settings, at the IF tuning
// word (clock/4) and at two other tuning words, it compares every DAC sample
// with floor(amp * round(32767 * cos(2*pi*p/4096)) / 2^18), where p is the
// top 12 bits of (accumulator of two clocks earlier + phase), tracked by the
// bench from the tuning word. The match must be exact. Changes of amp and pha
// must show on the output exactly two clocks later.
module tb_dds;
  localparam int DAC_W = 14, AMP_W = 16, PHASE_W = 16;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] ftw;
  logic [AMP_W-1:0] amp;
  logic [PHASE_W-1:0] pha;
  logic signed [DAC_W-1:0] dac_data;

  int checks = 0, failures = 0;

  dds #(.DAC_W(DAC_W), .AMP_W(AMP_W), .PHASE_W(PHASE_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  // history of (accumulator, amp, pha) per clock
  longint acc_h [$];
  int     amp_h [$], pha_h [$];
  longint acc_m;
  int     max_seen = 0;

  always @(posedge clk) begin
    real e, c;
    longint ph;
    if (rst_n) begin
      acc_h.push_back(acc_m);
      amp_h.push_back(int'(amp));
      pha_h.push_back(int'(pha));
      acc_m = (acc_m + longint'(ftw)) & 64'hFFFF_FFFF;
      if (acc_h.size() > 2) begin
        ph = (acc_h[0] + (longint'(pha_h[0]) << 16)) & 64'hFFFF_FFFF;
        c  = $cos(2.0 * PI * real'(ph >> 20) / 4096.0);
        e  = $floor(real'(amp_h[0]) * $floor(32767.0 * c + 0.5) / 262144.0);
        checks++;
        if (real'(dac_data) != e) begin
          failures++;
          $display("dac %0d, expected %f (amp %0d pha %0d)", dac_data, e, amp_h[0], pha_h[0]);
        end
        if (int'(dac_data) > max_seen) max_seen = int'(dac_data);
        void'(acc_h.pop_front()); void'(amp_h.pop_front()); void'(pha_h.pop_front());
      end
    end
  end

  initial begin
    ftw = 32'h4000_0000; amp = '0; pha = '0; acc_m = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      if (t == 100) ftw = 32'h1234_5678;
      if (t == 200) ftw = 32'h0800_0000;
      amp = (t == 1) ? 16'hFFFF : AMP_W'($urandom_range(0, 65535));
      pha = (t == 1) ? 16'h0000 : PHASE_W'($urandom_range(0, 65535));
      repeat ($urandom_range(1, 12)) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++;
    if (max_seen < 8180) begin
      failures++;
      $display("full scale not reached: %0d", max_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
