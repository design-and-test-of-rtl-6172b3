// tb_iq_demod: self-checking test of the clock/4 I/Q demodulator.
//
// Drives A*cos(pi/2*n + phi) plus a DC offset for a series of random
// amplitudes and phases, each held for three four-sample groups. For every
// output it checks I and Q exactly against the differences of the samples it
// drove, checks them against 2*A*cos(phi) and 2*A*sin(phi) within rounding,
// and checks that iq_valid comes exactly every fourth clock, one clock after
// the fourth sample of a group.
module tb_iq_demod;
  localparam int ADC_W = 14;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [ADC_W-1:0] adc_data;
  logic iq_valid;
  logic signed [ADC_W:0] i_out, q_out;

  int checks = 0, failures = 0;

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  iq_demod #(.ADC_W(ADC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // samples driven, indexed by clock after reset
  int          n;
  int          hist [4];
  real         amp_r, phi_r;
  int          last_valid;

  initial begin
    adc_data = '0;
    n = 0;
    last_valid = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 200; t++) begin
      amp_r = 100.0 + $urandom_range(0, 7000);
      phi_r = 2.0 * PI * $urandom_range(0, 35999) / 36000.0;
      for (int g = 0; g < 12; g++) begin
        @(negedge clk);
        adc_data = ADC_W'($rtoi($floor(amp_r * $cos(PI / 2.0 * n + phi_r) + 0.5)) + 37);
        hist[n % 4] = int'(adc_data);
        @(posedge clk);
        n++;
        #1;
        if (iq_valid) begin
          checks++;
          if (n % 4 != 0 || (last_valid >= 0 && n - last_valid != 4)) begin
            failures++;
            $display("valid at wrong clock n=%0d last=%0d", n, last_valid);
          end
          last_valid = n;
          checks++;
          if (int'(i_out) != hist[0] - hist[2] || int'(q_out) != hist[3] - hist[1]) begin
            failures++;
            $display("I/Q mismatch: got %0d %0d want %0d %0d", i_out, q_out,
                     hist[0] - hist[2], hist[3] - hist[1]);
          end
          checks++;
          if (absr(real'(i_out) - 2.0 * amp_r * $cos(phi_r)) > 1.01 ||
              absr(real'(q_out) - 2.0 * amp_r * $sin(phi_r)) > 1.01) begin
            if (n % 12 != 4) begin  // first group of a new tone may mix with the last
              failures++;
              $display("I/Q far from 2A cos/sin: %0d %0d A=%f phi=%f", i_out, q_out, amp_r, phi_r);
            end
          end
        end else if (n % 4 == 0) begin
          checks++;
          failures++;
          $display("missing valid at n=%0d", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
