// tb_cordic_vec: self-checking test of the vectoring CORDIC.
//
// Streams random I/Q vectors (one per clock, plus the four axis directions
// and some small vectors) into the pipeline and compares each result with
// sqrt(I^2+Q^2) and atan2(Q,I) computed in real arithmetic: amplitude within
// 2 units, phase within 3 LSB of a 2^16 turn (or looser for tiny vectors,
// where the phase is ill defined). It also checks that every result appears
// exactly STAGES+2 clocks after its input.
module tb_cordic_vec;
  localparam int IN_W = 15, AMP_W = 16, PHASE_W = 16, STAGES = 16;
  localparam int LAT = STAGES + 2;
  localparam int N = 2000;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [IN_W-1:0] i_in, q_in;
  logic out_valid;
  logic [AMP_W-1:0] amp;
  logic [PHASE_W-1:0] phase;

  int checks = 0, failures = 0;

  cordic_vec #(.IN_W(IN_W), .AMP_W(AMP_W), .PHASE_W(PHASE_W), .STAGES(STAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int vi [N], vq [N];
  int in_clk [N];
  int cyc = 0;
  int got = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      if (k < 4) begin
        vi[k] = (k == 0) ? 10000 : (k == 2) ? -10000 : 0;
        vq[k] = (k == 1) ? 10000 : (k == 3) ? -10000 : 0;
      end else if (k < 20) begin
        vi[k] = $urandom_range(0, 40) - 20;
        vq[k] = $urandom_range(0, 40) - 20;
      end else begin
        vi[k] = $urandom_range(0, 32766) - 16383;
        vq[k] = $urandom_range(0, 32766) - 16383;
      end
    end
    in_valid = 1'b0; i_in = '0; q_in = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      in_valid = 1'b1; i_in = IN_W'(vi[k]); q_in = IN_W'(vq[k]);
      in_clk[k] = cyc;
      if (k % 7 == 6) begin  // a gap now and then
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (got != N) begin
      failures++;
      $display("got %0d results, expected %0d", got, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Checker
  always @(posedge clk) begin
    real ea, ep, dp, mag;
    if (rst_n && out_valid && got < N) begin
      mag = $sqrt(real'(vi[got]) ** 2 + real'(vq[got]) ** 2);
      ea = mag;
      ep = $atan2(real'(vq[got]), real'(vi[got])) / (2.0 * PI) * 65536.0;
      if (ep < 0.0) ep = ep + 65536.0;
      dp = real'(phase) - ep;
      if (dp > 32768.0) dp = dp - 65536.0;
      if (dp < -32768.0) dp = dp + 65536.0;
      checks++;
      if (absr(real'(amp) - ea) > 2.0) begin
        failures++;
        $display("amp mismatch k=%0d I=%0d Q=%0d got %0d want %f", got, vi[got], vq[got], amp, ea);
      end
      checks++;
      if (mag > 1000.0 ? absr(dp) > 3.0 : absr(dp) > 65536.0 * 2.0 / (2.0 * PI * mag) + 3.0) begin
        failures++;
        $display("phase mismatch k=%0d I=%0d Q=%0d got %0d want %f", got, vi[got], vq[got], phase, ep);
      end
      checks++;
      if (cyc - in_clk[got] != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - in_clk[got], LAT);
      end
      got <= got + 1;
    end
  end
endmodule
