// tb_pi_ff_ctrl: self-checking test of the PI + feed-forward channel.
//
// Runs an amplitude-mode and a phase-mode instance (table depth 16) side by
// side on the same stimulus: random tables written through the host port,
// random set points, measurements, gains and enables, and triggers now and
// then. A reference model in integer arithmetic computes each output from
// the control law (table term, Kp*e + integrator shifted by 8, clamping and
// anti-windup for amplitude, modulo-one-turn error and output for phase)
// and the checker compares every output, its saturation flag and its
// arrival exactly two clocks after the measurement.
module tb_pi_ff_ctrl;
  localparam int W = 16, DEPTH = 16, AW = 4;
  localparam longint ACC_MAX = (longint'(1) << (W + 22)) - 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic trig, fb_en, ff_en;
  logic signed [15:0] kp, ki;
  logic [W-1:0] sp, meas;
  logic meas_valid;
  logic ff_we;
  logic [AW-1:0] ff_waddr;
  logic [W-1:0] ff_wdata;
  logic ov_a, ov_p, sat_a, sat_p;
  logic [W-1:0] out_a, out_p;

  int checks = 0, failures = 0;

  pi_ff_ctrl #(.W(W), .DEPTH(DEPTH), .PHASE_MODE(1'b0)) dut_a (
    .clk, .rst_n, .trig, .fb_en, .ff_en, .kp, .ki, .setpoint(sp),
    .meas_valid, .meas, .ff_we, .ff_waddr, .ff_wdata,
    .out_valid(ov_a), .out_val(out_a), .sat(sat_a));
  pi_ff_ctrl #(.W(W), .DEPTH(DEPTH), .PHASE_MODE(1'b1)) dut_p (
    .clk, .rst_n, .trig, .fb_en, .ff_en, .kp, .ki, .setpoint(sp),
    .meas_valid, .meas, .ff_we, .ff_waddr, .ff_wdata,
    .out_valid(ov_p), .out_val(out_p), .sat(sat_p));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model state
  longint tab [DEPTH];
  int     idx;
  longint acc_a, acc_p;
  int     cyc = 0;
  int     exp_a [$], exp_p [$], exp_sat [$], exp_cyc [$];
  int     n_sat = 0, n_wrap = 0;

  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint floor_div256(longint v);
    return (v >= 0) ? v / 256 : -((-v + 255) / 256);
  endfunction

  function automatic longint clamp_acc(longint v);
    return (v > ACC_MAX) ? ACC_MAX : (v < -ACC_MAX) ? -ACC_MAX : v;
  endfunction

  task automatic model_step(input int s, input int m);
    longint e_a, e_p, na, np, ua, up, ff;
    int     ya, yp, sa;
    ff = ff_en ? tab[idx] : 0;
    e_a = longint'(s) - longint'(m);
    e_p = longint'(s) - longint'(m);
    if (e_p > 32767)  e_p -= 65536;
    if (e_p < -32768) e_p += 65536;
    na = clamp_acc(acc_a + longint'(ki) * e_a);
    np = clamp_acc(acc_p + longint'(ki) * e_p);
    ua = ff + (fb_en ? floor_div256(longint'(kp) * e_a + na) : 0);
    up = ff + (fb_en ? floor_div256(longint'(kp) * e_p + np) : 0);
    if (ua < 0)          begin ya = 0;     sa = 1; end
    else if (ua > 65535) begin ya = 65535; sa = 1; end
    else                 begin ya = int'(ua); sa = 0; end
    yp = int'(up & 64'hFFFF);
    if (up < 0 || up > 65535) n_wrap++;
    if (sa) n_sat++;
    if (!fb_en) acc_a = 0;
    else if (!((ua < 0 && e_a < 0) || (ua > 65535 && e_a > 0))) acc_a = na;
    acc_p = fb_en ? np : 0;
    if (idx != DEPTH - 1) idx++;
    exp_a.push_back(ya);
    exp_p.push_back(yp);
    exp_sat.push_back(sa);
    exp_cyc.push_back(cyc + 2);
  endtask

  // checker
  always @(posedge clk) begin
    if (rst_n && (ov_a || ov_p)) begin
      checks++;
      if (!(ov_a && ov_p) || exp_a.size() == 0) begin
        failures++;
        $display("unexpected output valid a=%b p=%b", ov_a, ov_p);
      end else begin
        int ea, ep, es, ec;
        ea = exp_a.pop_front(); ep = exp_p.pop_front();
        es = exp_sat.pop_front(); ec = exp_cyc.pop_front();
        if (int'(out_a) != ea || int'(out_p) != ep || int'(sat_a) != es || sat_p || cyc != ec) begin
          failures++;
          $display("mismatch at %0d: amp %0d/%0d phase %0d/%0d sat %0d/%0d cyc %0d/%0d",
                   cyc, out_a, ea, out_p, ep, sat_a, es, cyc, ec);
        end
      end
    end
  end

  initial begin
    trig = 0; fb_en = 0; ff_en = 0; kp = 0; ki = 0; sp = 0; meas = 0;
    meas_valid = 0; ff_we = 0; ff_waddr = 0; ff_wdata = 0;
    idx = 0; acc_a = 0; acc_p = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // load the table
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk);
      ff_we = 1; ff_waddr = AW'(k); ff_wdata = W'($urandom_range(0, 65535));
      tab[k] = longint'(ff_wdata);
    end
    @(negedge clk); ff_we = 0;
    for (int pulse = 0; pulse < 60; pulse++) begin
      // settings change while the pipe is idle
      repeat (3) @(negedge clk);
      fb_en = ($urandom_range(0, 3) != 0);
      ff_en = ($urandom_range(0, 1) != 0);
      kp = 16'($urandom_range(0, 1023)) - 16'sd256;
      ki = 16'($urandom_range(0, 511));
      sp = W'($urandom_range(0, 65535));
      trig = 1;
      idx = 0; acc_a = 0; acc_p = 0;
      @(negedge clk); trig = 0;
      for (int s = 0; s < 40; s++) begin
        meas = (pulse % 3 == 0) ? W'($urandom_range(0, 65535))
                                : W'(int'(sp) + $urandom_range(0, 600) - 300);
        meas_valid = 1;
        model_step(int'(sp), int'(meas));
        @(negedge clk);
        if ($urandom_range(0, 1)) begin
          meas_valid = 0;
          repeat ($urandom_range(0, 4)) @(negedge clk);
        end
      end
      meas_valid = 0;
    end
    repeat (5) @(negedge clk);
    checks++;
    if (exp_a.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_a.size());
    end
    checks++;
    if (n_sat == 0 || n_wrap == 0) begin
      failures++;
      $display("stimulus never clamped (%0d) or wrapped (%0d)", n_sat, n_wrap);
    end
    $display("clamped %0d, wrapped %0d", n_sat, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
