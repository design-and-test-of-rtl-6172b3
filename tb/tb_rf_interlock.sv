// tb_rf_interlock: self-checking test of the fast RF interlock.
//
// Random forward and reverse power samples are driven against random
// thresholds, with the RF window opening and closing and clear pulsed now
// and then. A reference model (a run counter of low forward samples inside
// the window, and a reverse-power comparison, both latched until clear)
// predicts rf_permit and the two trip flags after every clock. Both kinds of
// trip, and a dip shorter than the loss count that must not trip, are
// required to occur.
module tb_rf_interlock;
  localparam int PWR_W = 16, LOSS_COUNT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rf_on, pwr_valid, clear;
  logic [PWR_W-1:0] fwd_pwr, rev_pwr, fwd_min, rev_max;
  logic rf_permit, trip_loss, trip_rev;

  int checks = 0, failures = 0;
  int n_loss = 0, n_rev = 0, n_dip = 0;

  rf_interlock #(.PWR_W(PWR_W), .LOSS_COUNT(LOSS_COUNT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int  run;
  bit  m_loss, m_rev;

  initial begin
    rf_on = 0; pwr_valid = 0; clear = 0; fwd_pwr = 0; rev_pwr = 0;
    fwd_min = 16'd20000; rev_max = 16'd5000;
    run = 0; m_loss = 0; m_rev = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 99) == 0);
      if (t % 500 == 0) rf_on = !rf_on;
      pwr_valid = ($urandom_range(0, 3) != 0);
      fwd_pwr = ($urandom_range(0, 9) == 0) ? 16'($urandom_range(0, 19999))
                                           : 16'($urandom_range(20000, 65535));
      if (t % 2000 > 1000 && t % 2000 < 1020) fwd_pwr = 16'd100;  // long drop, RF on
      if (t % 2000 > 1600 && t % 2000 < 1620) fwd_pwr = 16'd100;  // long drop, RF off: no trip
      rev_pwr = ($urandom_range(0, 499) == 0) ? 16'($urandom_range(5001, 65535))
                                             : 16'($urandom_range(0, 5000));
      // model
      if (clear) begin
        run = 0; m_loss = 0; m_rev = 0;
      end else if (pwr_valid) begin
        if (rev_pwr > rev_max) begin
          if (!m_rev) n_rev++;
          m_rev = 1;
        end
        if (rf_on && fwd_pwr < fwd_min) begin
          if (run == LOSS_COUNT - 1) begin
            if (!m_loss) n_loss++;
            m_loss = 1;
          end else run++;
        end else begin
          if (run > 0 && !m_loss) n_dip++;
          run = 0;
        end
      end
      @(posedge clk); #1;
      checks++;
      if (trip_loss != m_loss || trip_rev != m_rev || rf_permit != !(m_loss || m_rev)) begin
        failures++;
        $display("t=%0d: got loss %b rev %b permit %b, expected %b %b", t,
                 trip_loss, trip_rev, rf_permit, m_loss, m_rev);
      end
    end
    $display("loss trips %0d, reverse trips %0d, short dips %0d", n_loss, n_rev, n_dip);
    checks++;
    if (n_loss == 0 || n_rev == 0 || n_dip == 0) begin
      failures++;
      $display("a trip kind never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
