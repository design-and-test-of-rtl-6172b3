// tb_wave_capture: self-checking test of the pulse waveform buffer.
//
// With a depth of 16, it triggers a recording, feeds more samples than fit
// (valid every fourth clock, as from the demodulator), checks that done
// rises after exactly 16 samples, that later samples are not stored, and
// reads back all 16 entries with the one-clock read latency. A second
// trigger clears done and records a new waveform over the old one.
module tb_wave_capture;
  localparam int DEPTH = 16, W = 32, AW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic trig, in_valid;
  logic [W-1:0] in_data;
  logic [AW-1:0] rd_addr;
  logic [W-1:0] rd_data;
  logic done;

  int checks = 0, failures = 0;

  wave_capture #(.DEPTH(DEPTH), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] sent [DEPTH];

  task automatic record(input int base);
    @(negedge clk); trig = 1;
    @(negedge clk); trig = 0;
    checks++;
    if (done) begin failures++; $display("done not cleared by trigger"); end
    for (int k = 0; k < DEPTH + 5; k++) begin
      in_valid = 1; in_data = W'(base + k * 7919);
      if (k < DEPTH) sent[k] = in_data;
      @(negedge clk); in_valid = 0;
      checks++;
      if (done != (k >= DEPTH - 1)) begin
        failures++;
        $display("done=%b after %0d samples", done, k + 1);
      end
      repeat (3) @(negedge clk);
    end
    for (int k = 0; k < DEPTH; k++) begin
      rd_addr = AW'(k);
      @(negedge clk);
      checks++;
      if (rd_data != sent[k]) begin
        failures++;
        $display("entry %0d: %h, expected %h", k, rd_data, sent[k]);
      end
    end
  endtask

  initial begin
    trig = 0; in_valid = 0; in_data = 0; rd_addr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("done set after reset"); end
    // samples before any trigger are ignored
    in_valid = 1; in_data = 32'hDEAD_BEEF;
    @(negedge clk); in_valid = 0;
    record(1000);
    record(55555);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
