// Self-checking test of fir1_counter: counter value, triangle coefficient sequence
// (0..D-1 rising, D-1..0 falling, the two accumulators mirror images of each other),
// latch strobes once every D samples (every 2D clocks) alternating between
// the two accumulators, and fs_tick on the second clock of every sample.
module tb_fir1_counter;
  localparam int unsigned D  = 128;
  localparam int unsigned CW = $clog2(D);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW+1:0] pc;
  logic [CW-1:0] coef;
  logic latch, fs_tick;
  int checks = 0, failures = 0;
  int latches = 0, last_latch = -1;

  fir1_counter #(.D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, ph, k, per, exp_coef;
    bit rising;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (t = 0; t < 8 * 2 * D + 5; t++) begin
      ph = t % 2; k = (t / 2) % D; per = (t / (2 * D)) % 2;
      rising = (ph == per);
      exp_coef = rising ? k : (D - 1 - k);
      checks++;
      if (pc !== (CW+2)'(t) || coef !== CW'(exp_coef) || fs_tick !== ph[0] ||
          latch !== (rising && k == 0)) begin
        failures++;
        if (failures < 10)
          $display("t=%0d pc=%0d coef=%0d exp=%0d latch=%0b fs=%0b", t, pc, coef, exp_coef, latch, fs_tick);
      end
      if (latch) begin
        if (last_latch >= 0) begin
          checks++;
          if (t - last_latch != 2 * D + ((t % 2) ? 1 : -1)) failures++;
        end
        last_latch = t;
        latches++;
      end
      @(negedge clk);
    end
    checks++;
    if (latches != 9) begin
      failures++;
      $display("latches=%0d", latches);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
