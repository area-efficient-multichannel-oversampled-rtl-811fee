// Self-checking test of one FIR1 channel driven by the shared counter. Random 1-bit
// codes are applied (held for the two clocks of a sample); every FIFO push is compared
// with a direct 256-tap triangle convolution of the code history, h = 0..127,127..0,
// and the FIFO order (new word moves to out_old on the next push) is checked.
module tb_fir1_channel;
  localparam int unsigned D  = 128;
  localparam int unsigned CW = $clog2(D);
  localparam int unsigned W  = 14;
  localparam int unsigned NS = 12 * D;   // samples simulated

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CW+1:0] pc;
  logic [CW-1:0] coef;
  logic latch, fs_tick, x;
  logic [W-1:0] out_new, out_old;
  int checks = 0, failures = 0, pushes = 0;
  bit bits [NS + 4];
  int t = 0;
  int expv, prev;

  fir1_counter #(.D(D)) u_cnt (.*);
  fir1_channel #(.W(W), .CW(CW)) dut (.*);

  always #5 clk = ~clk;
  assign x = bits[t / 2];

  function automatic int tri_sum(int s0);
    int acc = 0;
    for (int j = 0; j < 2 * D; j++) begin
      int s = s0 - 2 * D + j;
      int h = (j < D) ? j : (2 * D - 1 - j);
      if (s >= 0 && bits[s]) acc += h;
    end
    return acc;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NS + 4; i++) bits[i] = 1'($urandom);
    // a long run of ones gives the full-scale window sum D*(D-1)
    for (int i = 4 * D; i < 6 * D + 2; i++) bits[i] = 1'b1;
    prev = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // all sampling on the falling edge: latch seen here acts at the next rising edge
    while (t < 2 * NS) begin
      if (latch) begin
        expv = tri_sum(t / 2);
        @(negedge clk);
        t++;
        checks += 2;
        if (out_new !== W'(expv) || out_old !== W'(prev)) begin
          failures++;
          $display("push %0d at t=%0d: new=%0d exp=%0d old=%0d exp=%0d", pushes, t, out_new, expv, out_old, prev);
        end
        if (expv == D * (D - 1)) checks++;
        prev = expv;
        pushes++;
      end else begin
        @(negedge clk);
        t++;
      end
    end
    checks++;
    if (pushes != NS / D) begin
      failures++;
      $display("pushes=%0d", pushes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
