// Self-checking test of the four-channel FIR1. Channel 0 gets all zeros, channel 1
// all ones (full-scale window sum D*(D-1) = 16256), channels 2 and 3 random codes.
// After every push, all eight FIFO words are read over the shared output bus and
// compared with a direct 256-tap triangle convolution of each channel's history.
// The push period (D samples = 2D clocks, alternating +1/-1 clock) is checked too.
module tb_fir1_filter;
  localparam int unsigned N_CH = 4;
  localparam int unsigned D    = 128;
  localparam int unsigned W    = 14;
  localparam int unsigned NS   = 10 * D;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] x;
  logic fs_tick, push, rd_slot;
  logic [$clog2(D)+1:0] pc;
  logic [1:0] rd_ch;
  logic [W-1:0] dout;
  int checks = 0, failures = 0, pushes = 0, t = 0, last_push = -1;
  bit bits [N_CH][NS + 4];
  int expv [N_CH][2];

  fir1_filter #(.N_CH(N_CH), .D(D), .W(W)) dut (.*);

  always #5 clk = ~clk;
  always_comb for (int c = 0; c < N_CH; c++) x[c] = bits[c][t / 2];

  function automatic int tri_sum(int c, int s0);
    int acc = 0;
    for (int j = 0; j < 2 * D; j++) begin
      int s = s0 - 2 * D + j;
      int h = (j < D) ? j : (2 * D - 1 - j);
      if (s >= 0 && bits[c][s]) acc += h;
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
    for (int i = 0; i < NS + 4; i++) begin
      bits[0][i] = 1'b0;
      bits[1][i] = 1'b1;
      bits[2][i] = 1'($urandom);
      bits[3][i] = ($urandom % 4) != 0;
    end
    for (int c = 0; c < N_CH; c++) expv[c] = '{0, 0};
    rd_ch = '0; rd_slot = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (t < 2 * NS) begin
      if (push) begin
        if (last_push >= 0) begin
          checks++;
          if (t - last_push != 2 * D + ((t % 2) ? 1 : -1)) failures++;
        end
        last_push = t;
        for (int c = 0; c < N_CH; c++) begin
          expv[c][1] = expv[c][0];
          expv[c][0] = tri_sum(c, t / 2);
        end
        @(negedge clk);
        t++;
        for (int c = 0; c < N_CH; c++) begin
          for (int sl = 0; sl < 2; sl++) begin
            rd_ch = 2'(c); rd_slot = sl[0];
            #1;
            checks++;
            if (dout !== W'(expv[c][sl])) begin
              failures++;
              $display("push %0d ch %0d slot %0d: %0d exp %0d", pushes, c, sl, dout, expv[c][sl]);
            end
          end
        end
        pushes++;
      end else begin
        @(negedge clk);
        t++;
      end
    end
    checks++;
    if (pushes != NS / D || expv[1][0] != D * (D - 1)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
