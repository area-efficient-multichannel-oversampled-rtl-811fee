// End-to-end test of the four-channel coder at its default sizes. Four behavioural
// first-order sigma-delta front ends drive the coder:
//   ch0: 1.024 kHz sine, amplitude 0.5 of full scale
//   ch1: idle (zero input, small dither)
//   ch2: DC +0.6 of full scale, stepping to -0.6 half way through
//   ch3: 2.048 kHz sine, amplitude 0.3
// Every 8 kHz output word is compared bit for bit with a reference model driven by
// the same 1-bit codes (coder_ref.svh). The sine amplitudes are measured over 125
// outputs (a whole number of periods) and compared with the expected passband gain,
// the idle channel must stay quiet and the DC channel must settle to the expected
// level. Output spacing must be 1024 clocks (8 kHz at 8.192 MHz). Counted mechanisms:
// FIR1 pushes from each of the two accumulators, up/down coefficient direction
// changes, processor frames with and without an output (16 -> 8 kHz decimation),
// and outputs of every channel.
module tb_pcm_coder4;
  `include "coder_ref.svh"
  localparam int N_CH = 4;
  localparam int NOUT = 150;                  // outputs per channel
  localparam real FS  = 4096000.0;
  localparam real PI  = 3.14159265358979;
  localparam real SCALE = 130048.0;           // full-scale input -> data path units

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] x;
  logic fs_tick;
  logic signed [19:0] pcm_out [N_CH];
  logic [N_CH-1:0] pcm_valid;
  real vin [N_CH];
  real dith [N_CH];
  real vref = 1.0;

  int checks = 0, failures = 0, t = 0;
  int nout [N_CH];
  int last_t [N_CH];
  longint ylog [N_CH][NOUT];
  int push_a = 0, push_b = 0, dir_changes = 0, frames_out = 0, frames_skip = 0;
  chan_ref refm [N_CH];

  pcm_coder4 dut (.*);

  for (genvar c = 0; c < N_CH; c++) begin : g_fe
    sd_frontend_model u_fe (.clk, .rst_n, .fs_tick, .vin(vin[c]), .dith(dith[c]), .vref, .vf(x[c]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NOUT * 1024 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // analog stimulus, updated every sample
  always_comb begin
    real s;
    s = real'(t / 2);
    vin[0] = 0.5 * $sin(2.0 * PI * 1024.0 * s / FS);
    vin[1] = 0.0;
    vin[2] = (t < NOUT * 512) ? 0.6 : -0.6;
    vin[3] = 0.3 * $sin(2.0 * PI * 2048.0 * s / FS);
    dith[0] = 0.0; dith[2] = 0.0; dith[3] = 0.0;
    dith[1] = ((t / 2) % 3 == 0) ? 0.002 : -0.001;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic amplitude(int c, real f, real expect_amp);
    real a = 0.0, b = 0.0, amp;
    for (int n = NOUT - 125; n < NOUT; n++) begin
      a += real'(ylog[c][n]) * $sin(2.0 * PI * f * real'(n) / 8000.0);
      b += real'(ylog[c][n]) * $cos(2.0 * PI * f * real'(n) / 8000.0);
    end
    amp = 2.0 * $sqrt(a * a + b * b) / 125.0;
    $display("ch%0d: %0.0f Hz amplitude %0.1f, expected %0.1f", c, f, amp, expect_amp);
    checks++;
    if (amp < 0.95 * expect_amp || amp > 1.05 * expect_amp) failures++;
  endtask

  initial begin
    bit done;
    logic pc8_q;
    for (int c = 0; c < N_CH; c++) begin
      refm[c] = new(c);
      nout[c] = 0;
      last_t[c] = -1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    pc8_q = 1'b0;
    done = 1'b0;
    // t counts clocks since reset; sample s occupies clocks 2s and 2s+1
    while (!done) begin
      if (t % 2 == 0) for (int c = 0; c < N_CH; c++) refm[c].bits.push_back(x[c]);
      if (dut.u_fir1.push) begin
        if (t % 2 == 0) push_a++; else push_b++;
      end
      if (dut.u_fir1.pc[8] != pc8_q) dir_changes++;
      pc8_q = dut.u_fir1.pc[8];
      if (t % 512 == 511) begin
        if ((t / 512) % 2 == 0) frames_out++; else frames_skip++;
      end
      @(negedge clk);
      t++;
      for (int c = 0; c < N_CH; c++) if (pcm_valid[c]) begin
        longint e;
        e = refm[c].step_to(t / 512);
        checks++;
        if (longint'(pcm_out[c]) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d ch%0d out %0d exp %0d", t, c, pcm_out[c], e);
        end
        if (last_t[c] >= 0) begin
          checks++;
          if (t - last_t[c] != 1024) failures++;
        end
        last_t[c] = t;
        if (nout[c] < NOUT) ylog[c][nout[c]] = longint'(pcm_out[c]);
        nout[c]++;
      end
      done = 1'b1;
      for (int c = 0; c < N_CH; c++) if (nout[c] < NOUT) done = 1'b0;
    end

    // passband gain of the whole chain at 1.024 and 2.048 kHz is 0.9446 (-0.50 dB)
    amplitude(0, 1024.0, 0.5 * SCALE * 0.9446);
    amplitude(3, 2048.0, 0.3 * SCALE * 0.9446);
    begin
      longint pk = 0;
      for (int n = 20; n < NOUT; n++) if (ylog[1][n] > pk || -ylog[1][n] > pk) pk = (ylog[1][n] < 0) ? -ylog[1][n] : ylog[1][n];
      $display("ch1 idle: peak %0d", pk);
      checks++;
      if (pk > 200) failures++;
    end
    // DC gain 0.9411: +0.6 settles before the step, -0.6 at the end
    $display("ch2 DC: %0d before the step, %0d at the end (expected +/-%0.0f)",
             ylog[2][NOUT / 2 - 2], ylog[2][NOUT - 1], 0.6 * SCALE * 0.9411);
    checks += 2;
    if (absr(real'(ylog[2][NOUT / 2 - 2]) - 0.6 * SCALE * 0.9411) > 300.0) failures++;
    if (absr(real'(ylog[2][NOUT - 1]) + 0.6 * SCALE * 0.9411) > 300.0) failures++;

    $display("FIR1 pushes: accumulator A %0d, accumulator B %0d; coefficient up/down changes %0d",
             push_a, push_b, dir_changes);
    $display("processor frames with output %0d, without output %0d", frames_out, frames_skip);
    checks += 4;
    if (push_a == 0 || push_b == 0) failures++;
    if (dir_changes == 0) failures++;
    if (frames_out == 0 || frames_skip == 0) failures++;
    for (int c = 0; c < N_CH; c++) if (nout[c] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
