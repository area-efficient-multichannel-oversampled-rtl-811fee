// Signal-to-noise-and-distortion and gain-tracking workload for the coder at its
// default sizes: a 1.024 kHz sine at eight input levels (-3 to -70 dB relative to
// the front-end reference), four levels at a time, one per channel. After 40
// settling outputs, 1000 outputs at 8 kHz (exactly 128 periods) are analysed: the
// sine and the mean are fitted by correlation, and everything else counts as noise
// and distortion. Gain tracking is the measured gain relative to the gain at -10 dB.
// Checks: every output word bit-exact against the reference model; gain tracking
// within +/-0.25 dB from -3 to -50 dB; S/(N+D) rising with level and above
// 55 dB at -3 dB. The first-order loop here is ideal apart from the finite op-amp
// gain (A = 1000); a uniform +/-0.01 dither enters through the dither input, and
// no thermal noise is modelled.
module tb_snr_gain;
  `include "coder_ref.svh"
  localparam int N_CH = 4;
  localparam int NSET = 40;
  localparam int NWIN = 1000;
  localparam int NOUT = NSET + NWIN;
  localparam real FS  = 4096000.0;
  localparam real PI  = 3.14159265358979;
  localparam real F0  = 1024.0;
  localparam real LEVEL [8] = '{-3.0, -10.0, -20.0, -30.0, -40.0, -50.0, -60.0, -70.0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] x;
  logic fs_tick;
  logic signed [19:0] pcm_out [N_CH];
  logic [N_CH-1:0] pcm_valid;
  real vin [N_CH];
  real dith [N_CH];
  real vref = 1.0;
  real amp_in [N_CH];
  real snr [8], gain [8];
  int checks = 0, failures = 0, t = 0;
  longint ylog [N_CH][NOUT];
  chan_ref refm [N_CH];

  pcm_coder4 dut (.*);
  for (genvar c = 0; c < N_CH; c++) begin : g_fe
    sd_frontend_model u_fe (.clk, .rst_n, .fs_tick, .vin(vin[c]), .dith(dith[c]), .vref, .vf(x[c]));
  end

  always #5 clk = ~clk;

  localparam real DITH = 0.01;   // dither: uniform, +/-DITH, new value every sample

  always_comb begin
    for (int c = 0; c < N_CH; c++) vin[c] = amp_in[c] * $sin(2.0 * PI * F0 * real'(t / 2) / FS);
  end

  always @(posedge clk) if (fs_tick) begin
    for (int c = 0; c < N_CH; c++) dith[c] <= DITH * (real'($urandom % 20001) / 10000.0 - 1.0);
  end

  initial begin
    repeat (2 * (NOUT + 2) * 1024 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real absr(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run(int first);
    int nout [N_CH];
    bit done;
    for (int c = 0; c < N_CH; c++) begin
      amp_in[c] = 10.0 ** (LEVEL[first + c] / 20.0);
      refm[c] = new(c);
      nout[c] = 0;
    end
    t = 0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    done = 1'b0;
    while (!done) begin
      if (t % 2 == 0) for (int c = 0; c < N_CH; c++) refm[c].bits.push_back(x[c]);
      @(negedge clk);
      t++;
      for (int c = 0; c < N_CH; c++) if (pcm_valid[c] && nout[c] < NOUT) begin
        longint e;
        e = refm[c].step_to(t / 512);
        checks++;
        if (longint'(pcm_out[c]) != e) failures++;
        ylog[c][nout[c]] = longint'(pcm_out[c]);
        nout[c]++;
      end
      done = 1'b1;
      for (int c = 0; c < N_CH; c++) if (nout[c] < NOUT) done = 1'b0;
    end
    for (int c = 0; c < N_CH; c++) begin
      real a = 0.0, b = 0.0, d = 0.0, e2 = 0.0, amp;
      for (int n = NSET; n < NOUT; n++) begin
        a += real'(ylog[c][n]) * $sin(2.0 * PI * F0 * real'(n) / 8000.0);
        b += real'(ylog[c][n]) * $cos(2.0 * PI * F0 * real'(n) / 8000.0);
        d += real'(ylog[c][n]);
      end
      a = 2.0 * a / real'(NWIN);
      b = 2.0 * b / real'(NWIN);
      d = d / real'(NWIN);
      for (int n = NSET; n < NOUT; n++) begin
        real r;
        r = real'(ylog[c][n]) - d - a * $sin(2.0 * PI * F0 * real'(n) / 8000.0)
            - b * $cos(2.0 * PI * F0 * real'(n) / 8000.0);
        e2 += r * r;
      end
      e2 = e2 / real'(NWIN);
      amp = $sqrt(a * a + b * b);
      snr[first + c]  = 10.0 * $log10((amp * amp / 2.0) / (e2 + 1.0e-9));
      gain[first + c] = 20.0 * $log10(amp / (amp_in[c] * 130048.0));
      // lines of the S/(N+D) curve of this channel are printed by the caller
    end
  endtask

  initial begin
    for (int c = 0; c < N_CH; c++) begin
      amp_in[c] = 0.0;
      dith[c] = 0.0;
    end
    run(0);
    run(4);
    for (int i = 0; i < 8; i++) begin
      $display("input %6.1f dB: S/(N+D) %6.1f dB, gain tracking %7.3f dB",
               LEVEL[i], snr[i], gain[i] - gain[1]);
      if (LEVEL[i] >= -50.0) begin
        checks++;
        if (absr(gain[i] - gain[1]) > 0.25) failures++;
      end
      if (i > 0) begin
        checks++;
        if (snr[i] >= snr[i - 1]) failures++;
      end
    end
    checks++;
    if (snr[0] < 55.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
