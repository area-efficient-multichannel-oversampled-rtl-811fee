// Frequency-response and anti-aliasing workload for the four-channel coder at its
// default sizes. Sine inputs (amplitude 0.5 of full scale) at eight frequencies are
// applied, four at a time (one per channel), through behavioural sigma-delta front
// ends. All frequencies are multiples of 64 Hz so that 125 outputs at 8 kHz hold a
// whole number of periods and the amplitude is measured exactly by correlation.
// 4608 Hz and the out-of-band tones 12992 Hz (around 16 kHz, removed by FIR2) and
// 28992 Hz (around 32 kHz, removed by FIR1) alias into the band after decimation.
// Checks: every output word bit-exact against the reference model; measured gain
// within 0.1 dB (passband) or 2 dB (stopband) of the transfer function of the
// chain, H = sinc^2(FIR1) x cos^4(FIR2) x IIR(z), evaluated offline; passband
// ripple 320-3008 Hz below 0.25 dB; at least 33 dB suppression at 4608 Hz and for
// the two out-of-band tones, relative to 1024 Hz.
module tb_freq_response;
  `include "coder_ref.svh"
  localparam int N_CH = 4;
  localparam int NOUT = 165;
  localparam int NWIN = 125;
  localparam real FS  = 4096000.0;
  localparam real PI  = 3.14159265358979;
  localparam real AMP = 0.5;

  // test frequencies and the chain's gain there in dB (from the filter equations)
  localparam real FREQ [8] = '{320.0, 1024.0, 2048.0, 3008.0, 3392.0, 4608.0, 12992.0, 28992.0};
  localparam real HDB  [8] = '{-0.524, -0.495, -0.495, -0.598, -1.741, -36.705, -46.687, -39.957};

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] x;
  logic fs_tick;
  logic signed [19:0] pcm_out [N_CH];
  logic [N_CH-1:0] pcm_valid;
  real vin [N_CH];
  real dith [N_CH];
  real vref = 1.0;
  real fsel [N_CH];
  real meas_db [8];
  int checks = 0, failures = 0, t = 0;
  longint ylog [N_CH][NOUT];
  chan_ref refm [N_CH];

  pcm_coder4 dut (.*);
  for (genvar c = 0; c < N_CH; c++) begin : g_fe
    sd_frontend_model u_fe (.clk, .rst_n, .fs_tick, .vin(vin[c]), .dith(dith[c]), .vref, .vf(x[c]));
  end

  always #5 clk = ~clk;

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      vin[c]  = AMP * $sin(2.0 * PI * fsel[c] * real'(t / 2) / FS);
      dith[c] = 0.0;
    end
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
      fsel[c] = FREQ[first + c];
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
      real a = 0.0, b = 0.0, amp;
      for (int n = NOUT - NWIN; n < NOUT; n++) begin
        a += real'(ylog[c][n]) * $sin(2.0 * PI * fsel[c] * real'(n) / 8000.0);
        b += real'(ylog[c][n]) * $cos(2.0 * PI * fsel[c] * real'(n) / 8000.0);
      end
      amp = 2.0 * $sqrt(a * a + b * b) / real'(NWIN);
      meas_db[first + c] = 20.0 * $log10(amp / (AMP * 130048.0) + 1.0e-12);
    end
  endtask

  initial begin
    real pmax, pmin;
    for (int c = 0; c < N_CH; c++) fsel[c] = 0.0;
    run(0);
    run(4);
    pmax = -100.0; pmin = 100.0;
    for (int i = 0; i < 8; i++) begin
      $display("%8.0f Hz: measured %8.3f dB, transfer function %8.3f dB", FREQ[i], meas_db[i], HDB[i]);
      checks++;
      if (absr(meas_db[i] - HDB[i]) > ((HDB[i] > -3.0) ? 0.1 : 2.0)) failures++;
      if (i < 4) begin
        if (meas_db[i] > pmax) pmax = meas_db[i];
        if (meas_db[i] < pmin) pmin = meas_db[i];
      end
    end
    $display("passband ripple 320-3008 Hz: %0.3f dB", pmax - pmin);
    $display("suppression vs 1024 Hz: 4608 Hz %0.1f dB, 12992 Hz %0.1f dB, 28992 Hz %0.1f dB",
             meas_db[1] - meas_db[5], meas_db[1] - meas_db[6], meas_db[1] - meas_db[7]);
    checks += 4;
    if (pmax - pmin > 0.25) failures++;
    if (meas_db[1] - meas_db[5] < 33.0) failures++;
    if (meas_db[1] - meas_db[6] < 33.0) failures++;
    if (meas_db[1] - meas_db[7] < 33.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
