// Idle-channel noise workload for the coder at its default sizes: each channel's
// input is a constant offset only, swept from -100 mV to +100 mV in 5 mV steps
// (41 offsets, four at a time, one per channel), with the front-end reference
// taken as 2.5 V, so the sweep covers +/-4 % of full scale. After 40 settling
// outputs, 1000 outputs at 8 kHz are analysed with a DFT: the power in the
// 304-3400 Hz bins is the idle noise. It is given in dB relative to a sine of
// amplitude 130048 (a full-scale input word in the 20-bit data path), without
// telephone weighting. The offset itself is a DC term and falls outside the band.
// Checks: every output word bit-exact against the reference model, every offset
// below -60 dB, and the spread between the quietest and the loudest non-zero
// offset below 3 dB. An offset of exactly zero is a special case: the ideal loop
// then settles into the alternating code 1010..., a tone at half the sampling
// rate that FIR1 nulls, so that point is much quieter and is left out of the
// spread. The loop is the same ideal first-order model as in the other workloads,
// with a uniform +/-0.01 dither and no thermal noise.
module tb_idle_noise;
  `include "coder_ref.svh"
  localparam int N_CH = 4;
  localparam int NSET = 40;
  localparam int NWIN = 1000;
  localparam int NOUT = NSET + NWIN;
  localparam int NOFF = 41;
  localparam int NRUN = (NOFF + N_CH - 1) / N_CH;
  localparam real PI   = 3.14159265358979;
  localparam real VREF = 2.5;    // volts represented by the reference
  localparam real DITH = 0.01;   // dither: uniform, +/-DITH, new value every sample
  localparam int KLO = 38;       // 304 Hz at 8 Hz per bin
  localparam int KHI = 425;      // 3400 Hz

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N_CH-1:0] x;
  logic fs_tick;
  logic signed [19:0] pcm_out [N_CH];
  logic [N_CH-1:0] pcm_valid;
  real vin [N_CH];
  real dith [N_CH];
  real vref = 1.0;
  real noise [NRUN * N_CH];
  int checks = 0, failures = 0, t = 0;
  longint ylog [N_CH][NOUT];
  chan_ref refm [N_CH];

  pcm_coder4 dut (.*);
  for (genvar c = 0; c < N_CH; c++) begin : g_fe
    sd_frontend_model u_fe (.clk, .rst_n, .fs_tick, .vin(vin[c]), .dith(dith[c]), .vref, .vf(x[c]));
  end

  always #5 clk = ~clk;

  always @(posedge clk) if (fs_tick) begin
    for (int c = 0; c < N_CH; c++) dith[c] <= DITH * (real'($urandom % 20001) / 10000.0 - 1.0);
  end

  initial begin
    repeat (NRUN * (2 * (NOUT + 2) * 1024 + 100)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real offset_mv(int i);
    return -100.0 + 5.0 * real'(i);
  endfunction

  task automatic run(int first);
    int nout [N_CH];
    bit done;
    for (int c = 0; c < N_CH; c++) begin
      vin[c] = (first + c < NOFF) ? offset_mv(first + c) / 1000.0 / VREF : 0.0;
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
      real p = 0.0;
      for (int k = KLO; k <= KHI; k++) begin
        real a = 0.0, b = 0.0;
        for (int n = 0; n < NWIN; n++) begin
          a += real'(ylog[c][NSET + n]) * $cos(2.0 * PI * real'(k * n) / real'(NWIN));
          b += real'(ylog[c][NSET + n]) * $sin(2.0 * PI * real'(k * n) / real'(NWIN));
        end
        // one-sided power of bin k (Parseval: mean square = sum over bins)
        p += 2.0 * (a * a + b * b) / (real'(NWIN) * real'(NWIN));
      end
      noise[first + c] = 10.0 * $log10((p + 1.0e-9) / (130048.0 * 130048.0 / 2.0));
    end
  endtask

  initial begin
    real lo = 1.0e9, hi = -1.0e9;
    for (int c = 0; c < N_CH; c++) begin
      vin[c] = 0.0;
      dith[c] = 0.0;
    end
    for (int r = 0; r < NRUN; r++) run(r * N_CH);
    for (int i = 0; i < NOFF; i++) begin
      $display("offset %7.1f mV: in-band idle noise %7.1f dB", offset_mv(i), noise[i]);
      if (i != NOFF / 2) begin
        if (noise[i] < lo) lo = noise[i];
        if (noise[i] > hi) hi = noise[i];
      end
      checks++;
      if (noise[i] > -60.0) failures++;
    end
    $display("idle noise at non-zero offsets from %0.1f to %0.1f dB, spread %0.1f dB",
             lo, hi, hi - lo);
    checks++;
    if (hi - lo > 3.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
