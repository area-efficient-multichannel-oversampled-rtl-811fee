// Reference model (included inside testbench modules) of one channel of the coder's decimation chain, for testbenches.
// It is written from the filter equations, not from the hardware structure:
//   FIR1: direct 256-tap triangle convolution of the 1-bit history,
//         h = 0,1,..,127,127,..,1,0; word for the window ending before sample s0.
//   FIR2: u = (x[n] + 4x[n-1] + 6x[n-2] + 4x[n-3] + x[n-4]) / 16 at 16 kHz
//         on x = (word - 8128) * 16.
//   IIR:  two direct-form-I biquads with the CSD coefficients of the design,
//         each product an arithmetic right shift, sums wrapped to 20 bits.
// step_to(f) runs the filters through 16 kHz frame f, reading the two FIR1 words
// that the processor sees in that frame: channels 0-1 are served before the
// mid-frame FIR1 push, channels 2-3 after it.
  localparam int D  = 128;
  localparam int DW = 20;

  function automatic longint wrap(longint v);
    longint m = v % (64'sd1 << DW);
    if (m < 0) m += (64'sd1 << DW);
    if (m >= (64'sd1 << (DW - 1))) m -= (64'sd1 << DW);
    return m;
  endfunction

  function automatic longint sr(longint v, int s);
    longint d = 64'sd1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  class chan_ref;
    int ch;
    bit bits [$];
    longint s0, s1, s2, u1, u2, v1, v2, y1, y2;
    int next_frame;

    function new(int c);
      ch = c;
      s0 = 0; s1 = 0; s2 = 0; u1 = 0; u2 = 0; v1 = 0; v2 = 0; y1 = 0; y2 = 0;
      next_frame = 0;
    endfunction

    function int word(int e);
      int acc = 0;
      for (int j = 0; j < 2 * D; j++) begin
        int s = e - 2 * D + j;
        int h = (j < D) ? j : (2 * D - 1 - j);
        if (s >= 0 && s < bits.size() && bits[s]) acc += h;
      end
      return acc;
    endfunction

    function void step(int a, int b);
      longint in0, in1, u, v, y;
      in0 = wrap((longint'(a) - 8128) * 16);
      in1 = wrap((longint'(b) - 8128) * 16);
      u = wrap(sr(in0, 4) + sr(in1, 2) + sr(s0, 2) + sr(s0, 3) + sr(s1, 2) + sr(s2, 4));
      v = wrap(sr(u, 1) + sr(u, 6) + sr(u1, 2) + sr(u1, 4) + sr(u2, 1) + sr(u2, 6)
               + sr(v1, 2) + sr(v1, 4) - sr(v2, 1) - sr(v2, 3) - sr(v2, 4));
      y = wrap(sr(v, 2) - sr(v, 5) + sr(v1, 1) - sr(v1, 3) + sr(v2, 2) - sr(v2, 5)
               + sr(y1, 2) + sr(y1, 3) - sr(y1, 5) - sr(y2, 3) - sr(y2, 4));
      s2 = s0; s1 = in1; s0 = in0;
      u2 = u1; u1 = u;
      v2 = v1; v1 = v;
      y2 = y1; y1 = y;
    endfunction

    // run through frame f; returns the IIR output of frame f
    function longint step_to(int f);
      while (next_frame <= f) begin
        int e = 2 * D * next_frame + ((ch >= 2) ? D : 0);
        step(word(e), word(e - D));
        next_frame++;
      end
      return y1;
    endfunction
  endclass
