// Self-checking test of the microprogrammed FIR2 + IIR processor on its own.
// The testbench plays the FIR1 output bus: at the start of every 16 kHz frame it
// pushes two new 14-bit words into a two-word FIFO per channel (a different random
// or constant stream per channel). A reference written directly from the filter
// equations (FIR2 1,4,6,4,1 /16, two direct-form-I biquads with the same CSD
// coefficients, arithmetic right shifts, 20-bit wrap-around) predicts each
// channel's output, which must appear on even frames only, once per 8 kHz period.
// The frame length (256 enabled cycles) and output spacing (2 frames) are checked.
module tb_mp_filter;
  import coder_pkg::*;
  localparam int unsigned N_CH = 4, DW = 20, W1 = 14;
  localparam int unsigned FRAMES = 40;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [1:0] rd_ch;
  logic rd_slot;
  logic [W1-1:0] fir1_data;
  logic signed [DW-1:0] pcm_out [N_CH];
  logic [N_CH-1:0] pcm_valid;
  logic frame_start, odd;
  int checks = 0, failures = 0, nout = 0;
  int fifo [N_CH][2];
  int frame = -1;
  // reference state per channel
  longint s0[N_CH], s1[N_CH], s2[N_CH], u1[N_CH], u2[N_CH], v1[N_CH], v2[N_CH], y1[N_CH], y2[N_CH];
  longint expy [N_CH];
  int last_out_cycle [N_CH];
  int cyc = 0;

  mp_filter #(.N_CH(N_CH), .DW(DW), .W1(W1)) dut (.*);
  always #5 clk = ~clk;
  assign fir1_data = W1'(fifo[rd_ch][rd_slot]);

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

  // one 16 kHz step of channel c with FIR1 words a (newest) and b (previous)
  task automatic ref_step(int c, int a, int b);
    longint in0, in1, u, v, y;
    in0 = wrap((longint'(a) - 8128) * 16);
    in1 = wrap((longint'(b) - 8128) * 16);
    u = wrap(sr(in0, 4) + sr(in1, 2) + sr(s0[c], 2) + sr(s0[c], 3) + sr(s1[c], 2) + sr(s2[c], 4));
    v = wrap(sr(u, 1) + sr(u, 6) + sr(u1[c], 2) + sr(u1[c], 4) + sr(u2[c], 1) + sr(u2[c], 6)
             + sr(v1[c], 2) + sr(v1[c], 4) - sr(v2[c], 1) - sr(v2[c], 3) - sr(v2[c], 4));
    y = wrap(sr(v, 2) - sr(v, 5) + sr(v1[c], 1) - sr(v1[c], 3) + sr(v2[c], 2) - sr(v2[c], 5)
             + sr(y1[c], 2) + sr(y1[c], 3) - sr(y1[c], 5) - sr(y2[c], 3) - sr(y2[c], 4));
    s2[c] = s0[c]; s1[c] = in1; s0[c] = in0;
    u2[c] = u1[c]; u1[c] = u;
    v2[c] = v1[c]; v1[c] = v;
    y2[c] = y1[c]; y1[c] = y;
    expy[c] = y;
  endtask

  function automatic int stream(int c, int n);
    case (c)
      0: return 16256;                       // full-scale positive
      1: return 0;                           // full-scale negative
      2: return (n % 4 < 2) ? 12000 : 4000;  // 8 kHz square at 32 kHz
      default: return int'($urandom % 16257);
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    for (int c = 0; c < N_CH; c++) begin
      fifo[c] = '{8128, 8128};
      s0[c] = 0; s1[c] = 0; s2[c] = 0; u1[c] = 0; u2[c] = 0;
      v1[c] = 0; v2[c] = 0; y1[c] = 0; y2[c] = 0; last_out_cycle[c] = -1;
      expy[c] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    while (frame < int'(FRAMES)) begin
      @(negedge clk);
      en = ~en;     // 4.096 MHz enable: every other clock
      cyc++;
      // new frame: push two new FIR1 words per channel before the first read
      if (en && frame_start) begin
        frame++;
        checks++;
        if (odd !== 1'(frame % 2)) failures++;
        for (int c = 0; c < N_CH; c++) begin
          int a, b;
          b = stream(c, 2 * frame);
          a = stream(c, 2 * frame + 1);
          fifo[c] = '{a, b};
          ref_step(c, a, b);
        end
      end
      for (int c = 0; c < N_CH; c++) if (pcm_valid[c]) begin
        checks += 2;
        if (longint'(pcm_out[c]) != expy[c]) begin
          failures++;
          if (failures < 10) $display("frame %0d ch %0d: out %0d exp %0d", frame, c, pcm_out[c], expy[c]);
        end
        if (frame % 2 != 0 || (last_out_cycle[c] >= 0 && cyc - last_out_cycle[c] != 1024))
        begin
          failures++;
          if (failures < 10) $display("ch %0d output in frame %0d, %0d clocks after the previous", c, frame, cyc - last_out_cycle[c]);
        end
        last_out_cycle[c] = cyc;
        nout++;
      end
    end
    // steady state of the constant channels: unity DC gain within the CSD error
    $display("DC +FS ch0 %0d, -FS ch1 %0d (input scale 130048)", y1[0], y1[1]);
    checks += 2;
    if (y1[0] < 115000 || y1[0] > 140000 || y1[1] > -115000 || y1[1] < -140000) failures++;
    checks++;
    if (nout != int'(N_CH) * (FRAMES / 2)) failures++;
    $display("outputs %0d", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
