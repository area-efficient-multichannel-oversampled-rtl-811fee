// Digital part of a four-channel oversampled (first-order sigma-delta) PCM
// voice-band coder: one decimation filter, time-shared by four channels, turns
// four 1-bit codes at 4.096 MHz into four 20-bit PCM words at 8 kHz.
//
//   x[c] (1 bit, 4.096 MHz) -> FIR1 triangle, 256 taps, /128  -> 14 bit, 32 kHz
//                           -> FIR2, 5 taps, /2               -> 16 kHz
//                           -> IIR, 4th-order elliptic, /2    -> 20 bit, 8 kHz
//
// FIR1 (fir1_filter) is a custom structure running at the input rate: a shared
// coefficient counter and one multiplexed adder per channel. FIR2 and the IIR run on
// one microprogrammed processor (mp_filter) at 4.096 MHz, which serves the channels
// in turn, 64 instruction cycles each per 16 kHz frame.
//
// Clocking: clk is 8.192 MHz, two clocks per input sample (the FIR1 adder works
// on both accumulators of a channel within one sample). fs_tick is high in the
// second clock of each sample: the analog front ends must present a new bit after
// that edge. The processor is enabled on the same clocks (4.096 MHz). The two
// counters start together at reset, so FIR1 pushes (clock 0 and 257 of every
// 512) never fall between the processor's two FIR1 reads (slot cycles 5-6).
// pcm_out[c] changes only once per 8 kHz period, with a one-clock pcm_valid[c].
// Rates, widths and filter orders follow the published design; the single clock
// replacing its two-phase clock is this design's choice.
module pcm_coder4
  import coder_pkg::*;
#(
  parameter int unsigned N_CH = 4,
  parameter int unsigned D1   = 128,
  parameter int unsigned W1   = 14,
  parameter int unsigned DW   = 20,
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_CH-1:0]      x,
  output logic                 fs_tick,
  output logic signed [DW-1:0] pcm_out [N_CH],
  output logic [N_CH-1:0]      pcm_valid
);

  logic [CHW-1:0]          rd_ch;
  logic                    rd_slot, push;
  logic [W1-1:0]           bus;

  fir1_filter #(.N_CH(N_CH), .D(D1), .W(W1)) u_fir1 (
    .clk, .rst_n, .x, .fs_tick, .push, .pc(), .rd_ch, .rd_slot, .dout(bus)
  );

  mp_filter #(.N_CH(N_CH), .DW(DW), .W1(W1), .ROM_DEPTH(C_ROM_DEPTH),
              .RAM_DEPTH(C_RAM_DEPTH), .SLOT(C_SLOT)) u_mp (
    .clk, .rst_n, .en(fs_tick), .rd_ch, .rd_slot, .fir1_data(bus),
    .pcm_out, .pcm_valid, .frame_start(), .odd()
  );

  // The processor must not read a FIFO pair that is being pushed.
  a_no_push_during_read: assert property (@(posedge clk) disable iff (!rst_n)
    (fs_tick && rd_slot) |=> !push);

endmodule
