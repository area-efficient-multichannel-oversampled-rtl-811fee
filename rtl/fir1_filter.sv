// Four-channel FIR1: triangle-window (2D = 256 taps) decimator from the 1-bit
// sigma-delta rate (4.096 MHz, two clocks per sample) to 32 kHz, 14-bit words.
//
// One counter/coefficient generator (fir1_counter) drives N_CH channel slices
// (fir1_channel), each with one multiplexed adder, two state registers and a
// two-word output FIFO, as in the published FIR1. The FIFOs are read over one
// shared W-bit output bus, addressed by the next stage with rd_ch (channel) and
// rd_slot (0 = newest, 1 = previous word); the bus is a plain multiplexer here.
// push is high in the clock in which all FIFOs are pushed (once every D samples);
// the new words are on the bus from the next clock on.
module fir1_filter #(
  parameter int unsigned N_CH = 4,
  parameter int unsigned D    = 128,
  parameter int unsigned W    = 14,
  localparam int unsigned CW  = $clog2(D),
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N_CH-1:0] x,
  output logic           fs_tick,
  output logic           push,
  output logic [CW+1:0]  pc,
  input  logic [CHW-1:0] rd_ch,
  input  logic           rd_slot,
  output logic [W-1:0]   dout
);

  logic [CW-1:0] coef;
  logic [W-1:0]  q_new [N_CH];
  logic [W-1:0]  q_old [N_CH];

  fir1_counter #(.D(D)) u_cnt (
    .clk, .rst_n, .pc, .coef, .latch(push), .fs_tick
  );

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    fir1_channel #(.W(W), .CW(CW)) u_ch (
      .clk, .rst_n, .x(x[c]), .coef, .latch(push),
      .out_new(q_new[c]), .out_old(q_old[c])
    );
  end

  assign dout = rd_slot ? q_old[rd_ch] : q_new[rd_ch];

endmodule
