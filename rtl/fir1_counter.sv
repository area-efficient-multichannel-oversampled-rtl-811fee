// FIR1 program counter and triangle impulse-response generator, shared by all
// channels of the first decimation stage.
//
// A (log2(D)+2)-bit up-counter runs at two clocks per 1-bit input sample. PC_0 (LSB)
// selects which of the two accumulators of every channel is in its adder this clock;
// PC_1..PC_{n-2} count the D samples of a decimation period; PC_{n-1} (MSB, PC_8 for
// D = 128) marks the odd periods. The coefficient is PC_1..PC_{n-2}, inverted
// bitwise when exactly one of PC_0 and the MSB is set: PC_0 gives the two
// accumulators mirror-image coefficient sets in consecutive clocks, and the MSB
// turns the up-count into a down-count after D samples, so each accumulator sees
// 0,1,..,D-1 over one period and D-1,..,1,0 over the next: a 2D-tap triangle.
// This counter/inversion scheme follows the published FIR1; the exact end values
// (0..D-1) and the latch point are this design's choice.
//
// latch is high in the clock where the accumulator in the adder starts a new
// rising half (count 0 with a non-inverted coefficient): its 2D-sample sum is
// then complete, is pushed into the output FIFO and the accumulator restarts.
// That happens once every D samples, alternately for the two accumulators.
// fs_tick (= PC_0) is high in the second clock of each sample.
module fir1_counter #(
  parameter int unsigned D  = 128,
  localparam int unsigned CW = $clog2(D)          // coefficient width
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [CW+1:0] pc,
  output logic [CW-1:0] coef,
  output logic          latch,
  output logic          fs_tick
);

  logic invert;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc <= '0;
    else        pc <= pc + 1'b1;
  end

  assign invert  = pc[0] ^ pc[CW+1];
  assign coef    = pc[CW:1] ^ {CW{invert}};
  assign latch   = (pc[CW:1] == '0) && !invert;
  assign fs_tick = pc[0];

endmodule
