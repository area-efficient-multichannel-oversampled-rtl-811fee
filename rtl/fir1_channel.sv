// One channel of the FIR1 triangle decimator.
//
// A single adder is shared by the two accumulators of the channel: the two state
// registers (reg_a, reg_b) form a two-stage loop through the adder, so each clock
// the adder updates the state that entered it two clocks earlier and the two states
// alternate through it (the published FIR1 has one adder and two state registers
// per channel). The shared counter supplies the coefficient for whichever state is
// in the adder; the 1-bit code x gates it (add coefficient when x = 1, add zero when
// x = 0 - the unipolar reading of the code is this design's choice).
//
// When latch is high the state in the adder holds a complete 2D-sample window sum:
// that sum is pushed into a two-word output FIFO (out_new -> out_old), and the
// adder restarts the state from zero in the same clock. One push every D samples.
// x must stay constant over the two clocks of a sample. Timing: a push shows on
// out_new in the clock after latch. Width W must hold D*(D-1) (16256 for D = 128).
module fir1_channel #(
  parameter int unsigned W  = 14,
  parameter int unsigned CW = 7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x,
  input  logic [CW-1:0] coef,
  input  logic          latch,
  output logic [W-1:0]  out_new,
  output logic [W-1:0]  out_old
);

  logic [W-1:0] reg_a, reg_b;   // reg_a: just written by the adder, reg_b: enters it
  logic [W-1:0] base, sum;

  assign base = latch ? '0 : reg_b;
  assign sum  = base + (x ? W'(coef) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a   <= '0;
      reg_b   <= '0;
      out_new <= '0;
      out_old <= '0;
    end else begin
      reg_a <= sum;
      reg_b <= reg_a;
      if (latch) begin
        out_new <= reg_b;
        out_old <= out_new;
      end
    end
  end

endmodule
