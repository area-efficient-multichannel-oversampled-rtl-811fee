// Program counter of the microprogrammed FIR2/IIR processor.
//
// The program is straight-line: pc steps 0..SLOT-1 once per channel, the channel
// index ch steps 0..N_CH-1 once per pass, and after the last channel the frame
// parity odd toggles. One frame (SLOT x N_CH cycles of en) is one 16 kHz sample
// period of every channel; odd selects the frames whose IIR result is kept, which
// is the 16 -> 8 kHz decimation. All counters advance only when en is high
// (4.096 MHz). The slot length is this design's choice: 4.096 MHz / (16 kHz x 4).
// start is high at pc = 0 of channel 0 of every frame.
module mp_pc #(
  parameter int unsigned SLOT = 64,
  parameter int unsigned N_CH = 4,
  localparam int unsigned PW  = $clog2(SLOT),
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  output logic [PW-1:0]  pc,
  output logic [CHW-1:0] ch,
  output logic           odd,
  output logic           start
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      ch  <= '0;
      odd <= 1'b0;
    end else if (en) begin
      if (pc == PW'(SLOT - 1)) begin
        pc <= '0;
        if (ch == CHW'(N_CH - 1)) begin
          ch  <= '0;
          odd <= ~odd;
        end else begin
          ch <= ch + 1'b1;
        end
      end else begin
        pc <= pc + 1'b1;
      end
    end
  end

  assign start = (pc == '0) && (ch == '0);

endmodule
