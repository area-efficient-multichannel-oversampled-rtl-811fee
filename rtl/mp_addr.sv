// Channel address logic of the microprogrammed processor, which replaces a general
// address arithmetic unit: the instruction names a state variable by its offset,
// and the physical RAM address is offset x N_CH + channel, i.e. the offset
// bits concatenated with the channel bits for N_CH = 4. With 10 variables and four
// channels this fills the 40 RAM words exactly. Purely combinational. Replacing the
// address unit by simple logic follows the published design; the mapping is this
// design's choice.
module mp_addr #(
  parameter int unsigned N_CH = 4,
  parameter int unsigned AW   = 6,
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic [CHW-1:0] ch,
  input  logic [3:0]     off,
  output logic [AW-1:0]  addr
);

  assign addr = AW'(off * N_CH + ch);

endmodule
