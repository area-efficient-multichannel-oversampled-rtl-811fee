// Program ROM of the microprogrammed FIR2/IIR processor: DEPTH words of WIDTH bits
// (50 x 26 in the published design). Combinational read. Word a holds
// coder_pkg::prog(a): the FIR2 and IIR microprogram (29 words), the remaining words
// are no-operations, as is any address past DEPTH. The instruction format and the
// program are this design's own (see coder_pkg).
module mp_rom
  import coder_pkg::*;
#(
  parameter int unsigned DEPTH = 50,
  parameter int unsigned WIDTH = 26,
  localparam int unsigned AW   = 6
) (
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_comb begin
    for (int unsigned a = 0; a < DEPTH; a++) mem[a] = WIDTH'(prog(a));
  end

  assign data = (32'(addr) < DEPTH) ? mem[addr] : '0;

endmodule
