// State-variable RAM of the microprogrammed processor: DEPTH words of WIDTH bits
// (40 x 20 in the published design), shared by all channels (10 words each).
// One asynchronous read port and one synchronous write port (written on the rising
// clock edge when we is high). Reset clears every word so that all filters start
// from rest; the port structure and the reset are this design's choices.
module mp_ram #(
  parameter int unsigned DEPTH = 40,
  parameter int unsigned WIDTH = 20,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned a = 0; a < DEPTH; a++) mem[a] <= '0;
    end else if (we && 32'(waddr) < DEPTH) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (32'(raddr) < DEPTH) ? mem[raddr] : '0;

endmodule
