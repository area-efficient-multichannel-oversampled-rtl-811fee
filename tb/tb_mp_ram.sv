// Self-checking test of the 40 x 20 state RAM: cleared by reset, then random writes
// and reads compared with a model array; reads are asynchronous, writes take
// effect at the clock edge.
module tb_mp_ram;
  localparam int unsigned DEPTH = 40, WIDTH = 20;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) model[a] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = 6'(a); #1;
      checks++;
      if (rdata !== '0) failures++;
    end
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      we = 1'($urandom);
      waddr = 6'($urandom % DEPTH);
      wdata = WIDTH'($urandom);
      raddr = 6'($urandom % DEPTH);
      #1;
      checks++;
      if (rdata !== model[raddr]) failures++;
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
