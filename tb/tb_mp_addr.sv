// Exhaustive test of the channel address logic: offset x 4 + channel for every
// channel and the ten variable offsets, every address distinct and below 40.
module tb_mp_addr;
  logic [1:0] ch;
  logic [3:0] off;
  logic [5:0] addr;
  int checks = 0, failures = 0;
  bit used [64];

  mp_addr #(.N_CH(4), .AW(6)) dut (.*);

  initial begin
    for (int a = 0; a < 64; a++) used[a] = 1'b0;
    for (int o = 0; o < 10; o++) begin
      for (int c = 0; c < 4; c++) begin
        ch = 2'(c); off = 4'(o);
        #1;
        checks++;
        if (addr !== 6'(4 * o + c) || addr >= 40 || used[addr]) failures++;
        used[addr] = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
