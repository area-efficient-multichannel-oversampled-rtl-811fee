// Self-checking test of the processor program counter: pc 0..63 per channel slot,
// channel 0..3 per frame, frame parity toggling every 256 enabled cycles, start
// at the top of each frame, and no advance on cycles with en low.
module tb_mp_pc;
  localparam int unsigned SLOT = 64, N_CH = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [5:0] pc;
  logic [1:0] ch;
  logic odd, start;
  int checks = 0, failures = 0, n = 0;

  mp_pc #(.SLOT(SLOT), .N_CH(N_CH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 3 * 2 * SLOT * N_CH; k++) begin
      // n counts enabled cycles seen so far
      checks++;
      if (pc !== 6'(n % SLOT) || ch !== 2'((n / SLOT) % N_CH) ||
          odd !== 1'((n / (SLOT * N_CH)) % 2) || start !== (n % (SLOT * N_CH) == 0)) begin
        failures++;
        if (failures < 10) $display("n=%0d pc=%0d ch=%0d odd=%0b", n, pc, ch, odd);
      end
      en = (k % 2 == 0) || (k % 7 == 3);
      @(negedge clk);
      if (en) n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
