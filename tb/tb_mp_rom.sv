// Self-checking test of the program ROM. The ROM is decoded and executed
// symbolically: for each of the three program sections (FIR2, biquad 1, biquad 2)
// the signed power-of-two terms are summed per operand, and the resulting
// coefficients are compared with the intended filter coefficients written out here
// as plain numbers. The delay-line moves, the output word, the no-operation words
// after the program and past the ROM depth, and the absence of read-after-write
// pairs between neighbouring words (the pipeline has no forwarding) are checked
// as well.
module tb_mp_rom;
  import coder_pkg::*;
  localparam int unsigned DEPTH = 50, WIDTH = 26;
  logic [5:0] addr;
  logic [WIDTH-1:0] data;
  instr_t ins;
  int checks = 0, failures = 0;
  real w [4][16];           // [operand kind][raddr] -> coefficient, per section
  int  n_moves = 0;

  mp_rom #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  assign ins = instr_t'(data);

  task automatic expect_w(int k, int a, real v, string what);
    checks++;
    if (w[k][a] != v) begin
      failures++;
      $display("%s: coefficient %f expected %f", what, w[k][a], v);
    end
  endtask

  task automatic run_section(int first, int last);
    for (int k = 0; k < 4; k++) for (int a = 0; a < 16; a++) w[k][a] = 0.0;
    for (int i = first; i <= last; i++) begin
      real v;
      addr = 6'(i); #1;
      if (ins.acc_en) begin
        v = 1.0 / (2.0 ** ins.shift);
        if (ins.neg) v = -v;
        w[ins.src][ins.src == SRC_RAM ? ins.raddr : 0] += v;
      end
      if (ins.we && ins.wsrc) n_moves++;
    end
  endtask

  initial begin
    // FIR2: (1, 4, 6, 4, 1) / 16 on x[n], x[n-1], s0, s1, s2
    run_section(0, 5);
    expect_w(SRC_IN0, 0, 1.0 / 16, "x[n]");
    expect_w(SRC_IN1, 0, 4.0 / 16, "x[n-1]");
    expect_w(SRC_RAM, 0, 6.0 / 16, "x[n-2]");
    expect_w(SRC_RAM, 1, 4.0 / 16, "x[n-3]");
    expect_w(SRC_RAM, 2, 1.0 / 16, "x[n-4]");
    // biquad 1
    run_section(6, 16);
    expect_w(SRC_RAM, 9, 0.515625, "b0");
    expect_w(SRC_RAM, 3, 0.3125,   "b1");
    expect_w(SRC_RAM, 4, 0.515625, "b2");
    expect_w(SRC_RAM, 5, 0.3125,   "-a1");
    expect_w(SRC_RAM, 6, -0.6875,  "-a2");
    // biquad 2
    run_section(17, 27);
    expect_w(SRC_RAM, 9, 0.21875,  "b0'");
    expect_w(SRC_RAM, 5, 0.375,    "b1'");
    expect_w(SRC_RAM, 6, 0.21875,  "b2'");
    expect_w(SRC_RAM, 7, 0.34375,  "-a1'");
    expect_w(SRC_RAM, 8, -0.1875,  "-a2'");
    checks++;
    if (n_moves != 8) begin failures++; $display("moves %0d", n_moves); end
    // first instruction of each section starts a new sum
    addr = 6'd0;  #1; checks++; if (!ins.clr) failures++;
    addr = 6'd6;  #1; checks++; if (!(ins.clr && ins.we && !ins.wsrc && ins.waddr == 4'd9)) failures++;
    addr = 6'd17; #1; checks++; if (!(ins.clr && ins.we && !ins.wsrc && ins.waddr == 4'd9)) failures++;
    addr = 6'd28; #1; checks++;
    if (!(ins.out && ins.we && !ins.wsrc && ins.waddr == 4'd7 && !ins.acc_en)) failures++;
    for (int i = 29; i < 64; i++) begin
      addr = 6'(i); #1;
      checks++;
      if (data !== '0) failures++;
    end
    // the processor has no forwarding: an instruction must not read the variable
    // written by the instruction right before it
    for (int i = 0; i < 64; i++) begin
      instr_t prev;
      addr = 6'(i); #1; prev = ins;
      addr = 6'((i + 1) % 64); #1;
      checks++;
      if (prev.we && ins.src == SRC_RAM && ins.raddr == prev.waddr) begin
        failures++;
        $display("word %0d reads variable %0d written by word %0d", (i + 1) % 64, ins.raddr, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
