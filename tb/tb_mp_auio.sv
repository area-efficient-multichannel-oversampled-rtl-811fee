// Self-checking test of the arithmetic/I-O unit. Random instructions (random
// clear, sign, shift, operand source, RAM write and output bits) are applied to the
// operand-read stage with random RAM and FIR1 bus data; a model of the read and
// execute stages computes the accumulator, the RAM write data and address, and the
// output registers independently, one enabled cycle after the read. Output
// registers must change only on even frames, with a one-clock pcm_valid;
// enable-low cycles must change nothing.
module tb_mp_auio;
  import coder_pkg::*;
  localparam int unsigned DW = 20, W1 = 14, N_CH = 4;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, rd_odd = 1'b0;
  instr_t rd_ins = '0;
  logic [1:0] rd_ch = '0, ex_ch;
  logic [3:0] ex_waddr;
  logic [DW-1:0] ram_rdata = '0, ram_wdata;
  logic [W1-1:0] fir1_data = '0;
  logic ram_we;
  logic signed [DW-1:0] acc;
  logic signed [DW-1:0] pcm_out [N_CH];
  logic [N_CH-1:0] pcm_valid;
  int checks = 0, failures = 0, outs = 0, blocked = 0;
  longint m_acc = 0;
  longint m_out [N_CH];
  // model of the execute stage
  instr_t e_ins = '0;
  logic [1:0] e_ch = '0;
  logic e_odd = 1'b0;
  longint e_opnd = 0;

  mp_auio #(.DW(DW), .W1(W1), .N_CH(N_CH), .IN_SHIFT(4), .MID(8128)) dut (.*);
  always #5 clk = ~clk;

  function automatic longint wrap(longint v);
    longint m = v % (64'sd1 << DW);
    if (m < 0) m += (64'sd1 << DW);
    if (m >= (64'sd1 << (DW - 1))) m -= (64'sd1 << DW);
    return m;
  endfunction

  function automatic longint floor_shift(longint v, int s);
    // arithmetic right shift = floor division by 2^s
    longint d = 64'sd1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint operand, term, exp_w;
    for (int c = 0; c < N_CH; c++) m_out[c] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 4000; k++) begin
      rd_ins = instr_t'($urandom);
      rd_ins.shift = 5'($urandom % 20);
      rd_ins.spare = '0;
      rd_ins.out = (($urandom % 8) == 0);
      en = ($urandom % 4) != 0;
      rd_odd = 1'($urandom);
      rd_ch = 2'($urandom);
      ram_rdata = DW'($urandom);
      fir1_data = W1'($urandom % 16257);
      #1;
      case (rd_ins.src)
        SRC_RAM: operand = wrap(longint'(signed'(ram_rdata)));
        SRC_IN0, SRC_IN1: operand = wrap((longint'(fir1_data) - 8128) * 16);
        default: operand = 0;
      endcase
      // execute stage holds the instruction read in the previous enabled cycle
      term = floor_shift(e_opnd, e_ins.shift);
      if (e_ins.neg) term = -term;
      exp_w = e_ins.wsrc ? e_opnd : m_acc;
      checks += 4;
      if (longint'(signed'(ram_wdata)) != wrap(exp_w)) begin
        failures++;
        if (failures < 10) $display("k=%0d wdata %0d exp %0d", k, signed'(ram_wdata), exp_w);
      end
      if (ram_we !== (en && e_ins.we)) failures++;
      if (ex_waddr !== e_ins.waddr) failures++;
      if (ex_ch !== e_ch) failures++;
      @(posedge clk);
      if (en) begin
        if (e_ins.out && !e_odd) begin m_out[e_ch] = m_acc; outs++; end
        else if (e_ins.out) blocked++;
        if (e_ins.acc_en) m_acc = wrap((e_ins.clr ? 0 : m_acc) + term);
      end
      @(negedge clk);
      checks++;
      if (longint'(acc) != m_acc) begin
        failures++;
        if (failures < 10) $display("k=%0d acc %0d exp %0d", k, acc, m_acc);
      end
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (longint'(pcm_out[c]) != m_out[c]) failures++;
      end
      checks++;
      if (pcm_valid !== ((en && e_ins.out && !e_odd) ? (4'b1 << e_ch) : 4'b0)) failures++;
      if (en) begin
        e_ins = rd_ins; e_ch = rd_ch; e_odd = rd_odd; e_opnd = operand;
      end
    end
    checks++;
    if (outs == 0 || blocked == 0) failures++;
    $display("outputs written %0d, blocked on odd frames %0d", outs, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
