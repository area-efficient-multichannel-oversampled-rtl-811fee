// Shared types and constants of the four-channel oversampled voice-band coder.
//
// The decimation chain is FIR1 (triangle, 256 taps, 4.096 MHz -> 32 kHz, 14-bit
// unsigned words) followed by a time-shared microprogrammed processor that runs
// FIR2 (5 taps, 32 -> 16 kHz) and a 4th-order elliptic IIR (16 -> 8 kHz) in a
// 20-bit datapath. The rates, word widths, ROM/RAM sizes and filter orders follow
// the published design; the instruction format and the microprogram below are this
// design's own, since the published design gives neither.
//
// Instruction word (26 bits, one shift-and-add step per 4.096 MHz cycle). The
// processor fetches a word, reads its operand one cycle later and executes it
// (accumulator update, RAM write, output) one cycle after that:
//   acc_en : update the accumulator
//   clr    : start a new sum (acc <= term) instead of acc <= acc + term
//   neg    : term = -(operand >>> shift) instead of +(operand >>> shift)
//   src    : operand = RAM word, newest FIR1 word or previous FIR1 word
//   shift  : arithmetic right shift of the operand (one CSD digit 2^-shift)
//   raddr  : RAM variable offset read (operand-read stage)
//   we     : write RAM variable waddr
//   wsrc   : written value = accumulator (before this instruction's update) or operand
//   waddr  : RAM variable offset written (execute stage)
//   out    : copy the accumulator to the channel output register (even frames)
//   spare  : unused, zero
package coder_pkg;

  localparam int unsigned C_ROM_DEPTH = 50;   // program words
  localparam int unsigned C_ROM_W     = 26;   // instruction width
  localparam int unsigned C_RAM_DEPTH = 40;   // state words, all channels
  localparam int unsigned C_SLOT      = 64;   // instruction cycles per channel per 16 kHz sample
  localparam int unsigned C_VARS      = 10;   // state variables per channel
  localparam int unsigned C_IN_SHIFT  = 4;    // FIR1 word scaling into the data path
  localparam int unsigned C_MID1      = 8128; // FIR1 mid-scale (half of the window sum 16256)

  typedef enum logic [1:0] {
    SRC_RAM = 2'd0,
    SRC_IN0 = 2'd1,   // newest FIR1 output of the channel
    SRC_IN1 = 2'd2,   // previous FIR1 output of the channel
    SRC_ZERO = 2'd3
  } src_e;

  typedef struct packed {
    logic       acc_en;
    logic       clr;
    logic       neg;
    src_e       src;
    logic [4:0] shift;
    logic [3:0] raddr;
    logic       we;
    logic       wsrc;   // 0: accumulator, 1: operand
    logic [3:0] waddr;
    logic       out;
    logic [4:0] spare;
  } instr_t;

  // Per-channel state variable offsets
  localparam logic [3:0] V_S0 = 4'd0;  // FIR2 input x[n-2]
  localparam logic [3:0] V_S1 = 4'd1;  // x[n-3]
  localparam logic [3:0] V_S2 = 4'd2;  // x[n-4]
  localparam logic [3:0] V_U1 = 4'd3;  // FIR2 output u[m-1]
  localparam logic [3:0] V_U2 = 4'd4;  // u[m-2]
  localparam logic [3:0] V_V1 = 4'd5;  // biquad-1 output v[m-1]
  localparam logic [3:0] V_V2 = 4'd6;  // v[m-2]
  localparam logic [3:0] V_Y1 = 4'd7;  // biquad-2 output y[m-1]
  localparam logic [3:0] V_Y2 = 4'd8;  // y[m-2]
  localparam logic [3:0] V_T  = 4'd9;  // scratch

  localparam instr_t NOP = '0;

  // acc (+)= +/- (RAM[ra] >>> sh), optionally with a RAM write
  function automatic instr_t op(logic clr, logic neg, src_e src, logic [4:0] sh, logic [3:0] ra,
                                logic we = 1'b0, logic wsrc = 1'b0, logic [3:0] wa = 4'd0);
    instr_t i;
    i = NOP;
    i.acc_en = 1'b1;
    i.clr    = clr;
    i.neg    = neg;
    i.src    = src;
    i.shift  = sh;
    i.raddr  = ra;
    i.we     = we;
    i.wsrc   = wsrc;
    i.waddr  = wa;
    return i;
  endfunction

  // The microprogram: FIR2 then two direct-form-I biquads, per channel.
  //   u = (x[n] + 4x[n-1] + 6x[n-2] + 4x[n-3] + x[n-4]) / 16
  //   v = k1 (u + u2) + b1 u1 + m1 v1 + m2 v2       k1 = 2^-1 + 2^-6, b1 = 2^-2 + 2^-4
  //                                                 m1 = 2^-2 + 2^-4, m2 = -(2^-1 + 2^-3 + 2^-4)
  //   y = k2 (v + v2) + c1 v1 + n1 y1 + n2 y2       k2 = 2^-2 - 2^-5, c1 = 2^-1 - 2^-3
  //                                                 n1 = 2^-2 + 2^-3 - 2^-5, n2 = -(2^-3 + 2^-4)
  // Every coefficient term is one instruction (one signed power-of-two digit).
  localparam int unsigned PROG_LEN = 29;

  function automatic instr_t prog(int unsigned a);
    instr_t i;
    case (a)
      // FIR2: oldest terms first so delay-line moves can ride on reads
      0:  i = op(1, 0, SRC_RAM, 4, V_S2);
      1:  i = op(0, 0, SRC_RAM, 2, V_S1);
      2:  i = op(0, 0, SRC_RAM, 2, V_S0, 1, 1, V_S2);   // s2 <= s0
      3:  i = op(0, 0, SRC_RAM, 3, V_S0);
      4:  i = op(0, 0, SRC_IN1, 2, 4'd0, 1, 1, V_S1);   // s1 <= x[n-1]
      5:  i = op(0, 0, SRC_IN0, 4, 4'd0, 1, 1, V_S0);   // s0 <= x[n]
      // biquad 1 (acc holds u)
      6:  i = op(1, 0, SRC_RAM, 1, V_U2, 1, 0, V_T);    // t <= u
      7:  i = op(0, 0, SRC_RAM, 6, V_U2);
      8:  i = op(0, 0, SRC_RAM, 2, V_U1, 1, 1, V_U2);   // u2 <= u1
      9:  i = op(0, 0, SRC_RAM, 4, V_U1);
      10: i = op(0, 0, SRC_RAM, 1, V_T,  1, 1, V_U1);   // u1 <= u
      11: i = op(0, 0, SRC_RAM, 6, V_T);
      12: i = op(0, 1, SRC_RAM, 1, V_V2);
      13: i = op(0, 1, SRC_RAM, 3, V_V2);
      14: i = op(0, 1, SRC_RAM, 4, V_V2);
      15: i = op(0, 0, SRC_RAM, 2, V_V1);
      16: i = op(0, 0, SRC_RAM, 4, V_V1);
      // biquad 2 (acc holds v)
      17: i = op(1, 0, SRC_RAM, 2, V_V2, 1, 0, V_T);    // t <= v
      18: i = op(0, 1, SRC_RAM, 5, V_V2);
      19: i = op(0, 0, SRC_RAM, 1, V_V1, 1, 1, V_V2);   // v2 <= v1
      20: i = op(0, 1, SRC_RAM, 3, V_V1);
      21: i = op(0, 0, SRC_RAM, 2, V_T,  1, 1, V_V1);   // v1 <= v
      22: i = op(0, 1, SRC_RAM, 5, V_T);
      23: i = op(0, 1, SRC_RAM, 3, V_Y2);
      24: i = op(0, 1, SRC_RAM, 4, V_Y2);
      25: i = op(0, 0, SRC_RAM, 2, V_Y1, 1, 1, V_Y2);   // y2 <= y1
      26: i = op(0, 0, SRC_RAM, 3, V_Y1);
      27: i = op(0, 1, SRC_RAM, 5, V_Y1);
      28: begin                                         // y1 <= y, output y
            i = NOP;
            i.we    = 1'b1;
            i.waddr = V_Y1;
            i.out   = 1'b1;
          end
      default: i = NOP;
    endcase
    return i;
  endfunction

endpackage
