// Time-shared microprogrammed processor for FIR2 and the IIR filter of all channels.
//
// Program counter (mp_pc) -> program ROM (mp_rom) -> instruction. The processor is
// a three-stage pipeline: fetch (ROM word into the fetch register), operand read
// (RAM or FIR1 bus read into the arithmetic unit's operand register) and execute
// (shift-and-add, RAM write, output register). The channel address logic (mp_addr)
// turns the read and write variable offsets into RAM addresses of the channel that
// owns the instruction in that stage. The arithmetic/I-O unit (mp_auio) holds the
// read and execute stages and the output registers; the RAM (mp_ram) holds the
// state variables of all channels. No instruction reads a variable written by the
// instruction just before it, so the pipeline needs no forwarding.
// Per channel and per 16 kHz frame the program reads the channel's two newest
// FIR1 words (32 kHz), computes the 5-tap FIR2 output (16 kHz) and runs it
// through two direct-form-I biquads (the 4th-order elliptic IIR); the IIR output
// of every other frame is stored as the 8 kHz result. The FIR1 bus is read combinationally in the operand-read stage of
// instructions 4 and 5, i.e. in cycles 5 and 6 of each channel slot (rd_ch /
// rd_slot); a channel's output register is written in cycle 30 of its slot.
// en is the 4.096 MHz instruction enable.
// Structure (PC, ROM, RAM, AUIO, address unit) follows the published design;
// program, coefficients and instruction format are this design's own.
module mp_filter
  import coder_pkg::*;
#(
  parameter int unsigned N_CH      = 4,
  parameter int unsigned DW        = 20,
  parameter int unsigned W1        = 14,
  parameter int unsigned ROM_DEPTH = 50,
  parameter int unsigned RAM_DEPTH = 40,
  parameter int unsigned SLOT      = 64,
  localparam int unsigned CHW      = (N_CH > 1) ? $clog2(N_CH) : 1,
  localparam int unsigned AW       = $clog2(RAM_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  output logic [CHW-1:0]       rd_ch,
  output logic                 rd_slot,
  input  logic [W1-1:0]        fir1_data,
  output logic signed [DW-1:0] pcm_out [N_CH],
  output logic [N_CH-1:0]      pcm_valid,
  output logic                 frame_start,
  output logic                 odd
);

  logic [$clog2(SLOT)-1:0] pc;
  logic [CHW-1:0]          ch, rd_ch_q, ex_ch;
  logic                    odd_q;
  logic [C_ROM_W-1:0]      word;
  instr_t                  rd_ins;
  logic [3:0]              ex_waddr;
  logic [AW-1:0]           raddr, waddr;
  logic [DW-1:0]           rdata, wdata;
  logic                    we;

  mp_pc #(.SLOT(SLOT), .N_CH(N_CH)) u_pc (
    .clk, .rst_n, .en, .pc, .ch, .odd, .start(frame_start)
  );

  mp_rom #(.DEPTH(ROM_DEPTH), .WIDTH(C_ROM_W)) u_rom (
    .addr(6'(pc)), .data(word)
  );

  // fetch stage register: instruction, its channel and frame parity
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ins  <= NOP;
      rd_ch_q <= '0;
      odd_q   <= 1'b0;
    end else if (en) begin
      rd_ins  <= instr_t'(word);
      rd_ch_q <= ch;
      odd_q   <= odd;
    end
  end

  mp_addr #(.N_CH(N_CH), .AW(AW)) u_ra (.ch(rd_ch_q), .off(rd_ins.raddr), .addr(raddr));
  mp_addr #(.N_CH(N_CH), .AW(AW)) u_wa (.ch(ex_ch),   .off(ex_waddr), .addr(waddr));

  mp_ram #(.DEPTH(RAM_DEPTH), .WIDTH(DW)) u_ram (
    .clk, .rst_n, .we, .waddr, .wdata, .raddr, .rdata
  );

  mp_auio #(.DW(DW), .W1(W1), .N_CH(N_CH), .IN_SHIFT(C_IN_SHIFT), .MID(C_MID1)) u_au (
    .clk, .rst_n, .en,
    .rd_ins, .rd_ch(rd_ch_q), .rd_odd(odd_q), .ram_rdata(rdata), .fir1_data,
    .ex_waddr, .ex_ch, .ram_we(we), .ram_wdata(wdata), .acc(),
    .pcm_out, .pcm_valid
  );

  assign rd_ch   = rd_ch_q;
  assign rd_slot = (rd_ins.src == SRC_IN1);

endmodule
