// Arithmetic and I/O unit of the microprogrammed FIR2/IIR processor. It holds the
// operand-read and execute stages of the three-stage processor pipeline
// (fetch -> operand read -> execute).
//
// Operand read: for the instruction in the read stage (rd_ins, of channel rd_ch)
// the operand is the RAM word being read, a word from the FIR1 output bus (newest
// or previous output of the channel) converted from the 14-bit unsigned window
// sum to signed by removing the mid-scale MID and scaled up by IN_SHIFT bits, or
// zero. It is registered together with the instruction.
// Execute: there is no multiplier; every instruction adds one signed power-of-two
// term to a DW-bit two's-complement accumulator,
//   acc <= (clr ? 0 : acc) +/- (operand >>> shift),
// so a coefficient with k canonical-signed-digit digits costs k instructions. In the
// same cycle the RAM can be written (ram_we, at variable ex_waddr of channel
// ex_ch) with either the accumulator as it was before this cycle's update or the
// operand itself (a delay-line move). The out bit copies the accumulator into the
// channel's output register on even frames only (16 -> 8 kHz decimation), with a
// one-clock pcm_valid, so the outputs switch only at the 8 kHz rate.
// Both stages advance on clock edges with en high; reset empties the pipeline
// (no-operations). The accumulator wraps on overflow. The 20-bit shift-and-add data
// path and the pipelining follow the published design; the stage split, the
// input conversion and the wrap-around are this design's choices.
module mp_auio
  import coder_pkg::*;
#(
  parameter int unsigned DW       = 20,
  parameter int unsigned W1       = 14,
  parameter int unsigned N_CH     = 4,
  parameter int unsigned IN_SHIFT = 4,
  parameter int unsigned MID      = 8128,
  localparam int unsigned CHW     = (N_CH > 1) ? $clog2(N_CH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  // operand-read stage
  input  instr_t               rd_ins,
  input  logic [CHW-1:0]       rd_ch,
  input  logic                 rd_odd,
  input  logic [DW-1:0]        ram_rdata,
  input  logic [W1-1:0]        fir1_data,
  // execute stage
  output logic [3:0]           ex_waddr,
  output logic [CHW-1:0]       ex_ch,
  output logic                 ram_we,
  output logic [DW-1:0]        ram_wdata,
  output logic signed [DW-1:0] acc,
  output logic signed [DW-1:0] pcm_out [N_CH],
  output logic [N_CH-1:0]      pcm_valid
);

  // execute-stage copy of the instruction fields it still needs
  logic                 ex_acc_en, ex_clr, ex_neg, ex_we, ex_wsrc, ex_out;
  logic [4:0]           ex_shift;
  logic signed [DW-1:0] in_val, operand, ex_opnd, shifted, term;
  logic                 ex_odd;

  assign in_val = (DW'(fir1_data) - DW'(MID)) <<< IN_SHIFT;

  always_comb begin
    unique case (rd_ins.src)
      SRC_RAM:  operand = ram_rdata;
      SRC_IN0,
      SRC_IN1:  operand = in_val;
      default:  operand = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_acc_en <= 1'b0;
      ex_clr    <= 1'b0;
      ex_neg    <= 1'b0;
      ex_shift  <= '0;
      ex_we     <= 1'b0;
      ex_wsrc   <= 1'b0;
      ex_waddr  <= '0;
      ex_out    <= 1'b0;
      ex_ch     <= '0;
      ex_odd    <= 1'b0;
      ex_opnd   <= '0;
    end else if (en) begin
      ex_acc_en <= rd_ins.acc_en;
      ex_clr    <= rd_ins.clr;
      ex_neg    <= rd_ins.neg;
      ex_shift  <= rd_ins.shift;
      ex_we     <= rd_ins.we;
      ex_wsrc   <= rd_ins.wsrc;
      ex_waddr  <= rd_ins.waddr;
      ex_out    <= rd_ins.out;
      ex_ch     <= rd_ch;
      ex_odd    <= rd_odd;
      ex_opnd   <= operand;
    end
  end

  assign shifted   = ex_opnd >>> ex_shift;
  assign term      = ex_neg ? -shifted : shifted;
  assign ram_we    = en && ex_we;
  assign ram_wdata = ex_wsrc ? ex_opnd : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      pcm_valid <= '0;
      for (int c = 0; c < N_CH; c++) pcm_out[c] <= '0;
    end else begin
      pcm_valid <= '0;
      if (en) begin
        if (ex_acc_en) acc <= (ex_clr ? '0 : acc) + term;
        if (ex_out && !ex_odd) begin
          pcm_out[ex_ch]   <= acc;
          pcm_valid[ex_ch] <= 1'b1;
        end
      end
    end
  end

endmodule
