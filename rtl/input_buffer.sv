// input_buffer: 16 kB packet buffer with a 64-bit write and a 128-bit read port.
//
// Packets arrive from a 10G Ethernet datapath as 64-bit words, one per clock,
// and are written at word addresses. The match search side reads 128 bits per
// clock at an 8-byte aligned address: the word it addresses and the next one,
// of which it uses the low 88 bits (eight overlapping 4-byte sequences). To
// serve two consecutive words in one clock from plain dual-port RAMs the
// buffer is split into an even-word bank and an odd-word bank; each read
// touches each bank once. Reading the last word wraps to word 0 for the upper
// half.
//
// Interface and timing: wr_en/wr_word/wr_data write one 64-bit word at the
// rising edge (byte i of the word is wr_data[8*i +: 8], at byte address
// 8*wr_word + i). rd_word given in one clock returns
// rd_data = {word[rd_word + 1], word[rd_word]} in the next. Contents are not
// reset. Capacity and port widths follow the architecture; the two-bank
// organisation and byte order are this design's choices.
module input_buffer
  import msu_pkg::*;
#(
  localparam int unsigned WORDS = IB_BYTES / (WR_W / 8),
  localparam int unsigned WA    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [WA-1:0]    wr_word,
  input  logic [WR_W-1:0]  wr_data,
  input  logic [WA-1:0]    rd_word,
  output logic [RD_W-1:0]  rd_data
);

  logic [WR_W-1:0] bank_even [WORDS/2];
  logic [WR_W-1:0] bank_odd  [WORDS/2];
  logic [WA-2:0]   row_even, row_odd;
  logic [WR_W-1:0] q_even, q_odd;
  logic            swap_q;

  // word w sits in row w/2 of the bank selected by w[0]; the even word of
  // the pair is w itself or, for odd w, the word in the next row
  assign row_even  = rd_word[0] ? rd_word[WA-1:1] + 1'b1 : rd_word[WA-1:1];
  assign row_odd   = rd_word[WA-1:1];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_word[0]) bank_even[wr_word[WA-1:1]] <= wr_data;
    q_even <= bank_even[row_even];
  end

  always_ff @(posedge clk) begin
    if (wr_en && wr_word[0]) bank_odd[wr_word[WA-1:1]] <= wr_data;
    q_odd  <= bank_odd[row_odd];
  end

  always_ff @(posedge clk) swap_q <= rd_word[0];

  assign rd_data = swap_q ? {q_even, q_odd} : {q_odd, q_even};

endmodule
