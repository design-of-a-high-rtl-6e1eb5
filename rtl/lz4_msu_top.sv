// lz4_msu_top: LZ4-style match search unit with its input buffer.
//
// A packet (up to 16 kB, e.g. a 9 kB jumbo frame) is written into the input
// buffer as 64-bit words. After start the IBA generator reads 128 bits per
// clock and hands eight overlapping 4-byte sequences to the match search
// core, which hashes them, looks them up in and updates its shared 256-entry
// LVT hash table, and reports per clock the lowest-address match as a
// (current address, previous address) pair. Throughput is a fixed 8 bytes per
// clock whatever the data; a match does not stall the unit. The sequence
// encoder and output buffer that would consume the matches are not part of
// this unit: the match signals are the top's outputs.
//
// Interface and timing: wr_en/wr_word/wr_data load the buffer (byte i of a
// word at byte address 8*wr_word + i). start with pkt_len (bytes) begins a
// packet; busy is high while it is being read. Results for the eight bytes
// read in one clock appear HASH_LAT + 2 clocks later (one buffer read clock,
// then the core's HASH_LAT + 1), flagged by res_valid. The dictionary is
// emptied at the start of every packet, so matches refer only within a packet.
module lz4_msu_top
  import msu_pkg::*;
#(
  parameter int unsigned HT_DEPTH = HT_DEPTH_DEF,
  parameter int unsigned HASH_LAT = HASH_LAT_DEF,
  localparam int unsigned LANES = WR_W / 8,
  localparam int unsigned WA    = IBA_W - 3,
  localparam int unsigned LW    = $clog2(LANES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // buffer load
  input  logic             wr_en,
  input  logic [WA-1:0]    wr_word,
  input  logic [WR_W-1:0]  wr_data,
  // packet control
  input  logic             start,
  input  logic [IBA_W:0]   pkt_len,
  output logic             busy,
  // match found signal and match address pair
  output logic             res_valid,
  output logic [LANES-1:0] match_vec,
  output logic             match_found,
  output logic [LW-1:0]    match_lane,
  output iba_t             match_cur,
  output iba_t             match_prev
);

  logic [WA-1:0]   rd_word;
  logic [RD_W-1:0] rd_data;
  logic            first;
  seq_t            seqs [LANES];

  input_buffer u_ib (
    .clk    (clk),
    .wr_en  (wr_en),
    .wr_word(wr_word),
    .wr_data(wr_data),
    .rd_word(rd_word),
    .rd_data(rd_data)
  );

  iba_generator u_iba (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (start),
    .pkt_len(pkt_len),
    .busy   (busy),
    .rd_word(rd_word),
    .rd_data(rd_data),
    .first  (first),
    .seqs   (seqs)
  );

  msu_core #(.LANES(LANES), .HT_DEPTH(HT_DEPTH), .HASH_LAT(HASH_LAT)) u_msu (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (first),
    .seqs       (seqs),
    .res_valid  (res_valid),
    .match_vec  (match_vec),
    .match_found(match_found),
    .match_lane (match_lane),
    .match_cur  (match_cur),
    .match_prev (match_prev)
  );

endmodule
