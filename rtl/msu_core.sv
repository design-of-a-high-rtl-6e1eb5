// msu_core: the match search unit (MSU), LANES bytes per clock.
//
// Every clock the unit receives LANES overlapping 4-byte sequences, one per
// lane, each with its input buffer address. Each lane hashes its sequence,
// and all lanes read and update one shared ("fully shared") dictionary: a
// multiport hash table whose records hold a previous address together with
// the 4 bytes found there. A lane matches when the record stored under its
// hash holds the same 4 bytes at an earlier address. Of the matches found in
// one clock the one with the lowest address is reported as a (current,
// previous) address pair; the full match vector is also brought out.
// Collisions are not resolved: a newer record simply replaces the old one,
// which keeps the throughput fixed at LANES bytes per clock.
//
// Interface and timing: seqs are sampled every clock; the result for them
// appears HASH_LAT + 1 clocks later (7 at the defaults) on res_valid (any lane
// of that clock was valid), match_vec, match_found, match_lane, match_cur and
// match_prev. clear empties the dictionary and is to be given together with
// the first sequences of a new packet; it travels down the pipeline with them
// so that it takes effect exactly when they reach the table.
// Eight lanes, a 256-entry table and latency 6 + 1 follow the architecture;
// the clear mechanism is this design's choice.
module msu_core
  import msu_pkg::*;
#(
  parameter int unsigned LANES    = LANES_DEF,
  parameter int unsigned HT_DEPTH = HT_DEPTH_DEF,
  parameter int unsigned HASH_LAT = HASH_LAT_DEF,
  localparam int unsigned HTA_W = $clog2(HT_DEPTH),
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  seq_t             seqs [LANES],
  output logic             res_valid,
  output logic [LANES-1:0] match_vec,
  output logic             match_found,
  output logic [LW-1:0]    match_lane,
  output iba_t             match_cur,
  output iba_t             match_prev
);

  logic [LANES-1:0] ht_we;
  logic [HTA_W-1:0] ht_addr   [LANES];
  logic [$bits(ht_rec_t)-1:0] ht_wdata [LANES];
  logic [$bits(ht_rec_t)-1:0] ht_rdata [LANES];
  logic [LANES-1:0] ht_rvalid;
  iba_t             cur  [LANES];
  iba_t             prev [LANES];
  logic             clear_d;
  logic [LANES-1:0] lane_valid, lane_valid_q;

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    ht_rec_t wrec;
    msu_lane #(.HTA_W(HTA_W), .HASH_LAT(HASH_LAT)) u_lane (
      .clk      (clk),
      .rst_n    (rst_n),
      .in       (seqs[i]),
      .ht_we    (ht_we[i]),
      .ht_addr  (ht_addr[i]),
      .ht_wdata (wrec),
      .ht_rdata (ht_rec_t'(ht_rdata[i])),
      .ht_rvalid(ht_rvalid[i]),
      .match    (match_vec[i]),
      .cur_iba  (cur[i]),
      .prev_iba (prev[i])
    );
    assign ht_wdata[i]   = wrec;
    assign lane_valid[i] = seqs[i].valid;
  end

  // clear and the "any lane valid" flag follow the lanes down the pipeline
  delay_pipe #(.WIDTH(1), .LATENCY(HASH_LAT)) u_clear_pipe (
    .clk(clk), .rst_n(rst_n), .din(clear), .dout(clear_d)
  );
  delay_pipe #(.WIDTH(LANES), .LATENCY(HASH_LAT + 1)) u_valid_pipe (
    .clk(clk), .rst_n(rst_n), .din(lane_valid), .dout(lane_valid_q)
  );
  assign res_valid = |lane_valid_q;

  lvt_hash_table #(
    .DEPTH (HT_DEPTH),
    .WIDTH ($bits(ht_rec_t)),
    .WPORTS(LANES),
    .RPORTS(LANES)
  ) u_ht (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (clear_d),
    .we    (ht_we),
    .waddr (ht_addr),
    .wdata (ht_wdata),
    .raddr (ht_addr),
    .rdata (ht_rdata),
    .rvalid(ht_rvalid)
  );

  match_select #(.LANES(LANES)) u_sel (
    .match   (match_vec),
    .cur     (cur),
    .prev    (prev),
    .found   (match_found),
    .lane    (match_lane),
    .cur_iba (match_cur),
    .prev_iba(match_prev)
  );

endmodule
