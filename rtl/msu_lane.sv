// msu_lane: one hash table data processing pipeline of the match search unit.
//
// A lane takes one 4-byte sequence and its input buffer address (IBA) per
// clock. The sequence goes through the Fibonacci hash (HASH_LAT clocks) while
// the data and the address wait in matching delay pipelines. After that the
// lane merges address and data into one 46-bit record and presents it to the
// shared hash table as a write at the hash address, and reads the same
// address. The table returns the record stored there before (the candidate
// match, CM) one clock later; meanwhile the current data and address pass a
// one-stage pipeline. The lane splits the candidate into its previous address
// and previous data and reports a match when the previous data equal the
// current data. Because the candidate's data travel in the table, the input
// buffer never has to be read again for the comparison.
//
// Interface and timing: in is sampled every clock. ht_we/ht_addr/ht_wdata are
// driven HASH_LAT clocks after the input; ht_rdata/ht_rvalid are expected one
// clock after that. match, cur_iba and prev_iba are valid HASH_LAT + 1 clocks
// after the input (7 at the defaults) and are combinational from registers.
// Pipeline structure and depths follow the architecture. The extra
// conditions for a match (current lane valid, table entry written since the
// last clear, previous address below the current one, which is the "within
// offset" test since the 16 kB buffer is smaller than any LZ4 offset limit)
// are this design's reading.
module msu_lane
  import msu_pkg::*;
#(
  parameter int unsigned HTA_W    = 8,
  parameter int unsigned HASH_LAT = HASH_LAT_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  seq_t             in,
  // hash table port
  output logic             ht_we,
  output logic [HTA_W-1:0] ht_addr,
  output ht_rec_t          ht_wdata,
  input  ht_rec_t          ht_rdata,
  input  logic             ht_rvalid,
  // result
  output logic             match,
  output iba_t             cur_iba,
  output iba_t             prev_iba
);

  typedef struct packed {
    logic  valid;
    data_t data;
  } vdata_t;

  vdata_t vdata_d;
  iba_t   iba_d;
  seq_t   cur_q;

  // Data Pipeline (with the lane's valid bit)
  delay_pipe #(.WIDTH($bits(vdata_t)), .LATENCY(HASH_LAT)) u_data_pipe (
    .clk  (clk),
    .rst_n(rst_n),
    .din  ({in.valid, in.data}),
    .dout (vdata_d)
  );

  // Data Address Pipeline
  delay_pipe #(.WIDTH(IBA_W), .LATENCY(HASH_LAT)) u_addr_pipe (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (in.iba),
    .dout (iba_d)
  );

  // Fibonacci Hashing Block
  fib_hash #(.HTA_W(HTA_W), .LATENCY(HASH_LAT)) u_hash (
    .clk  (clk),
    .rst_n(rst_n),
    .data (in.data),
    .hta  (ht_addr)
  );

  // Merge: HT Data In
  assign ht_we    = vdata_d.valid;
  assign ht_wdata = '{iba: iba_d, data: vdata_d.data};

  // Data & Data Address Pipeline (latency 1, matches the table read)
  delay_pipe #(.WIDTH($bits(seq_t)), .LATENCY(1)) u_cur_pipe (
    .clk  (clk),
    .rst_n(rst_n),
    .din  ({vdata_d.valid, iba_d, vdata_d.data}),
    .dout (cur_q)
  );

  // Split: HT Data Out, then compare
  assign cur_iba  = cur_q.iba;
  assign prev_iba = ht_rdata.iba;
  assign match    = cur_q.valid && ht_rvalid
                 && (ht_rdata.data == cur_q.data)
                 && (ht_rdata.iba < cur_q.iba);

endmodule
