// tb_lz4_msu_top: end-to-end test of the match search unit with its input
// buffer, at the default size (16 kB buffer, 8 lanes, 256-entry table, hash
// latency 6).
//
// Packets of text-like data (words drawn from a small vocabulary, mixed with
// runs of random bytes) are written into the buffer as 64-bit words and
// processed, among them a 9000-byte jumbo packet and packets started back to
// back on the same buffer contents. A reference model works out, for every
// eight-byte step, the match vector and the chosen (current, previous)
// address pair; the testbench compares each result, checks that results
// arrive one per clock without gaps (8 bytes per clock) and that the first
// arrives 9 clocks after start (start register, buffer read, 6 hash stages,
// table read). It counts how often each mechanism occurs: matches, clocks
// with several matches resolved by the priority encoder, two lanes writing
// one table entry, hash collisions, entries hidden by the per-packet clear,
// and partially valid last words. A mechanism that never occurs is a failure.
module tb_lz4_msu_top;
  import msu_pkg::*;
  import msu_ref_pkg::*;
  localparam int unsigned FIRST_LAT = HASH_LAT_DEF + 3;
  localparam int SIZES [6] = '{64, 13, 777, 4, 16384, 2048};
  logic clk = 0, rst_n = 0;
  logic wr_en, start, busy, res_valid, match_found;
  logic [10:0] wr_word;
  logic [63:0] wr_data;
  logic [14:0] pkt_len;
  logic [7:0] match_vec;
  logic [2:0] match_lane;
  iba_t match_cur, match_prev;
  byte unsigned buf_img [IB_BYTES];
  result_t exp_q [$];
  msu_model model;
  int checks = 0, failures = 0;
  int n_match = 0, n_multi = 0, n_conflict = 0, n_coll = 0, n_stale = 0, n_partial = 0;
  int n_bytes = 0, n_pkts = 0;

  always #5 clk = ~clk;

  lz4_msu_top dut (.clk, .rst_n, .wr_en, .wr_word, .wr_data, .start, .pkt_len, .busy,
                   .res_valid, .match_vec, .match_found, .match_lane, .match_cur, .match_prev);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // text-like content: vocabulary words, spaces, and some random bytes
  task automatic fill(int len);
    string vocab [12] = '{"the ", "match ", "search ", "unit ", "hash ", "table ",
                          "lossless ", "compression ", "of ", "data ", "LZ4 ", "a "};
    int i = 0;
    while (i < len) begin
      if ($urandom_range(0, 5) == 0) begin
        repeat ($urandom_range(1, 12)) if (i < len) buf_img[i++] = 8'($urandom);
      end else begin
        string w = vocab[$urandom_range(0, 11)];
        for (int c = 0; c < w.len() && i < len; c++) buf_img[i++] = w[c];
      end
    end
  endtask

  task automatic load(int len);
    for (int wd = 0; wd < (len + 7) / 8; wd++) begin
      @(negedge clk);
      wr_en = 1;
      wr_word = 11'(wd);
      for (int b = 0; b < 8; b++) wr_data[8*b +: 8] = buf_img[wd*8 + b];
    end
    @(negedge clk);
    wr_en = 0;
  endtask

  // expected results of one packet, in word order
  task automatic predict(int len);
    bit v[]; int unsigned a[]; bit [31:0] d[];
    result_t r;
    v = new[8]; a = new[8]; d = new[8];
    for (int base = 0; base < len; base += 8) begin
      for (int k = 0; k < 8; k++) begin
        a[k] = base + k;
        v[k] = (base + k + 4 <= len);
        d[k] = {buf_img[(base+k+3) % IB_BYTES], buf_img[(base+k+2) % IB_BYTES],
                buf_img[(base+k+1) % IB_BYTES], buf_img[base+k]};
      end
      r = model.step(base == 0, v, a, d);
      if (!v[7]) n_partial++;
      if (r.found) n_match++;
      if (r.nmatch > 1) n_multi++;
      if (r.wr_conflict) n_conflict++;
      if (r.hash_collision) n_coll++;
      if (r.stale_blocked) n_stale++;
      if (r.any_valid) exp_q.push_back(r);
    end
  endtask

  // start a packet and check its results; returns when the last has arrived
  task automatic run(int len, bit back_to_back);
    int waited, got, want;
    result_t e;
    if (!back_to_back) @(negedge clk);
    start = 1; pkt_len = 15'(len);
    predict(len);
    want = exp_q.size();
    @(negedge clk);
    start = 0;
    waited = 1;
    while (!res_valid && waited < 40) begin
      @(negedge clk);
      waited++;
    end
    checks++;
    if (waited != FIRST_LAT) begin
      failures++;
      $display("len %0d: first result %0d clocks after start, expected %0d", len, waited, FIRST_LAT);
    end
    for (got = 0; got < want; got++) begin
      e = exp_q.pop_front();
      checks++;
      if (res_valid !== 1'b1 || match_vec !== e.mvec[7:0] || match_found !== e.found
          || (e.found && (match_lane !== 3'(e.lane) || match_cur !== iba_t'(e.cur)
                          || match_prev !== iba_t'(e.prev)))) begin
        failures++;
        $display("len %0d step %0d: v %b vec %b found %b lane %0d cur %0d prev %0d / exp %b %b %0d %0d %0d",
                 len, got, res_valid, match_vec, match_found, match_lane, match_cur, match_prev,
                 e.mvec[7:0], e.found, e.lane, e.cur, e.prev);
      end
      if (got + 1 < want) @(negedge clk);
    end
    n_bytes += len;
    n_pkts++;
  endtask

  initial begin
    model = new(8, HT_DEPTH_DEF);
    wr_en = 0; wr_word = 0; wr_data = 0; start = 0; pkt_len = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // one 9000-byte jumbo packet
    fill(9000);
    load(9000);
    run(9000, 0);
    // the same buffer again, back to back with shorter lengths: the clear
    // must hide the previous packet's entries still being written
    run(1499, 0);
    run(1500, 1);
    run(1001, 1);
    // assorted sizes, including the full 16 kB buffer
    foreach (SIZES[i]) begin
      fill(SIZES[i]);
      load(SIZES[i]);
      run(SIZES[i], 0);
    end
    repeat (12) @(negedge clk);
    checks++;
    if (res_valid !== 1'b0 || match_found !== 1'b0) begin
      failures++;
      $display("results after the last packet");
    end
    checks++;
    if (n_match == 0 || n_multi == 0 || n_conflict == 0 || n_coll == 0 || n_stale == 0 || n_partial == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("packets %0d bytes %0d: match clocks %0d, multi-match %0d, write conflicts %0d, collisions %0d, cleared-entry hits %0d, partial words %0d",
             n_pkts, n_bytes, n_match, n_multi, n_conflict, n_coll, n_stale, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
