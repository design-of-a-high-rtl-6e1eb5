// tb_ht_size_sweep: the same text-like packet stream is run through four
// match search units that differ only in the number of hash table entries
// (64, 256, 1024 and 4096), the sweep of table sizes against which the
// compression of the architecture is judged. Each unit is checked clock by
// clock against its own reference model; the number of matching sequences
// per size is printed, showing how a larger dictionary finds more of the
// repeats. Text corpora are not available to a testbench, so the data are
// generated: words of a 40-word vocabulary with random bytes in between.
// Two more 256-entry units use the shortened hash pipelines of 3 and 2
// clocks; their results must be the same as at 6 clocks, only earlier, so
// each is checked HASH_LAT + 1 clocks after its input.
module tb_ht_size_sweep;
  import msu_pkg::*;
  import msu_ref_pkg::*;
  localparam int unsigned L = 8, NS = 6;
  localparam int unsigned SIZES [NS] = '{64, 256, 1024, 4096, 256, 256};
  localparam int unsigned HLATS [NS] = '{6, 6, 6, 6, 3, 2};
  logic clk = 0, rst_n = 0, clear;
  seq_t seqs [L];
  logic res_valid [NS];
  logic match_found [NS];
  logic [L-1:0] match_vec [NS];
  logic [2:0] match_lane [NS];
  iba_t match_cur [NS], match_prev [NS];
  result_t exp_q [NS][$];
  msu_model model [NS];
  int checks = 0, failures = 0;
  int lane_matches [NS];
  byte unsigned pkt [];

  always #5 clk = ~clk;

  for (genvar s = 0; s < NS; s++) begin : g_size
    msu_core #(.HT_DEPTH(SIZES[s]), .HASH_LAT(HLATS[s])) dut (
      .clk, .rst_n, .clear, .seqs, .res_valid(res_valid[s]), .match_vec(match_vec[s]),
      .match_found(match_found[s]), .match_lane(match_lane[s]),
      .match_cur(match_cur[s]), .match_prev(match_prev[s]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(bit clr, bit v[], int unsigned a[], bit [31:0] d[]);
    result_t r, e;
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      if (exp_q[s].size() == HLATS[s] + 1) begin
        e = exp_q[s].pop_front();
        checks++;
        if (res_valid[s] !== e.any_valid || match_vec[s] !== e.mvec[L-1:0]
            || match_found[s] !== e.found
            || (e.found && (match_cur[s] !== iba_t'(e.cur) || match_prev[s] !== iba_t'(e.prev)))) begin
          failures++;
          $display("size %0d latency %0d: vec %b expected %b", SIZES[s], HLATS[s] + 1,
                   match_vec[s], e.mvec[L-1:0]);
        end
      end
    end
    clear = clr;
    for (int k = 0; k < L; k++) begin
      seqs[k].valid = v[k];
      seqs[k].iba   = iba_t'(a[k]);
      seqs[k].data  = d[k];
    end
    for (int s = 0; s < NS; s++) begin
      r = model[s].step(clr, v, a, d);
      lane_matches[s] += r.nmatch;
      exp_q[s].push_back(r);
    end
  endtask

  task automatic fill(int len);
    string vocab [40] = '{"the ", "of ", "and ", "to ", "in ", "is ", "that ", "for ",
      "it ", "as ", "was ", "with ", "be ", "by ", "on ", "not ", "he ", "this ", "are ",
      "or ", "his ", "from ", "at ", "which ", "but ", "have ", "an ", "had ", "they ",
      "you ", "were ", "their ", "one ", "all ", "we ", "can ", "her ", "has ", "there ",
      "been "};
    int i = 0;
    pkt = new[len + 16];
    while (i < len + 16) begin
      if ($urandom_range(0, 7) == 0) begin
        repeat ($urandom_range(1, 6)) if (i < len + 16) pkt[i++] = 8'($urandom_range(32, 126));
      end else begin
        string w = vocab[$urandom_range(0, 39)];
        for (int c = 0; c < w.len() && i < len + 16; c++) pkt[i++] = w[c];
      end
    end
  endtask

  task automatic run_packet(int len);
    bit v[]; int unsigned a[]; bit [31:0] d[];
    v = new[L]; a = new[L]; d = new[L];
    fill(len);
    for (int base = 0; base < len; base += L) begin
      for (int k = 0; k < L; k++) begin
        a[k] = base + k;
        v[k] = (base + k + 4 <= len);
        d[k] = {pkt[base+k+3], pkt[base+k+2], pkt[base+k+1], pkt[base+k]};
      end
      cycle(base == 0, v, a, d);
    end
  endtask

  initial begin
    bit v[]; int unsigned a[]; bit [31:0] d[];
    v = new[L]; a = new[L]; d = new[L];
    foreach (v[k]) begin v[k] = 0; a[k] = 0; d[k] = 0; end
    for (int s = 0; s < NS; s++) begin
      model[s] = new(L, SIZES[s]);
      lane_matches[s] = 0;
    end
    clear = 0;
    foreach (seqs[k]) seqs[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 6; p++) run_packet(9000);
    repeat (HASH_LAT_DEF + 1) cycle(0, v, a, d);
    for (int s = 0; s < NS; s++)
      $display("HT size %4d, hash latency %0d: %0d of %0d sequences matched",
               SIZES[s], HLATS[s], lane_matches[s], 6 * 8997);
    checks++;
    if (lane_matches[0] == 0 || lane_matches[4] != lane_matches[1] || lane_matches[5] != lane_matches[1]) begin
      failures++;
      $display("no matches at all");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
