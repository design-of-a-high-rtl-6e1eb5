// tb_msu_core: the eight-lane match search unit at its default size. Packets
// of random length are streamed eight bytes per clock, their bytes drawn from
// a small alphabet so that matches, several matches in one clock,
// same-address writes from two lanes and hash collisions all happen. Each
// packet starts with clear. Every clock's outputs are compared with the
// reference model seven clocks after the input, and a single planted repeat
// checks the seven-clock latency on its own.
module tb_msu_core;
  import msu_pkg::*;
  import msu_ref_pkg::*;
  localparam int unsigned L = 8, LAT = HASH_LAT_DEF + 1;
  logic clk = 0, rst_n = 0, clear;
  seq_t seqs [L];
  logic res_valid, match_found;
  logic [L-1:0] match_vec;
  logic [2:0] match_lane;
  iba_t match_cur, match_prev;
  result_t exp_q [$];
  msu_model model;
  int checks = 0, failures = 0;
  int n_match = 0, n_multi = 0, n_conflict = 0, n_coll = 0, n_stale = 0, n_partial = 0;
  byte unsigned pkt [];

  always #5 clk = ~clk;

  msu_core dut (.clk, .rst_n, .clear, .seqs, .res_valid, .match_vec, .match_found,
                .match_lane, .match_cur, .match_prev);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(result_t e);
    checks++;
    if (res_valid !== e.any_valid || match_vec !== e.mvec[L-1:0] || match_found !== e.found
        || (e.found && (match_lane !== 3'(e.lane) || match_cur !== iba_t'(e.cur)
                        || match_prev !== iba_t'(e.prev)))) begin
      failures++;
      $display("mismatch: vec %b found %b lane %0d cur %0d prev %0d / expected %b %b %0d %0d %0d",
               match_vec, match_found, match_lane, match_cur, match_prev,
               e.mvec[L-1:0], e.found, e.lane, e.cur, e.prev);
    end
  endtask

  // One clock: check the output due now, then drive the next input.
  task automatic cycle(bit clr, bit v[], int unsigned a[], bit [31:0] d[]);
    result_t r;
    @(negedge clk);
    if (exp_q.size() == LAT) check_out(exp_q.pop_front());
    clear = clr;
    for (int k = 0; k < L; k++) begin
      seqs[k].valid = v[k];
      seqs[k].iba   = iba_t'(a[k]);
      seqs[k].data  = d[k];
    end
    r = model.step(clr, v, a, d);
    if (r.found) n_match++;
    if (r.nmatch > 1) n_multi++;
    if (r.wr_conflict) n_conflict++;
    if (r.hash_collision) n_coll++;
    if (r.stale_blocked) n_stale++;
    exp_q.push_back(r);
  endtask

  task automatic idle();
    bit v[]; int unsigned a[]; bit [31:0] d[];
    v = new[L]; a = new[L]; d = new[L];
    foreach (v[k]) begin v[k] = 0; a[k] = 0; d[k] = 0; end
    cycle(0, v, a, d);
  endtask

  task automatic run_packet(int len, int alphabet);
    bit v[]; int unsigned a[]; bit [31:0] d[];
    v = new[L]; a = new[L]; d = new[L];
    pkt = new[len + 16];
    foreach (pkt[i]) pkt[i] = 8'($urandom_range(0, alphabet - 1)) + 8'h61;
    for (int base = 0; base < len; base += L) begin
      for (int k = 0; k < L; k++) begin
        a[k] = base + k;
        v[k] = (base + k + 4 <= len);
        d[k] = {pkt[base+k+3], pkt[base+k+2], pkt[base+k+1], pkt[base+k]};
      end
      if (!v[L-1]) n_partial++;
      cycle(base == 0, v, a, d);
    end
  endtask

  initial begin
    bit v[]; int unsigned a[]; bit [31:0] d[];
    int lat;
    v = new[L]; a = new[L]; d = new[L];
    model = new(L, HT_DEPTH_DEF);
    clear = 0;
    foreach (seqs[k]) seqs[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: one sequence, then the same four bytes 8 bytes later
    foreach (v[k]) begin v[k] = (k == 0); a[k] = k; d[k] = 32'h3412_ABCD; end
    cycle(1, v, a, d);
    foreach (v[k]) begin v[k] = (k == 0); a[k] = 8 + k; end
    cycle(0, v, a, d);
    lat = 0;
    @(negedge clk);
    clear = 0;
    foreach (seqs[k]) seqs[k] = '0;
    exp_q.delete();
    while (!match_found && lat < 20) begin
      @(negedge clk);
      lat++;
    end
    checks++;
    // the repeat entered one clock after the start of counting minus the idle clock
    if (lat + 1 != LAT || match_cur !== iba_t'(8) || match_prev !== iba_t'(0)) begin
      failures++;
      $display("latency check: match after %0d clocks (cur %0d prev %0d), expected %0d",
               lat + 1, match_cur, match_prev, LAT);
    end
    repeat (LAT) @(negedge clk);
    // random packets
    for (int p = 0; p < 40; p++) begin
      run_packet($urandom_range(5, 1500), (p % 4 == 0) ? 2 : $urandom_range(3, 12));
      if (p % 5 == 0) idle();
    end
    repeat (LAT) idle();
    checks++;
    if (n_match == 0 || n_multi == 0 || n_conflict == 0 || n_coll == 0 || n_stale == 0 || n_partial == 0) begin
      failures++;
      $display("a mechanism was not exercised");
    end
    $display("matches %0d multi %0d conflicts %0d collisions %0d stale %0d partial %0d",
             n_match, n_multi, n_conflict, n_coll, n_stale, n_partial);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
