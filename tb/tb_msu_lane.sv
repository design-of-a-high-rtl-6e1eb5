// tb_msu_lane: one lane against a behavioural single-port dictionary kept in
// the testbench. Sequences come from a small set of values so that repeats
// (matches) and different values under one hash (collisions) both occur.
// Every result is compared with the reference model exactly seven clocks
// after its input (six for the hash, one for the table read).
module tb_msu_lane;
  import msu_pkg::*;
  import msu_ref_pkg::*;
  localparam int unsigned LAT = HASH_LAT_DEF + 1;
  logic clk = 0, rst_n = 0;
  seq_t in;
  logic ht_we, ht_rvalid, match;
  logic [7:0] ht_addr;
  ht_rec_t ht_wdata, ht_rdata;
  iba_t cur_iba, prev_iba;
  ht_rec_t tbl [256];
  bit      tvalid [256];
  result_t exp_q [$];
  msu_model model;
  int checks = 0, failures = 0, n_match = 0, collisions = 0;

  always #5 clk = ~clk;

  msu_lane dut (.clk, .rst_n, .in, .ht_we, .ht_addr, .ht_wdata, .ht_rdata, .ht_rvalid,
                .match, .cur_iba, .prev_iba);

  // behavioural dictionary: read-first, one clock latency
  always_ff @(posedge clk) begin
    ht_rdata  <= tbl[ht_addr];
    ht_rvalid <= tvalid[ht_addr];
    if (ht_we) begin
      tbl[ht_addr]    <= ht_wdata;
      tvalid[ht_addr] <= 1'b1;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v[]; int unsigned a[]; bit [31:0] d[];
    result_t r, e;
    v = new[1]; a = new[1]; d = new[1];
    model = new(1, 256);
    foreach (tvalid[i]) tvalid[i] = 0;
    in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000 + LAT; n++) begin
      @(negedge clk);
      if (n >= LAT) begin
        e = exp_q.pop_front();
        checks++;
        if (match !== e.mvec[0] || (e.found && (cur_iba !== iba_t'(e.cur) || prev_iba !== iba_t'(e.prev)))) begin
          failures++;
          $display("input %0d: match %b cur %0d prev %0d expected %b %0d %0d",
                   n - LAT, match, cur_iba, prev_iba, e.mvec[0], e.cur, e.prev);
        end
      end else if (n > 0) begin
        checks++;
        if (match !== 1'b0) begin
          failures++;
          $display("match before any input reached the table");
        end
      end
      v[0] = (n < 3000) && ($urandom_range(0, 7) != 0);
      a[0] = n;
      d[0] = 32'h4C5A_0000 + 32'($urandom_range(0, 400));
      in.valid = v[0];
      in.iba   = iba_t'(a[0]);
      in.data  = d[0];
      r = model.step(0, v, a, d);
      if (r.found) n_match++;
      if (r.hash_collision) collisions++;
      exp_q.push_back(r);
    end
    checks++;
    if (n_match == 0 || collisions == 0) begin
      failures++;
      $display("n_match %0d collisions %0d: a case was not exercised", n_match, collisions);
    end
    $display("n_match %0d collisions %0d", n_match, collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
