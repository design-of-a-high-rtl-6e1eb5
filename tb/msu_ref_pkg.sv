// msu_ref_pkg: cycle-level reference model of the match search unit, for
// testbenches.
//
// The model keeps a plain array as the dictionary and processes the lanes of
// one clock as the hardware is specified to: every lane first reads the
// record stored under its hash (the state before this clock's writes; empty
// if the dictionary is cleared in this clock), then the lanes' records are
// written in lane order so that the highest lane wins a shared address. A
// lane matches when the record was written since the last clear, holds the
// same four bytes and an earlier address. The hash is computed here by a
// single 32-bit multiplication, independently of the pipelined multiplier.
package msu_ref_pkg;

  localparam int unsigned MAXL = 16;

  typedef struct {
    bit              any_valid;
    bit [MAXL-1:0]   mvec;
    bit              found;
    int unsigned     lane;
    int unsigned     cur;
    int unsigned     prev;
    // bookkeeping for coverage
    int unsigned     nmatch;
    bit              wr_conflict;
    bit              hash_collision;
    bit              stale_blocked;
  } result_t;

  function automatic int unsigned fib_hash(bit [31:0] data, int unsigned hta_w);
    bit [31:0] p;
    p = data * 32'd2654435761;
    return int'(p >> (32 - hta_w));
  endfunction

  class msu_model;
    int unsigned lanes, depth, hta_w;
    bit [31:0]   tdata [];
    int unsigned tiba  [];
    bit          twr   [];
    bit          tstale[];   // written before the last clear

    function new(int unsigned lanes_, int unsigned depth_);
      lanes = lanes_;
      depth = depth_;
      hta_w = $clog2(depth_);
      tdata = new[depth];
      tiba  = new[depth];
      twr   = new[depth];
      tstale = new[depth];
      foreach (twr[i]) begin
        twr[i] = 0;
        tstale[i] = 0;
      end
    endfunction

    // One clock: v/iba/data per lane, clear with the first lanes of a packet.
    function automatic result_t step(bit clear, bit v[], int unsigned iba[], bit [31:0] data[]);
      result_t r;
      int unsigned h [];
      bit [31:0] pd;
      h = new[lanes];
      r = '{default: 0};
      if (clear) begin
        foreach (twr[i]) begin
          tstale[i] = twr[i] | tstale[i];
          twr[i] = 0;
        end
      end
      for (int k = 0; k < int'(lanes); k++) begin
        h[k] = fib_hash(data[k], hta_w);
        if (v[k]) r.any_valid = 1;
        if (v[k] && twr[h[k]]) begin
          pd = tdata[h[k]];
          if (pd == data[k] && tiba[h[k]] < iba[k]) begin
            r.mvec[k] = 1;
            r.nmatch++;
            if (!r.found) begin
              r.found = 1;
              r.lane  = k;
              r.cur   = iba[k];
              r.prev  = tiba[h[k]];
            end
          end else if (pd != data[k]) begin
            r.hash_collision = 1;
          end
        end
        if (v[k] && !twr[h[k]] && tstale[h[k]]) r.stale_blocked = 1;
      end
      for (int k = 0; k < int'(lanes); k++) begin
        for (int j = 0; j < k; j++)
          if (v[k] && v[j] && h[j] == h[k]) r.wr_conflict = 1;
        if (v[k]) begin
          tdata[h[k]] = data[k];
          tiba[h[k]]  = iba[k];
          twr[h[k]]   = 1;
          tstale[h[k]] = 0;
        end
      end
      return r;
    endfunction
  endclass

endpackage
