// match_select: reduces the lanes' matches of one clock to a single match.
//
// Several of the eight sequences hashed in one clock may find a match. A
// priority encoder picks the lane with the lowest buffer address (lane 0 is
// the lowest) and steers two 1:LANES multiplexers: one for the current
// address of the match, one for the previous (candidate) address found in the
// hash table. The lowest-address-first rule follows the architecture.
//
// Interface and timing: purely combinational. found is high when any bit of
// match is set; lane, cur_iba and prev_iba then describe the chosen lane and
// are zero otherwise.
module match_select
  import msu_pkg::*;
#(
  parameter int unsigned LANES = LANES_DEF,
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic [LANES-1:0] match,
  input  iba_t             cur  [LANES],
  input  iba_t             prev [LANES],
  output logic             found,
  output logic [LW-1:0]    lane,
  output iba_t             cur_iba,
  output iba_t             prev_iba
);

  always_comb begin
    found = 1'b0;
    lane  = '0;
    for (int i = LANES - 1; i >= 0; i--) begin
      if (match[i]) begin
        found = 1'b1;
        lane  = LW'(i);
      end
    end
    cur_iba  = found ? cur[lane]  : '0;
    prev_iba = found ? prev[lane] : '0;
  end

endmodule
