// iba_generator: master input buffer address (IBA) pointer and lane split.
//
// After start, the generator walks a packet of pkt_len bytes held in the
// input buffer. In every clock it reads the 128 bits at the master IBA and
// advances the pointer by 8, so eight new bytes are processed per clock. One
// clock later, when the read data return, it cuts them into eight 4-byte
// sequences starting at byte offsets 0..7 (bytes 0..10, the 88 bits in use)
// and gives lane k the address IBA + k, found by a small adder instead of a
// pointer per lane. A lane is valid only if all four of its bytes lie in the
// packet, so the last word of a packet may enable fewer lanes. The first
// clock of a packet raises first, used to clear the dictionary.
//
// Interface and timing: start (with pkt_len, 1..16384) begins a packet; busy
// is high while reads are issued, ceil(pkt_len / 8) clocks. rd_word drives the
// buffer's read port; rd_data is its answer one clock later. seqs and first
// are combinational from the returned data and registers, one clock after
// the read. A start while busy restarts at address 0. The pointer does not
// stop on a match: the unit keeps its fixed rate of 8 bytes per clock.
// The +8 stepping and the eight adder-derived addresses follow the
// architecture; the packet length handling is this design's choice.
module iba_generator
  import msu_pkg::*;
#(
  localparam int unsigned LANES = WR_W / 8,
  localparam int unsigned WA    = IBA_W - 3
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IBA_W:0]  pkt_len,
  output logic            busy,
  output logic [WA-1:0]   rd_word,
  input  logic [RD_W-1:0] rd_data,
  output logic            first,
  output seq_t            seqs [LANES]
);

  logic [IBA_W:0] iba, len;      // one extra bit: the pointer may reach 16384
  logic           first_pend;
  logic [IBA_W:0] iba_q, len_q;
  logic           issue_q, first_q;
  logic [IBA_W:0] iba_next;

  assign iba_next = iba + (IBA_W+1)'(LANES);
  assign rd_word  = iba[IBA_W-1:3];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      iba        <= '0;
      len        <= '0;
      first_pend <= 1'b0;
    end else if (start) begin
      busy       <= (pkt_len != 0);
      iba        <= '0;
      len        <= pkt_len;
      first_pend <= 1'b1;
    end else if (busy) begin
      iba        <= iba_next;
      first_pend <= 1'b0;
      if (iba_next >= len) busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      issue_q <= 1'b0;
      first_q <= 1'b0;
      iba_q   <= '0;
      len_q   <= '0;
    end else begin
      issue_q <= busy && !start;
      first_q <= busy && !start && first_pend;
      iba_q   <= iba;
      len_q   <= len;
    end
  end

  assign first = first_q;

  // A packet must fit the buffer; a longer one would wrap onto its own start
  a_len_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               start |-> (pkt_len <= (IBA_W+1)'(IB_BYTES)))
    else $error("iba_generator: pkt_len %0d exceeds the %0d-byte buffer", pkt_len, IB_BYTES);

  always_comb begin
    for (int k = 0; k < LANES; k++) begin
      seqs[k].valid = issue_q && ((iba_q + (IBA_W+1)'(k + 4)) <= len_q);
      seqs[k].iba   = iba_q[IBA_W-1:0] + IBA_W'(k);
      seqs[k].data  = rd_data[8*k +: DATA_W];
    end
  end

endmodule
