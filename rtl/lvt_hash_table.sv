// lvt_hash_table: multiport hash table built with a live value table (LVT).
//
// The dictionary of the match search unit must accept one read and one write
// from each of the eight lanes in every clock, at unrelated addresses. Block
// RAMs have two ports, so the table is built from WPORTS x RPORTS simple
// dual-port banks: write port w writes its record into every bank of row w
// (one copy per read port), and read port r reads its address from every
// bank of column r. A live value table records, for each address, which write
// port wrote it last; each read port uses that number to pick the bank that
// holds the newest record. With 8 x 8 ports this is 64 banks, one block RAM
// each.
//
// Interface and timing: in every clock each port w may write wdata[w] at
// waddr[w] (we[w]) and each port r reads raddr[r]; rdata[r] and rvalid[r]
// appear one clock later. rvalid is low for an address not written since the
// last clear. A read of an address written in the same clock returns the old
// record; a write one clock earlier is seen. Same-clock writes to one
// address: the highest port number wins.
// Bank replication and the LVT follow the architecture; the valid bits, clear
// and the read-first and priority rules are this design's choices.
module lvt_hash_table #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned WIDTH  = 46,
  parameter int unsigned WPORTS = 8,
  parameter int unsigned RPORTS = 8,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned SW = (WPORTS > 1) ? $clog2(WPORTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [WPORTS-1:0] we,
  input  logic [AW-1:0]     waddr  [WPORTS],
  input  logic [WIDTH-1:0]  wdata  [WPORTS],
  input  logic [AW-1:0]     raddr  [RPORTS],
  output logic [WIDTH-1:0]  rdata  [RPORTS],
  output logic [RPORTS-1:0] rvalid
);

  logic [WIDTH-1:0] bank_q [WPORTS][RPORTS];
  logic [SW-1:0]    sel    [RPORTS];

  for (genvar w = 0; w < WPORTS; w++) begin : g_wr
    for (genvar r = 0; r < RPORTS; r++) begin : g_rd
      ht_bank #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_bank (
        .clk  (clk),
        .we   (we[w]),
        .waddr(waddr[w]),
        .wdata(wdata[w]),
        .raddr(raddr[r]),
        .rdata(bank_q[w][r])
      );
    end
  end

  live_value_table #(.DEPTH(DEPTH), .WPORTS(WPORTS), .RPORTS(RPORTS)) u_lvt (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(clear),
    .we   (we),
    .waddr(waddr),
    .raddr(raddr),
    .sel  (sel),
    .live (rvalid)
  );

  // Output multiplexers steered by the live value table
  always_comb begin
    for (int r = 0; r < RPORTS; r++) rdata[r] = bank_q[sel[r]][r];
  end

endmodule
