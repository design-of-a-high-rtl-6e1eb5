// ht_bank: one bank of the hash table's data memory.
//
// A simple dual-port RAM of DEPTH words (one write port, one read port), the
// shape of one FPGA block RAM. The multiport hash table replicates it once for
// every pair of write port and read port.
//
// Interface and timing: a write (we, waddr, wdata) takes effect at the rising
// edge. A read address raddr given in one clock returns its word on rdata in
// the next (latency one). Reading the address that is written in the same
// clock returns the old word (read-first). The contents are not reset; the
// table that owns the banks keeps separate valid bits. The bank structure
// follows the architecture; read-first behaviour is this design's choice.
module ht_bank #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 46
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
