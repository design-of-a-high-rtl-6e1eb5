// live_value_table: control memory of the multiport hash table.
//
// For every hash table address it remembers which write port wrote it last,
// and whether it has been written at all since the last clear. Each read port
// looks up its address and gets the number of the bank that holds the live
// value, which then drives that port's output multiplexer. Being small (a few
// bits per entry) it is built from flip-flops, so all ports can reach it in
// the same clock.
//
// Interface and timing: writes (we, waddr) update the table at the rising
// edge. If several ports write one address in the same clock, the highest
// port number wins; in the match search unit that is the lane with the
// highest buffer address, i.e. the newest sequence. A read address given in
// one clock returns sel/live in the next, with read-first behaviour, to line
// up with the data banks. clear empties the table in one clock; writes given
// with clear still land, and reads in that clock already see it empty.
// The live value table principle follows the architecture; the priority rule,
// the written bits and clear are this design's choices.
module live_value_table #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned WPORTS = 8,
  parameter int unsigned RPORTS = 8,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned SW = (WPORTS > 1) ? $clog2(WPORTS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [WPORTS-1:0] we,
  input  logic [AW-1:0]     waddr [WPORTS],
  input  logic [AW-1:0]     raddr [RPORTS],
  output logic [SW-1:0]     sel   [RPORTS],
  output logic [RPORTS-1:0] live
);

  logic [SW-1:0]    bank_of [DEPTH];
  logic [DEPTH-1:0] written;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      written <= '0;
      for (int a = 0; a < DEPTH; a++) bank_of[a] <= '0;
    end else begin
      if (clear) written <= '0;
      for (int w = 0; w < WPORTS; w++) begin
        if (we[w]) begin
          bank_of[waddr[w]] <= SW'(w);
          written[waddr[w]] <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      live <= '0;
      for (int r = 0; r < RPORTS; r++) sel[r] <= '0;
    end else begin
      for (int r = 0; r < RPORTS; r++) begin
        sel[r]  <= bank_of[raddr[r]];
        live[r] <= written[raddr[r]] & ~clear;
      end
    end
  end

endmodule
