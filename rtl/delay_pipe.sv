// delay_pipe: fixed-latency register pipeline.
//
// Carries a WIDTH-bit word through LATENCY register stages so that it arrives
// together with a result computed over the same number of clocks. In the
// match search unit it is the "Data Pipeline" and "Data Address Pipeline"
// (six stages, the depth of the hash calculation) and the one-stage "Data &
// Data Address Pipeline" that waits out the hash table read.
//
// Interface: din is sampled on every rising clock edge and appears on dout
// exactly LATENCY clocks later; LATENCY = 0 makes it a wire. There is no
// enable: the unit streams one word per clock. The stage depths follow the
// architecture; the synchronous active-low reset that zeroes every stage is
// this design's choice, so that valid bits carried in the word start cleared.
module delay_pipe #(
  parameter int unsigned WIDTH   = 46,
  parameter int unsigned LATENCY = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  if (LATENCY == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [WIDTH-1:0] stage [LATENCY];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < LATENCY; i++) stage[i] <= '0;
      end else begin
        stage[0] <= din;
        for (int i = 1; i < LATENCY; i++) stage[i] <= stage[i-1];
      end
    end

    assign dout = stage[LATENCY-1];
  end

endmodule
