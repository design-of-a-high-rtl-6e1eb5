// fib_hash: pipelined Fibonacci hashing block.
//
// Computes the hash table address of a 4-byte sequence the way LZ4 does: the
// 32-bit sequence is multiplied by a constant close to 2^32 / golden ratio and
// the HTA_W most significant bits of the low 32 product bits are kept:
//   hta = (data * FIB_MULT mod 2^32) >> (32 - HTA_W).
// The multiplication is split as a DSP block would do it: three 16x16 partial
// products in the first stage (the high x high product only affects bits
// above 31 and is dropped), their sum in the second, and LATENCY-2 further
// register stages to give the six-clock latency of the reference multiplier
// configuration.
//
// Interface: data is sampled every clock; hta holds its hash LATENCY clocks
// later. LATENCY must be at least 2. The six-stage depth and the 8-bit address
// for 256 entries follow the architecture; the multiplier value and the
// partial-product split are this design's choices, and the whole unit runs on
// one clock (no faster DSP clock domain).
module fib_hash
  import msu_pkg::*;
#(
  parameter int unsigned HTA_W   = 8,
  parameter int unsigned LATENCY = HASH_LAT_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  data_t            data,
  output logic [HTA_W-1:0] hta
);

  localparam logic [15:0] C_LO = FIB_MULT[15:0];
  localparam logic [15:0] C_HI = FIB_MULT[31:16];

  // Stage 1: partial products
  logic [31:0] pp_ll;
  logic [15:0] pp_hl, pp_lh;
  // Stage 2: sum and address selection
  logic [HTA_W-1:0] hta_s2;

  logic [31:0] pp_ll_d, prod;
  logic [15:0] pp_hl_d, pp_lh_d;

  // Only the low 16 bits of the cross products reach product bits [31:16]
  always_comb begin
    pp_ll_d = 32'(data[15:0]) * 32'(C_LO);
    pp_hl_d = data[31:16] * C_LO;
    pp_lh_d = data[15:0]  * C_HI;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pp_ll <= '0;
      pp_hl <= '0;
      pp_lh <= '0;
    end else begin
      pp_ll <= pp_ll_d;
      pp_hl <= pp_hl_d;
      pp_lh <= pp_lh_d;
    end
  end

  assign prod = pp_ll + {pp_hl + pp_lh, 16'h0000};

  always_ff @(posedge clk) begin
    if (!rst_n) hta_s2 <= '0;
    else        hta_s2 <= prod[31 -: HTA_W];
  end

  delay_pipe #(.WIDTH(HTA_W), .LATENCY(LATENCY - 2)) u_tail (
    .clk (clk),
    .rst_n (rst_n),
    .din (hta_s2),
    .dout(hta)
  );

  initial begin
    assert (LATENCY >= 2) else $error("fib_hash: LATENCY must be at least 2");
    assert (HTA_W >= 1 && HTA_W <= 32) else $error("fib_hash: HTA_W out of range");
  end

endmodule
