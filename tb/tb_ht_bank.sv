// tb_ht_bank: random writes and reads on one hash table bank against an
// array model, including reads of the address written in the same clock,
// which must return the old word.
module tb_ht_bank;
  localparam int unsigned DEPTH = 256, W = 46;
  logic clk = 0;
  logic we;
  logic [7:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;
  int checks = 0, failures = 0, same_addr = 0;

  always #5 clk = ~clk;

  ht_bank #(.DEPTH(DEPTH), .WIDTH(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every address first so that every read has a known answer
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a); wdata = W'({$urandom, $urandom}); raddr = 0;
      model[a] = wdata;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("read %0d: got %h expected %h", n, rdata, expect_q);
        end
      end
      we    = ($urandom_range(0, 3) != 0);
      waddr = 8'($urandom);
      wdata = W'({$urandom, $urandom});
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 8'($urandom);
      if (we && raddr == waddr) same_addr++;
      expect_q = model[raddr];
      if (we) model[waddr] = wdata;
    end
    checks++;
    if (same_addr == 0) begin
      failures++;
      $display("no read of an address being written");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
