// tb_iba_generator: the generator reads from a byte array kept in the
// testbench (answering one clock after each read, as the buffer does). For
// packets of many lengths it checks that one word is read per clock, that
// the pointer steps by 8, that lane k gets the four bytes at IBA + k and the
// address IBA + k, that a lane is valid exactly when its four bytes lie in
// the packet, that first marks only the first word, and that busy lasts
// ceil(len / 8) clocks.
module tb_iba_generator;
  import msu_pkg::*;
  logic clk = 0, rst_n = 0, start, busy, first;
  logic [14:0] pkt_len;
  logic [10:0] rd_word;
  logic [127:0] rd_data;
  seq_t seqs [8];
  byte unsigned mem [IB_BYTES + 16];
  int checks = 0, failures = 0, partial = 0;

  always #5 clk = ~clk;

  iba_generator dut (.clk, .rst_n, .start, .pkt_len, .busy, .rd_word, .rd_data, .first, .seqs);

  always_ff @(posedge clk)
    for (int i = 0; i < 16; i++) rd_data[8*i +: 8] <= mem[(int'(rd_word) * 8 + i) % IB_BYTES];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int len);
    int words, got, busy_clks;
    bit seen [int];
    words = (len + 7) / 8;
    @(negedge clk);
    start = 1; pkt_len = 15'(len);
    @(negedge clk);
    start = 0;
    got = 0; busy_clks = 0;
    for (int c = 0; c < words + 4; c++) begin
      if (busy) busy_clks++;
      @(negedge clk);
      // outputs now describe the word read in the previous clock, if any
      if (seqs[0].valid || (got < words && c >= 1)) begin
        for (int k = 0; k < 8; k++) begin
          int a;
          bit ev;
          a = got * 8 + k;
          ev = (a + 4 <= len);
          checks++;
          if (seqs[k].valid !== ev || (ev && (seqs[k].iba !== iba_t'(a) ||
              seqs[k].data !== {mem[a+3], mem[a+2], mem[a+1], mem[a]}))) begin
            failures++;
            $display("len %0d word %0d lane %0d: v %b iba %0d data %h", len, got, k,
                     seqs[k].valid, seqs[k].iba, seqs[k].data);
          end
          if (!ev && k == 7 && got == words - 1) partial++;
        end
        checks++;
        if (first !== (got == 0)) begin
          failures++;
          $display("len %0d word %0d: first %b", len, got, first);
        end
        got++;
        if (got == words) break;
      end
    end
    checks += 2;
    if (got != words) begin
      failures++;
      $display("len %0d: %0d words seen, expected %0d", len, got, words);
    end
    if (busy_clks != words) begin
      failures++;
      $display("len %0d: busy for %0d clocks, expected %0d", len, busy_clks, words);
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    foreach (mem[i]) mem[i] = 8'($urandom);
    start = 0; pkt_len = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(4); run(8); run(9); run(11); run(12); run(64); run(1500); run(9000); run(16384);
    for (int i = 0; i < 20; i++) run($urandom_range(4, 3000));
    checks++;
    if (partial == 0) begin
      failures++;
      $display("no partial last word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
