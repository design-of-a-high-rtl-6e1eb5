// tb_input_buffer: fills the whole 16 kB buffer with random 64-bit words,
// then reads every word address, in order and at random, and checks that the
// 128-bit answer is {word[a+1], word[a]} one clock later, with the last
// address wrapping to word 0. Also checks that an overwrite is seen.
module tb_input_buffer;
  import msu_pkg::*;
  localparam int unsigned WORDS = IB_BYTES / 8;
  logic clk = 0;
  logic wr_en;
  logic [10:0] wr_word, rd_word;
  logic [63:0] wr_data;
  logic [127:0] rd_data;
  logic [63:0] model [WORDS];
  logic [127:0] expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_buffer dut (.clk, .wr_en, .wr_word, .wr_data, .rd_word, .rd_data);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int unsigned a);
    @(negedge clk);
    wr_en = 0;
    rd_word = 11'(a);
    expect_q = {model[(a + 1) % WORDS], model[a]};
    @(negedge clk);
    checks++;
    if (rd_data !== expect_q) begin
      failures++;
      $display("word %0d: got %h expected %h", a, rd_data, expect_q);
    end
  endtask

  initial begin
    rd_word = 0;
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      wr_en = 1; wr_word = 11'(a); wr_data = {$urandom, $urandom};
      model[a] = wr_data;
    end
    for (int a = 0; a < WORDS; a++) rd(a);
    for (int i = 0; i < 2000; i++) rd($urandom_range(0, WORDS - 1));
    // overwrite two neighbours and read across them
    @(negedge clk);
    wr_en = 1; wr_word = 11'd101; wr_data = 64'h0123_4567_89AB_CDEF; model[101] = wr_data;
    @(negedge clk);
    wr_en = 1; wr_word = 11'd102; wr_data = 64'hFEDC_BA98_7654_3210; model[102] = wr_data;
    rd(101);
    rd(100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
