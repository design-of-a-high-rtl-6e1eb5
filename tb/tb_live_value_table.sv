// tb_live_value_table: random writes from eight ports into a 16-entry live
// value table (so that ports often collide on one address), random reads and
// occasional clears, checked against a model: the highest writing port wins,
// reads are read-first with one clock latency, a clear empties the table and
// hides it from reads in the same clock.
module tb_live_value_table;
  localparam int unsigned DEPTH = 16, WP = 8, RP = 8;
  logic clk = 0, rst_n = 0, clear;
  logic [WP-1:0] we;
  logic [3:0] waddr [WP];
  logic [3:0] raddr [RP];
  logic [2:0] sel [RP];
  logic [RP-1:0] live;
  int unsigned mbank [DEPTH];
  bit          mwr   [DEPTH];
  int unsigned exp_sel [RP];
  bit          exp_live [RP];
  int checks = 0, failures = 0, conflicts = 0, clears = 0;

  always #5 clk = ~clk;

  live_value_table #(.DEPTH(DEPTH), .WPORTS(WP), .RPORTS(RP)) dut (
    .clk, .rst_n, .clear, .we, .waddr, .raddr, .sel, .live);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; we = '0;
    foreach (waddr[i]) waddr[i] = '0;
    foreach (raddr[i]) raddr[i] = '0;
    foreach (mwr[i]) mwr[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        for (int r = 0; r < RP; r++) begin
          checks++;
          if (live[r] !== exp_live[r] || (exp_live[r] && sel[r] !== 3'(exp_sel[r]))) begin
            failures++;
            $display("cycle %0d port %0d: live %b sel %0d expected %b %0d",
                     n, r, live[r], sel[r], exp_live[r], exp_sel[r]);
          end
        end
      end
      clear = ($urandom_range(0, 49) == 0);
      if (clear) clears++;
      for (int w = 0; w < WP; w++) begin
        we[w] = ($urandom_range(0, 2) != 0);
        waddr[w] = 4'($urandom);
      end
      for (int r = 0; r < RP; r++) raddr[r] = 4'($urandom);
      // expected read results: state before this clock, cleared if clear
      for (int r = 0; r < RP; r++) begin
        exp_live[r] = mwr[raddr[r]] && !clear;
        exp_sel[r]  = mbank[raddr[r]];
      end
      if (clear) foreach (mwr[i]) mwr[i] = 0;
      for (int w = 0; w < WP; w++) begin
        for (int j = 0; j < w; j++) if (we[w] && we[j] && waddr[w] == waddr[j]) conflicts++;
        if (we[w]) begin
          mbank[waddr[w]] = w;
          mwr[waddr[w]] = 1;
        end
      end
    end
    checks++;
    if (conflicts == 0 || clears == 0) begin
      failures++;
      $display("no write conflict or no clear exercised");
    end
    $display("write conflicts %0d clears %0d", conflicts, clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
