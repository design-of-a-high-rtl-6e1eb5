// tb_lvt_hash_table: eight write ports and eight read ports at random
// addresses of a 32-entry table (so that ports collide often), checked
// against a single array: reads return the record as it was before the
// clock's writes, the highest port wins same-address writes, unwritten or
// cleared entries read as not valid. Also runs the 256-entry size once
// through a write-then-read sweep.
module tb_lvt_hash_table;
  localparam int unsigned DEPTH = 32, W = 46, P = 8;
  logic clk = 0, rst_n = 0, clear;
  logic [P-1:0] we;
  logic [4:0]  waddr [P];
  logic [W-1:0] wdata [P];
  logic [4:0]  raddr [P];
  logic [W-1:0] rdata [P];
  logic [P-1:0] rvalid;
  logic [W-1:0] mdata [DEPTH];
  bit           mwr   [DEPTH];
  logic [W-1:0] exp_d [P];
  bit           exp_v [P];
  int checks = 0, failures = 0, conflicts = 0, fwd = 0;

  // full-size instance
  logic [7:0]  waddr_f [P];
  logic [7:0]  raddr_f [P];
  logic [W-1:0] rdata_f [P];
  logic [P-1:0] we_f, rvalid_f;

  always #5 clk = ~clk;

  // record pattern used by the full-size sweep
  function automatic logic [W-1:0] sig(int a);
    logic [W-1:0] x;
    x = W'(a);
    return x * 46'd977;
  endfunction

  lvt_hash_table #(.DEPTH(DEPTH), .WIDTH(W), .WPORTS(P), .RPORTS(P)) dut (
    .clk, .rst_n, .clear, .we, .waddr, .wdata, .raddr, .rdata, .rvalid);

  lvt_hash_table dut_full (
    .clk, .rst_n, .clear(1'b0), .we(we_f), .waddr(waddr_f), .wdata, .raddr(raddr_f),
    .rdata(rdata_f), .rvalid(rvalid_f));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; we = '0; we_f = '0;
    foreach (waddr[i]) begin
      waddr[i] = '0; raddr[i] = '0; wdata[i] = '0; waddr_f[i] = '0; raddr_f[i] = '0;
    end
    foreach (mwr[i]) mwr[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        for (int r = 0; r < P; r++) begin
          checks++;
          if (rvalid[r] !== exp_v[r] || (exp_v[r] && rdata[r] !== exp_d[r])) begin
            failures++;
            $display("cycle %0d port %0d: %b %h expected %b %h",
                     n, r, rvalid[r], rdata[r], exp_v[r], exp_d[r]);
          end
        end
      end
      clear = ($urandom_range(0, 99) == 0);
      for (int w = 0; w < P; w++) begin
        we[w] = ($urandom_range(0, 3) != 0);
        waddr[w] = 5'($urandom);
        wdata[w] = W'({$urandom, $urandom});
      end
      for (int r = 0; r < P; r++) raddr[r] = 5'($urandom);
      for (int r = 0; r < P; r++) begin
        exp_v[r] = mwr[raddr[r]] && !clear;
        exp_d[r] = mdata[raddr[r]];
        // a record written by another port in the previous clock is seen now
        if (exp_v[r]) fwd++;
      end
      if (clear) foreach (mwr[i]) mwr[i] = 0;
      for (int w = 0; w < P; w++) begin
        for (int j = 0; j < w; j++) if (we[w] && we[j] && waddr[w] == waddr[j]) conflicts++;
        if (we[w]) begin
          mdata[waddr[w]] = wdata[w];
          mwr[waddr[w]] = 1;
        end
      end
    end
    // full size: port (a mod 8) writes address a, then all ports read back
    we = '0;
    for (int a = 0; a < 256; a += P) begin
      @(negedge clk);
      we_f = '1;
      for (int w = 0; w < P; w++) begin
        waddr_f[w] = 8'(a + w);
        wdata[w] = sig(a + w);
      end
    end
    @(negedge clk);
    we_f = '0;
    for (int a = 0; a < 256; a += P) begin
      for (int r = 0; r < P; r++) raddr_f[r] = 8'(255 - a - r);
      @(negedge clk);
      for (int r = 0; r < P; r++) begin
        checks++;
        if (!rvalid_f[r] || rdata_f[r] !== sig(255 - a - r)) begin
          failures++;
          $display("full size: addr %0d got %b %h", 255 - a - r, rvalid_f[r], rdata_f[r]);
        end
      end
    end
    checks++;
    if (conflicts == 0) begin
      failures++;
      $display("no write conflict exercised");
    end
    $display("write conflicts %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
