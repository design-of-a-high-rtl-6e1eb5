// tb_fib_hash: drives random and corner-case 32-bit sequences into the
// pipelined Fibonacci hash and checks, six clocks later, the top 8 bits of
// the low 32 bits of data * 2654435761, computed here in one multiplication.
// Also checks a 4096-entry (12-bit) variant at latency 3.
module tb_fib_hash;
  logic clk = 0, rst_n = 0;
  logic [31:0] data;
  logic [7:0]  hta;
  logic [11:0] hta12;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];

  always #5 clk = ~clk;

  fib_hash #(.HTA_W(8),  .LATENCY(6)) dut   (.clk, .rst_n, .data, .hta);
  fib_hash #(.HTA_W(12), .LATENCY(3)) dut12 (.clk, .rst_n, .data, .hta(hta12));

  function automatic logic [31:0] ref_prod(logic [31:0] d);
    return d * 32'd2654435761;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p;
    data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n >= 6) begin
        p = ref_prod(hist[n-6]);
        checks++;
        if (hta !== p[31:24]) begin
          failures++;
          $display("data %h: hta %h expected %h", hist[n-6], hta, p[31:24]);
        end
      end
      if (n >= 3) begin
        p = ref_prod(hist[n-3]);
        checks++;
        if (hta12 !== p[31:20]) begin
          failures++;
          $display("data %h: hta12 %h expected %h", hist[n-3], hta12, p[31:20]);
        end
      end
      case (n)
        0: data = 32'h0000_0000;
        1: data = 32'hFFFF_FFFF;
        2: data = 32'h0000_0001;
        3: data = 32'h8000_0000;
        4: data = 32'h0001_0000;
        default: data = $urandom;
      endcase
      hist.push_back(data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
