// tb_delay_pipe: checks that a word given to the delay pipeline comes out
// unchanged exactly LATENCY clocks later, for the six-stage depth used next
// to the hash and the one-stage depth used next to the table read, and that
// reset clears every stage.
module tb_delay_pipe;
  localparam int unsigned W = 46;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din, dout6, dout1;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  always #5 clk = ~clk;

  delay_pipe #(.WIDTH(W), .LATENCY(6)) dut6 (.clk, .rst_n, .din, .dout(dout6));
  delay_pipe #(.WIDTH(W), .LATENCY(1)) dut1 (.clk, .rst_n, .din, .dout(dout1));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '1;
    repeat (3) @(negedge clk);
    checks++;
    if (dout6 !== '0 || dout1 !== '0) begin
      failures++;
      $display("reset did not clear the pipeline");
    end
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      if (n >= 7) begin
        checks += 2;
        if (dout6 !== hist[n-6]) begin
          failures++;
          $display("cycle %0d: 6-stage out %h expected %h", n, dout6, hist[n-6]);
        end
        if (dout1 !== hist[n-1]) begin
          failures++;
          $display("cycle %0d: 1-stage out %h expected %h", n, dout1, hist[n-1]);
        end
      end
      din = W'({$urandom, $urandom});
      hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
