// tb_match_select: exhaustive over all 256 match vectors with random
// addresses: the lowest matching lane must be chosen and its current and
// previous addresses passed through; no match gives found = 0 and zeros.
module tb_match_select;
  import msu_pkg::*;
  logic [7:0] match;
  iba_t cur [8], prev [8];
  logic found;
  logic [2:0] lane;
  iba_t cur_iba, prev_iba;
  int checks = 0, failures = 0;

  match_select dut (.match, .cur, .prev, .found, .lane, .cur_iba, .prev_iba);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_lane;
    for (int rep = 0; rep < 4; rep++) begin
      for (int m = 0; m < 256; m++) begin
        match = 8'(m);
        for (int i = 0; i < 8; i++) begin
          cur[i]  = iba_t'($urandom);
          prev[i] = iba_t'($urandom);
        end
        #1;
        exp_lane = -1;
        for (int i = 7; i >= 0; i--) if (match[i]) exp_lane = i;
        checks++;
        if (exp_lane < 0) begin
          if (found !== 0 || cur_iba !== '0 || prev_iba !== '0) begin
            failures++;
            $display("vector %b: unexpected match output", match);
          end
        end else if (found !== 1 || lane !== 3'(exp_lane) || cur_iba !== cur[exp_lane]
                     || prev_iba !== prev[exp_lane]) begin
          failures++;
          $display("vector %b: lane %0d expected %0d", match, lane, exp_lane);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
