// tb_rate_limiter: self-checking test of the transfer counter.
// Random transfer pulses, with a bias toward bursts, are applied to a limiter
// (one beat each, then 1 to 3 beats each in the second half)
// with LIMIT 5, PERIOD 4, DEC 2; a counter model written here predicts
// below_limit every cycle. The test also requires that the limit was reached
// and later released.
module tb_rate_limiter;
  logic clk = 0, rst_ni = 0, cnt_in = 0, below;
  logic [8:0] amt = 1;
  int checks = 0, failures = 0;
  int model = 0, cyc = 0, hit = 0, release_n = 0;
  bit prev_below = 1;

  rate_limiter #(.CNT_W(4), .LIMIT(5), .PERIOD(4), .DEC(2)) dut (
    .clk_i(clk), .rst_ni(rst_ni), .count_i(cnt_in), .amount_i(amt), .below_limit_o(below));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (model %0d)", msg, model); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_ni = 1;
    for (int i = 0; i < 2000; i++) begin
      // bursts of transfers in the first half of each 64-cycle window
      cnt_in = ((i % 64) < 32) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 3) == 0);
      amt = (i < 1000) ? 9'd1 : 9'($urandom_range(1, 3));
      #1;
      check(below == (model < 5), "below_limit matches model");
      if (!below) hit++;
      if (below && !prev_below) release_n++;
      prev_below = below;
      @(posedge clk);
      if (cnt_in) model = (model + int'(amt) > 15) ? 15 : model + int'(amt);
      if (cyc == 3) model = (model > 2) ? model - 2 : 0;
      cyc = (cyc + 1) % 4;
      @(negedge clk);
    end
    check(hit > 0, "limit reached");
    check(release_n > 0, "limit released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
