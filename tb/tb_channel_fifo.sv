// tb_channel_fifo: self-checking test of the channel FIFO against a queue
// model under random push/pop, including the full and overflow behaviour and
// the one-cycle latency from push to output.
module tb_channel_fifo;
  logic clk = 0, rst_ni = 0;
  logic push = 0, pop = 0, valid, full, ovf;
  logic [15:0] din = 0, dout;
  logic [15:0] model [$];
  bit model_ovf = 0;
  int checks = 0, failures = 0;

  channel_fifo #(.WIDTH(16), .DEPTH(3)) dut (.clk_i(clk), .rst_ni(rst_ni), .push_i(push),
    .data_i(din), .pop_i(pop), .valid_o(valid), .data_o(dout), .full_o(full), .overflow_o(ovf));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_ni = 1;
    // push then visible the next cycle
    @(negedge clk); check(!valid, "empty after reset");
    push = 1; din = 16'hABCD; #1 check(!valid, "not visible in push cycle");
    @(negedge clk); push = 0; check(valid && dout == 16'hABCD, "visible next cycle");
    pop = 1; @(negedge clk); pop = 0; check(!valid, "empty after pop");
    for (int i = 0; i < 500; i++) begin
      push = ($urandom_range(0, 2) != 0);
      pop  = ($urandom_range(0, 2) == 0);
      din  = $urandom;
      #1;
      check(valid == (model.size() != 0), "valid matches model");
      check(full == (model.size() == 3), "full matches model");
      if (model.size() != 0) check(dout == model[0], "head matches model");
      @(posedge clk);
      begin
        automatic int sz = model.size();
        if (pop && sz != 0) void'(model.pop_front());
        if (push && sz < 3) model.push_back(din);
        else if (push) model_ovf = 1;
      end
      @(negedge clk);
      check(ovf == model_ovf, "overflow flag");
    end
    check(model_ovf, "overflow was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
