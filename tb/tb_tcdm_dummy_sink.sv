// tb_tcdm_dummy_sink: self-checking test of the dummy sink. Every request is
// granted in its own cycle and answered with r_valid one cycle later and
// all-zero read data; no response appears without a request.
module tb_tcdm_dummy_sink;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  tcdm_req_t req;
  tcdm_rsp_t rsp;
  int checks = 0, failures = 0;
  bit prev = 0;

  tcdm_dummy_sink dut (.clk_i(clk), .rst_ni(rst_ni), .req_i(req), .rsp_o(rsp));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    req = '0;
    repeat (2) @(negedge clk); rst_ni = 1;
    @(negedge clk);
    check(!rsp.r_valid, "idle after reset");
    for (int i = 0; i < 300; i++) begin
      req.req = $urandom_range(0, 1); req.we = $urandom_range(0, 1);
      req.addr = $urandom; req.wdata = $urandom; req.be = 4'hF;
      #1;
      check(rsp.gnt == req.req, "grant in request cycle");
      check(rsp.r_valid == prev, "response one cycle after grant");
      check(rsp.r_rdata == '0, "no data revealed");
      prev = req.req;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
