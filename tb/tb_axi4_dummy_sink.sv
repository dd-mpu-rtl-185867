// tb_axi4_dummy_sink: self-checking test of the AXI4 dummy sink. Write bursts
// of random length must be accepted beat by beat and answered with one OKAY
// B carrying the burst's ID; read bursts must return len+1 zero beats with
// the burst's ID, RLAST only on the last one.
module tb_axi4_dummy_sink;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  axi_req_t ip_req;
  axi_rsp_t ip_rsp;
  int checks = 0, failures = 0;

  axi4_dummy_sink dut (.clk_i(clk), .rst_ni(rst_ni), .req_i(ip_req), .rsp_o(ip_rsp));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  `include "axi_tb_tasks.svh"

  initial begin
    ip_req = '0;
    repeat (3) @(negedge clk); rst_ni = 1;
    @(negedge clk);
    check(ip_rsp.aw_ready && ip_rsp.ar_ready && !ip_rsp.b_valid && !ip_rsp.r_valid, "idle");
    for (int i = 0; i < 30; i++) begin
      automatic logic [7:0] len = 8'($urandom_range(0, 15));
      automatic logic [3:0] id = 4'($urandom);
      logic [31:0] d [$];
      axi_resp_e r; bit ok;
      d = {};
      for (int b = 0; b <= int'(len); b++) d.push_back($urandom);
      axi_write(id, $urandom, len, AXI_BURST_INCR, d, r, ok);
      check(ok && r == AXI_RESP_OKAY, "B with ID and OKAY");
      axi_read(id, $urandom, len, AXI_BURST_INCR, d, ok);
      check(ok && d.size() == int'(len) + 1, "R beats with ID and RLAST");
      foreach (d[b]) check(d[b] == 0, "zero read data");
    end
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
