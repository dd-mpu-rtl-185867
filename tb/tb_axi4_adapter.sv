// tb_axi4_adapter: self-checking test of the AXI4 adapter with the decision
// driven by the testbench (allow = address bit 12 of the checked burst).
// Random bursts are issued on the read and write sides at the same time
// against a memory model with random stalls. Allowed bursts must reach
// memory and return its data; denied ones must complete with zero data and
// never reach memory. The transfer description must give the burst's byte
// range, checked in a monitor on every address handshake.
module tb_axi4_adapter;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  axi_req_t ip_req, mem_req;
  axi_rsp_t ip_rsp, mem_rsp;
  xfer_t x;
  logic allow, done, denied;
  logic [8:0] beats;
  int checks = 0, failures = 0, n_done = 0, n_denied = 0;
  logic [31:0] shadow [256];

  axi4_adapter dut (.clk_i(clk), .rst_ni(rst_ni), .ip_req_i(ip_req), .ip_rsp_o(ip_rsp),
    .mem_req_o(mem_req), .mem_rsp_i(mem_rsp), .xfer_o(x), .allow_i(allow), .done_o(done), .beats_o(beats),
    .denied_o(denied));
  axi_mem_model #(.WORDS(256), .READY_PCT(50)) u_mem (.clk_i(clk), .req_i(mem_req), .rsp_o(mem_rsp));

  assign allow = x.addr[12];

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // every address handshake: the description matches the burst taken
  always @(posedge clk) if (rst_ni && done) begin
    automatic axi_ax_t ax = (ip_req.aw_valid && ip_rsp.aw_ready) ? ip_req.aw : ip_req.ar;
    n_done++;
    if (denied) n_denied++;
    check(x.addr == ax.addr && x.len == (32'(ax.len) + 1) * 4, "INCR byte range");
    check(beats == 9'(ax.len) + 1, "beat count");
    check(denied == !ax.addr[12], "denied follows the decision");
  end

  `include "axi_tb_tasks.svh"

  initial begin
    ip_req = '0;
    for (int i = 0; i < 256; i++) shadow[i] = 32'hB700_0000 + i;
    repeat (3) @(negedge clk); rst_ni = 1;
    fork
      for (int i = 0; i < 40; i++) begin
        automatic logic [31:0] a = (32'($urandom_range(0, 1)) << 12) | 32'($urandom_range(0, 31) * 16);
        automatic logic [7:0] len = 8'($urandom_range(0, 3));
        automatic int aw0 = u_mem.n_aw;
        logic [31:0] d [$];
        axi_resp_e r; bit ok;
        d = {};
        for (int b = 0; b <= int'(len); b++) d.push_back($urandom);
        axi_write(4'(i), a, len, AXI_BURST_INCR, d, r, ok);
        check(ok && r == AXI_RESP_OKAY, "write response");
        check((u_mem.n_aw == aw0 + 1) == a[12], "write reaches memory only if allowed");
        if (a[12]) for (int b = 0; b <= int'(len); b++) shadow[((a >> 2) + b) % 256] = d[b];
      end
      for (int i = 0; i < 40; i++) begin
        // reads use a disjoint word range so the shadow stays exact
        automatic logic [31:0] a = (32'($urandom_range(0, 1)) << 12) | 32'(512 + $urandom_range(0, 31) * 16);
        automatic logic [7:0] len = 8'($urandom_range(0, 3));
        automatic int ar0 = u_mem.n_ar;
        logic [31:0] d [$];
        bit ok;
        axi_read(4'(i), a, len, AXI_BURST_INCR, d, ok);
        check(ok, "read beats and IDs");
        check((u_mem.n_ar == ar0 + 1) == a[12], "read reaches memory only if allowed");
        for (int b = 0; b <= int'(len); b++)
          check(d[b] == (a[12] ? shadow[((a >> 2) + b) % 256] : 32'h0), "read data");
      end
    join
    check(n_done == 80 && n_denied > 10 && n_denied < 70, "both destinations used");
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
