// tb_ddmpu_nic: self-checking test of the DD-MPU for a network-controller-like
// IP, at default parameters. A CPU model announces packet buffers by writing
// a pointer (0x10) and a frame length (0x14) over APB; AXI4 DMA bursts are
// then issued against an AXI4 memory model. Checks: nothing passes before a
// buffer is announced; a burst issued one cycle too early is still denied
// (3-cycle update latency) while one issued on time passes; bursts inside
// the frame pass, bursts running past it are sunk; reads of other registers
// do not change the rule; two outstanding buffers with round-robin
// replacement; secure disable; rate limit on long bursts.
module tb_ddmpu_nic;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  logic nsel = 0, nen = 0, nrdy = 0, nwr = 1;
  logic [31:0] naddr = 0, nwdata = 0;
  axi_req_t ip_req, mreq;
  axi_rsp_t ip_rsp, mrsp;
  logic nset = 0, nclr = 0, denied, limited, ovf;
  int checks = 0, failures = 0, n_limited = 0;

  ddmpu_nic dut (.clk_i(clk), .rst_ni(rst_ni),
    .apb_psel_i(nsel), .apb_penable_i(nen), .apb_pwrite_i(nwr), .apb_paddr_i(naddr),
    .apb_pwdata_i(nwdata), .apb_prdata_i(32'h8000_0000), .apb_pready_i(nrdy),
    .ip_req_i(ip_req), .ip_rsp_o(ip_rsp), .mem_req_o(mreq), .mem_rsp_i(mrsp),
    .sec_en_set_i(nset), .sec_en_clr_i(nclr), .denied_o(denied), .limited_o(limited),
    .overflow_o(ovf));
  axi_mem_model #(.WORDS(1024), .READY_PCT(80)) u_mem (.clk_i(clk), .req_i(mreq), .rsp_o(mrsp));

  always #5 clk = ~clk;
  always @(posedge clk) if (limited) n_limited++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  `include "axi_tb_tasks.svh"

  task automatic apb(bit wr, logic [31:0] a, logic [31:0] d);
    @(negedge clk); nsel = 1; nen = 0; nwr = wr; naddr = a; nwdata = d;
    @(negedge clk); nen = 1; nrdy = 1;
    @(negedge clk); nsel = 0; nen = 0; nrdy = 0;
  endtask

  task automatic burst(bit we, logic [31:0] a, logic [7:0] len, output bit to_mem);
    automatic int n0 = we ? u_mem.n_aw : u_mem.n_ar;
    logic [31:0] d [$];
    axi_resp_e r; bit ok;
    if (we) begin
      for (int b = 0; b <= int'(len); b++) d.push_back($urandom);
      axi_write(4'h2, a, len, AXI_BURST_INCR, d, r, ok);
      check(ok && r == AXI_RESP_OKAY, "write completes");
    end else begin
      axi_read(4'h6, a, len, AXI_BURST_INCR, d, ok);
      check(ok, "read completes");
    end
    to_mem = ((we ? u_mem.n_aw : u_mem.n_ar) != n0);
    if (!to_mem && !we) foreach (d[b]) check(d[b] == 0, "denied read returns zero");
  endtask

  initial begin
    bit m;
    ip_req = '0;
    repeat (3) @(negedge clk); rst_ni = 1;
    burst(0, 32'h0, 8'd0, m); check(!m, "nothing announced: sunk");
    apb(1, 32'h10, 32'h4000);
    apb(1, 32'h14, 32'd64);
    // the AW of this burst appears two cycles after the handshake: too early
    burst(1, 32'h4000, 8'd0, m); check(!m, "burst before the rule is active: sunk");
    repeat (3) @(negedge clk);
    burst(1, 32'h4000, 8'd15, m); check(m, "frame write passes");
    burst(0, 32'h4020, 8'd7, m); check(m, "frame tail read passes");
    burst(0, 32'h4020, 8'd8, m); check(!m, "read past the frame sunk");
    apb(0, 32'h10, 32'h0); apb(0, 32'h14, 32'h0);  // reads do not update rules
    repeat (3) @(negedge clk);
    burst(0, 32'h4000, 8'd0, m); check(m, "rule unchanged by register reads");
    apb(1, 32'h10, 32'h6000); apb(1, 32'h14, 32'd16);
    repeat (3) @(negedge clk);
    burst(0, 32'h4000, 8'd0, m); check(m, "first buffer still allowed");
    burst(0, 32'h6000, 8'd3, m); check(m, "second buffer allowed");
    burst(0, 32'h6000, 8'd4, m); check(!m, "second buffer is 16 bytes");
    apb(1, 32'h10, 32'h7000); apb(1, 32'h14, 32'd16);
    repeat (3) @(negedge clk);
    burst(0, 32'h4000, 8'd0, m); check(!m, "oldest buffer replaced");
    burst(0, 32'h6000, 8'd0, m); check(m, "second buffer kept");
    @(negedge clk); nclr = 1; @(negedge clk); nclr = 0;
    burst(0, 32'h6000, 8'd0, m); check(!m, "secure clear disables");
    @(negedge clk); nset = 1; @(negedge clk); nset = 0;
    burst(0, 32'h6000, 8'd0, m); check(m, "secure set enables");
    apb(1, 32'h10, 32'h8000); apb(1, 32'h14, 32'd64);
    repeat (3) @(negedge clk);
    for (int i = 0; i < 10; i++) burst(0, 32'h8000, 8'd15, m);
    check(n_limited > 0, "rate limit reached by back-to-back 16-beat bursts");
    check(!ovf, "no lost updates");
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
