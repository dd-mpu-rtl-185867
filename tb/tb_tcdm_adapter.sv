// tb_tcdm_adapter: self-checking test of the TCDM adapter with a memory model
// that grants 70 % of the time. The decision input is driven at random and
// held while a request waits. Allowed requests must reach memory unchanged,
// with the memory's grant and data returned; denied ones must be granted at
// once by the dummy sink, return zero data, leave memory untouched and show
// nothing on the memory port. The transfer description must carry address,
// direction and a 4-byte length.
module tb_tcdm_adapter;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  tcdm_req_t ip_req, mem_req;
  tcdm_rsp_t ip_rsp, mem_rsp;
  xfer_t x;
  logic allow = 0, done, denied;
  int checks = 0, failures = 0, n_allowed = 0, n_denied = 0;

  tcdm_adapter dut (.clk_i(clk), .rst_ni(rst_ni), .ip_req_i(ip_req), .ip_rsp_o(ip_rsp),
    .mem_req_o(mem_req), .mem_rsp_i(mem_rsp), .xfer_o(x), .allow_i(allow), .done_o(done), .beats_o(),
    .denied_o(denied));
  tcdm_mem_model #(.WORDS(64), .GNT_PCT(70)) u_mem (.clk_i(clk), .req_i(mem_req), .rsp_o(mem_rsp));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] shadow [64];

  initial begin
    ip_req = '0;
    for (int i = 0; i < 64; i++) shadow[i] = 32'hA500_0000 + i;
    repeat (2) @(negedge clk); rst_ni = 1;
    for (int i = 0; i < 300; i++) begin
      automatic int idx = $urandom_range(0, 63);
      automatic bit wr = $urandom_range(0, 1);
      automatic logic [31:0] wd = $urandom;
      automatic bit ok = $urandom_range(0, 1);
      automatic bit granted = 0;
      @(negedge clk);
      ip_req.req = 1; ip_req.we = wr; ip_req.addr = 32'(idx) << 2; ip_req.be = 4'hF;
      ip_req.wdata = wd; allow = ok;
      while (!granted) begin
        #1;
        check(x.addr == ip_req.addr && x.write == wr && x.len == 4, "transfer description");
        if (ok) check(mem_req == ip_req, "allowed request forwarded unchanged");
        else    check(mem_req == '0 && ip_rsp.gnt && denied, "denied request: sink grants, memory idle");
        granted = ip_rsp.gnt;
        check(done == granted, "done on handshake");
        @(negedge clk);
      end
      ip_req = '0;
      #1;
      check(ip_rsp.r_valid, "response one cycle after grant");
      if (!wr) check(ip_rsp.r_rdata == (ok ? shadow[idx] : 32'h0), "read data");
      if (wr && ok) shadow[idx] = wd;
      if (ok) n_allowed++; else n_denied++;
    end
    @(negedge clk);
    for (int i = 0; i < 64; i++) check(u_mem.mem[i] == shadow[i], "memory holds only allowed writes");
    check(n_allowed > 50 && n_denied > 50, "both paths exercised");
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
