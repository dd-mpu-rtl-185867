// tb_apb_adapter: self-checking test of the APB adapter with its dummy sink.
// The test drives the decision input directly and runs APB transfers against
// a memory model with random wait states and a shadow copy of the memory.
// It checks that the decision of the setup phase holds for the whole transfer
// even when the decision input changes during the access phase; that allowed
// transfers reach the memory with their data and return the memory's data;
// that denied ones never appear on the memory side, finish in the minimum two
// cycles with zero read data and no error, and leave the memory unchanged;
// and that done_o / denied_o pulse once per transfer.
module tb_apb_adapter;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  apb_req_t ip_req, mem_req;
  apb_rsp_t ip_rsp, mem_rsp;
  xfer_t xfer;
  logic allow = 0, done, denied;
  logic [8:0] beats;
  int checks = 0, failures = 0, cyc = 0;
  int n_done = 0, n_denied = 0, n_flip = 0;
  logic [31:0] shadow [256];

  apb_adapter dut (
    .clk_i(clk), .rst_ni(rst_ni), .ip_req_i(ip_req), .ip_rsp_o(ip_rsp),
    .mem_req_o(mem_req), .mem_rsp_i(mem_rsp), .xfer_o(xfer), .allow_i(allow),
    .done_o(done), .beats_o(beats), .denied_o(denied));
  apb_mem_model #(.WORDS(256), .WAIT_PCT(40)) u_mem (.clk_i(clk), .req_i(mem_req), .rsp_o(mem_rsp));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (rst_ni && done) n_done++;
    if (rst_ni && denied) n_denied++;
    // nothing of a denied transfer may reach the memory side
    if (rst_ni && !mem_req.psel && mem_req != '0) begin
      checks++; failures++; $display("FAIL @%0d: memory side not idle", cyc);
    end
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // One APB transfer; allow_setup is the decision during the setup phase,
  // flip inverts it during the access phase.
  task automatic xfer_apb(logic [31:0] a, bit w, logic [31:0] wd, bit allow_setup, bit flip);
    int n;
    bit seen_mem;
    logic [31:0] rd;
    @(negedge clk);
    ip_req = '0; ip_req.psel = 1; ip_req.pwrite = w; ip_req.paddr = a; ip_req.pwdata = wd;
    ip_req.pstrb = 4'hF; allow = allow_setup;
    #1;
    check(xfer.addr == a && xfer.write == w && xfer.len == 4 && beats == 1, "transfer description");
    check(done && denied == !allow_setup, "done/denied in setup phase");
    check(mem_req.psel == allow_setup, "setup phase steered by decision");
    @(negedge clk);
    ip_req.penable = 1; n = 2;
    if (flip) begin allow = !allow_setup; n_flip++; end
    #1;
    seen_mem = mem_req.psel;
    while (!ip_rsp.pready) begin
      @(negedge clk); n++; #1;
      seen_mem |= mem_req.psel;
    end
    rd = ip_rsp.prdata;
    check(ip_rsp.pslverr == 1'b0, "no error response");
    check(seen_mem == allow_setup, "access phase keeps the setup decision");
    if (!allow_setup) begin
      check(n == 2, "denied transfer completes in two cycles");
      if (!w) check(rd == 32'h0, "denied read returns zero");
    end else if (!w) begin
      check(rd == shadow[(a >> 2) % 256], "allowed read returns memory data");
    end
    if (allow_setup && w) shadow[(a >> 2) % 256] = wd;
    @(posedge clk); #1 ip_req = '0; allow = 0;
  endtask

  initial begin
    ip_req = '0;
    for (int i = 0; i < 256; i++) shadow[i] = 32'hC300_0000 + i;
    repeat (3) @(negedge clk); rst_ni = 1;
    repeat (2) @(negedge clk);

    // directed: decision flips during the access phase
    xfer_apb(32'h40, 1, 32'h1111_2222, 1, 1);
    xfer_apb(32'h44, 1, 32'h3333_4444, 0, 1);
    xfer_apb(32'h40, 0, 0, 1, 0);
    xfer_apb(32'h44, 0, 0, 0, 0);
    xfer_apb(32'h44, 0, 0, 1, 1);

    // random transfers, some back to back, some with idle cycles
    for (int i = 0; i < 400; i++) begin
      xfer_apb(32'($urandom_range(0, 255)) << 2, 1'($urandom), $urandom,
               1'($urandom), $urandom_range(0, 3) == 0);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    for (int i = 0; i < 256; i++) check(u_mem.mem[i] == shadow[i], "memory content");
    check(n_done == 405, "one done pulse per transfer");
    check(n_denied > 0 && n_denied < 405 && n_flip > 50, "both decisions and flips exercised");
    $display("transfers=%0d denied=%0d flips=%0d", n_done, n_denied, n_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
