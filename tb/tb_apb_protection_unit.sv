// tb_apb_protection_unit: self-checking test of an APB protection unit with
// static rules only (no detection input), as used for a simple IP:
//   rule 0: 0x100..0x1FF, READ_ONLY,  DEFAULT_ENABLED
//   rule 1: 0x300..0x33F, READ_WRITE, DEFAULT_DISABLED (a spare rule)
// and a rate limiter with LIMIT 4, PERIOD 16, DEC 1, in front of an APB memory
// model with random wait states.
// Directed part: reads in rule 0 pass, writes there are sunk; rule 1 is closed
// until the secure-configuration input sets it and closed again after a
// clear; clearing rule 0 closes its region; a back-to-back stream runs into
// the rate limit (between LIMIT and LIMIT plus the decrements in the window
// forwarded) and is released after an idle time.
// Random part: random addresses, directions and secure set/clear pulses. A
// reference model of the two rules and their enable bits predicts every
// decision; a transfer must reach memory exactly when the model allows it and
// the unit does not flag it as rate-limited, and a denied read returns zero.
module tb_apb_protection_unit;
  import ddmpu_pkg::*;
  localparam int unsigned LIMIT = 4, PERIOD = 16, DEC = 1;
  localparam rule_cfg_t R0 = make_rule(32'h100, 32'h100, DEFAULT_ENABLED, READ_ONLY, DYN_NONE, 8'd1);
  localparam rule_cfg_t R1 = make_rule(32'h300, 32'h40, DEFAULT_DISABLED, READ_WRITE, DYN_NONE, 8'd1);

  logic clk = 0, rst_ni = 0;
  apb_req_t ip_req, mem_req;
  apb_rsp_t ip_rsp, mem_rsp;
  logic [1:0] sec_set = 0, sec_clr = 0;
  logic denied, limited;
  bit en [2];
  int checks = 0, failures = 0, cyc = 0;
  int n_fwd = 0, n_denied = 0, n_limited = 0, n_sec = 0;

  apb_protection_unit #(.N_RULES(2), .RULES({R1, R0}), .RL_ENABLE(1), .RL_LIMIT(LIMIT),
                        .RL_PERIOD(PERIOD), .RL_DEC(DEC)) dut (
    .clk_i(clk), .rst_ni(rst_ni), .det_i('0), .sec_en_set_i(sec_set), .sec_en_clr_i(sec_clr),
    .ip_req_i(ip_req), .ip_rsp_o(ip_rsp), .mem_req_o(mem_req), .mem_rsp_i(mem_rsp),
    .denied_o(denied), .limited_o(limited));
  apb_mem_model #(.WORDS(256), .WAIT_PCT(30)) u_mem (.clk_i(clk), .req_i(mem_req), .rsp_o(mem_rsp));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  function automatic bit rules_allow(logic [31:0] a, bit w);
    bit in0 = a >= 32'h100 && a + 4 <= 32'h200;
    bit in1 = a >= 32'h300 && a + 4 <= 32'h340;
    return (en[0] && in0 && !w) || (en[1] && in1);
  endfunction

  // One APB transfer; reports whether it reached memory, the limited flag of
  // its setup phase and the read data.
  task automatic xfer_apb(logic [31:0] a, bit w, logic [31:0] wd,
                          output bit to_mem, output bit lim, output logic [31:0] rd);
    @(negedge clk);
    ip_req = '0; ip_req.psel = 1; ip_req.pwrite = w; ip_req.paddr = a; ip_req.pwdata = wd;
    ip_req.pstrb = 4'hF;
    #1 to_mem = mem_req.psel; lim = limited;
    check(denied == !to_mem, "denied_o matches the routing");
    @(negedge clk); ip_req.penable = 1;
    #1 while (!ip_rsp.pready) begin @(negedge clk); #1; end
    rd = ip_rsp.prdata;
    check(!ip_rsp.pslverr, "no error response");
    @(posedge clk); #1 ip_req = '0;
    if (to_mem) n_fwd++; else n_denied++;
    if (lim) n_limited++;
  endtask

  task automatic pulse_sec(int r, bit set);
    @(negedge clk);
    if (set) sec_set[r] = 1; else sec_clr[r] = 1;
    @(negedge clk); sec_set = 0; sec_clr = 0;
    en[r] = set;
    n_sec++;
  endtask

  task automatic drain();
    repeat (LIMIT * PERIOD / DEC + 2 * PERIOD) @(negedge clk);
  endtask

  function automatic logic [31:0] word(logic [31:0] a);
    return 32'hC300_0000 + ((a >> 2) % 256);
  endfunction

  initial begin
    bit m, l;
    logic [31:0] d;
    int t0, n;
    ip_req = '0;
    en[0] = 1; en[1] = 0;
    repeat (3) @(negedge clk); rst_ni = 1;
    repeat (2) @(negedge clk);

    // rule 0: read-only region
    xfer_apb(32'h180, 0, 0, m, l, d);
    check(m && d == word(32'h180), "read in rule 0 region passes");
    xfer_apb(32'h180, 1, 32'hDEAD_BEEF, m, l, d);
    check(!m, "write in read-only region sunk");
    xfer_apb(32'h1FC, 0, 0, m, l, d);
    check(m, "last word of rule 0 passes");
    xfer_apb(32'h200, 0, 0, m, l, d);
    check(!m && d == 0, "read past rule 0 sunk, zero data");
    drain();

    // rule 1: spare rule, enabled and disabled by the secure configuration
    xfer_apb(32'h310, 1, 32'h1234_5678, m, l, d);
    check(!m, "disabled spare rule: write sunk");
    pulse_sec(1, 1);
    xfer_apb(32'h310, 1, 32'h1234_5678, m, l, d);
    check(m, "spare rule enabled: write passes");
    @(negedge clk);
    check(u_mem.mem[(32'h310 >> 2) % 256] == 32'h1234_5678, "write reached memory");
    pulse_sec(0, 0);
    xfer_apb(32'h180, 0, 0, m, l, d);
    check(!m && d == 0, "rule 0 cleared: read sunk");
    pulse_sec(0, 1);
    pulse_sec(1, 0);
    xfer_apb(32'h310, 0, 0, m, l, d);
    check(!m, "spare rule cleared again: read sunk");
    drain();

    // rate limit
    t0 = cyc; n = 0;
    for (int i = 0; i < 12; i++) begin
      xfer_apb(32'h100 + 32'(4 * i), 0, 0, m, l, d);
      if (m) n++;
      check(m != l, "allowed transfer either passes or is rate-limited");
      if (!m) check(d == 0, "rate-limited read returns zero");
    end
    check(n >= LIMIT && n <= LIMIT + DEC * ((cyc - t0) / PERIOD + 1), "rate limit bounds forwarded transfers");
    check(n < 12, "rate limit reached");
    drain();
    xfer_apb(32'h100, 0, 0, m, l, d);
    check(m, "released after idle time");

    // random traffic
    for (int i = 0; i < 300; i++) begin
      automatic logic [31:0] a = 32'($urandom_range(0, 255)) << 2;
      automatic bit w = 1'($urandom);
      automatic bit exp = rules_allow(a, w);
      xfer_apb(a, w, $urandom, m, l, d);
      check(m == (exp && !l), "routing matches the rule model and the limit flag");
      if (l) check(exp, "limit flag only for rule-allowed transfers");
      if (!m && !w) check(d == 0, "denied read returns zero");
      if (m && !w) check(d == u_mem.mem[(a >> 2) % 256], "forwarded read returns memory data");
      if ($urandom_range(0, 15) == 0) pulse_sec($urandom_range(0, 1), 1'($urandom));
      repeat ($urandom_range(0, 6)) @(negedge clk);
    end
    check(n_fwd > 20 && n_denied > 20 && n_limited > 0 && n_sec > 4, "all outcomes exercised");
    $display("forwarded=%0d denied=%0d limited=%0d secure pulses=%0d", n_fwd, n_denied, n_limited, n_sec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
