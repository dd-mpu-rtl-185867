// tb_ddmpu_hwpe: end-to-end test of the DD-MPU protecting a four-port
// accelerator, with every parameter at its default.
// A CPU model writes base addresses and lengths to the accelerator's APB
// control registers (0xB0 + 0x10*k, +4); four memory models sit behind the
// protection units and the test drives the accelerator's four TCDM ports.
// It checks: accesses before configuration are sunk; the 3-cycle rule update
// latency; read-only ports 0..2 and write-only port 3; range checks; the two
// outstanding copies and their round-robin replacement; the rate limit; the
// secure disable/enable; and, in a random phase on all ports at once, that no
// access outside the allowed regions ever reaches memory while denied reads
// return zero. Each mechanism must have occurred at least once.
module tb_ddmpu_hwpe;
  import ddmpu_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_ni = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready = 0;
  logic [31:0] paddr = 0, pwdata = 0;
  tcdm_req_t ip_req [NP], mem_req [NP];
  tcdm_rsp_t ip_rsp [NP], mem_rsp [NP];
  logic [NP-1:0] sec_set = 0, sec_clr = 0, denied, limited, ovf;
  int checks = 0, failures = 0;
  int cyc = 0, n_random = 0;
  // mechanism counters
  int m_sink = 0, m_dir = 0, m_range = 0, m_latency = 0, m_outst = 0, m_rate = 0, m_sec = 0;

  ddmpu_hwpe dut (
    .clk_i(clk), .rst_ni(rst_ni),
    .apb_psel_i(psel), .apb_penable_i(penable), .apb_pwrite_i(pwrite), .apb_paddr_i(paddr),
    .apb_pwdata_i(pwdata), .apb_prdata_i(32'h0), .apb_pready_i(pready),
    .ip_req_i(ip_req), .ip_rsp_o(ip_rsp), .mem_req_o(mem_req), .mem_rsp_i(mem_rsp),
    .sec_en_set_i(sec_set), .sec_en_clr_i(sec_clr),
    .denied_o(denied), .limited_o(limited), .overflow_o(ovf));

  for (genvar k = 0; k < NP; k++) begin : g_mem
    tcdm_mem_model #(.WORDS(1024)) u_mem (.clk_i(clk), .req_i(mem_req[k]), .rsp_o(mem_rsp[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (|limited) m_rate++;
    if (|denied) m_sink++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0d: %s", cyc, msg); end
  endtask

  // APB write; returns the cycle number of the handshake cycle.
  task automatic apb_write(logic [31:0] a, logic [31:0] d, output int hs);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk); penable = 1; pready = 1; hs = cyc;
    @(negedge clk); psel = 0; penable = 0; pready = 0;
  endtask

  task automatic set_region(int k, logic [31:0] base, logic [31:0] len);
    int hs;
    apb_write(32'hB0 + 32'(k) * 32'h10, base, hs);
    apb_write(32'hB4 + 32'(k) * 32'h10, len, hs);
    repeat (3) @(negedge clk);
  endtask

  // One TCDM access on port k. Returns whether it reached memory and the
  // read data.
  task automatic access(int k, logic [31:0] a, bit we, logic [31:0] wd,
                        output bit to_mem, output logic [31:0] rd);
    @(negedge clk);
    ip_req[k] = '0; ip_req[k].req = 1; ip_req[k].we = we; ip_req[k].addr = a;
    ip_req[k].be = 4'hF; ip_req[k].wdata = wd;
    #1;
    while (!ip_rsp[k].gnt) begin @(negedge clk); #1; end
    to_mem = mem_req[k].req;
    @(negedge clk); ip_req[k] = '0; #1;
    check(ip_rsp[k].r_valid, "response after grant");
    rd = ip_rsp[k].r_rdata;
  endtask

  function automatic logic [31:0] init_word(logic [31:0] a);
    return 32'hA500_0000 + ((a >> 2) % 1024);
  endfunction

  localparam logic [31:0] BASE = 32'h1C00_0000;

  initial begin
    bit m;
    logic [31:0] d;
    int hs;
    for (int k = 0; k < NP; k++) ip_req[k] = '0;
    repeat (3) @(negedge clk); rst_ni = 1;
    repeat (2) @(negedge clk);

    // A: nothing configured: every access is sunk
    for (int k = 0; k < NP; k++) begin
      access(k, BASE + 32'h100, k == NP - 1, 32'h1234, m, d);
      check(!m && d == 0, "unconfigured port sunk");
    end

    // B: rule update latency, measured on port 0 with a request held high
    apb_write(32'hB0, BASE + 32'h1000, hs);
    @(negedge clk);
    ip_req[0] = '0; ip_req[0].req = 1; ip_req[0].addr = BASE + 32'h1000; ip_req[0].be = 4'hF;
    @(negedge clk); psel = 1; pwrite = 1; paddr = 32'hB4; pwdata = 32'h100;
    @(negedge clk); penable = 1; pready = 1; hs = cyc;     // handshake cycle t
    #1 check(!mem_req[0].req, "t: old rule");
    @(negedge clk); psel = 0; penable = 0; pready = 0;
    #1 check(!mem_req[0].req, "t+1: old rule");
    @(negedge clk); #1 check(!mem_req[0].req, "t+2: old rule");
    @(negedge clk); #1 check(mem_req[0].req, "t+3: new rule active");
    if (mem_req[0].req && cyc - hs == 3) m_latency++;
    @(negedge clk); ip_req[0] = '0;
    repeat (40) @(negedge clk);

    // C: regions for all ports
    for (int k = 1; k < NP; k++) set_region(k, BASE + 32'h1000 + 32'(k) * 32'h1000, 32'h100);

    // D: directions and ranges
    for (int k = 0; k < NP - 1; k++) begin
      automatic logic [31:0] a = BASE + 32'h1000 + 32'(k) * 32'h1000 + 32'h10;
      access(k, a, 0, 0, m, d);
      check(m && d == init_word(a), "read-only port reads its region");
      access(k, a, 1, 32'hBAD0_0000, m, d);
      check(!m && g_mem[0].u_mem.mem[(a >> 2) % 1024] == init_word(a), "read-only port write sunk");
      if (!m) m_dir++;
      access(k, a + 32'h100, 0, 0, m, d);
      check(!m && d == 0, "read past region sunk");
      if (!m) m_range++;
      repeat (8) @(negedge clk);
    end
    begin
      automatic logic [31:0] a = BASE + 32'h4000 + 32'h20;
      access(3, a, 1, 32'hCAFE_F00D, m, d);
      @(negedge clk);
      check(m && g_mem[3].u_mem.mem[(a >> 2) % 1024] == 32'hCAFE_F00D, "write-only port writes");
      access(3, a, 0, 0, m, d);
      check(!m && d == 0, "write-only port read sunk");
      if (!m) m_dir++;
      access(3, a - 32'h40, 1, 32'h1, m, d);
      check(!m, "write before region sunk");
      if (!m) m_range++;
    end

    // E: outstanding copies on port 0
    set_region(0, BASE + 32'h2000, 32'h100);
    access(0, BASE + 32'h1000, 0, 0, m, d); check(m, "first region still allowed");
    access(0, BASE + 32'h2000, 0, 0, m, d); check(m, "second region allowed");
    set_region(0, BASE + 32'h3000, 32'h100);
    repeat (8) @(negedge clk);
    access(0, BASE + 32'h1000, 0, 0, m, d); check(!m, "oldest copy replaced");
    if (!m) m_outst++;
    access(0, BASE + 32'h2000, 0, 0, m, d); check(m, "second copy kept");
    access(0, BASE + 32'h3000, 0, 0, m, d); check(m, "third region allowed");
    repeat (20) @(negedge clk);

    // F: rate limit on port 2: 64 back-to-back reads
    begin
      int fwd = 0;
      @(negedge clk);
      ip_req[2] = '0; ip_req[2].req = 1; ip_req[2].addr = BASE + 32'h3000; ip_req[2].be = 4'hF;
      repeat (64) begin #1; if (mem_req[2].req && ip_rsp[2].gnt) fwd++; @(negedge clk); end
      ip_req[2] = '0;
      // LIMIT 16 burst plus DEC 4 per PERIOD 8 cycles
      check(fwd >= 40 && fwd <= 50, $sformatf("forwarded %0d of 64 under the rate limit", fwd));
    end
    repeat (40) @(negedge clk);

    // G: secure disable / enable of port 1's rule
    @(negedge clk); sec_clr[1] = 1; @(negedge clk); sec_clr[1] = 0;
    access(1, BASE + 32'h2000, 0, 0, m, d); check(!m && d == 0, "disabled rule: sunk");
    if (!m) m_sec++;
    @(negedge clk); sec_set[1] = 1; @(negedge clk); sec_set[1] = 0;
    access(1, BASE + 32'h2000, 0, 0, m, d); check(m, "re-enabled rule");

    // H: random traffic on all ports at once; nothing outside a region may pass
    begin
      for (int k = 0; k < NP; k++) begin
        automatic int kk = k;
        fork
          begin
            for (int i = 0; i < 200; i++) begin
              automatic logic [31:0] a = BASE + 32'h1000 * 32'($urandom_range(1, 4)) + 32'($urandom_range(0, 127) * 4);
              automatic bit we = $urandom_range(0, 1);
              automatic bit ok;
              bit mm; logic [31:0] dd;
              // allowed regions: port 0 copies 0x2000 and 0x3000; port k>0 at 0x1000*(k+1)
              if (kk == 0) ok = (a >= BASE + 32'h2000) && (a < BASE + 32'h2100) ||
                                (a >= BASE + 32'h3000) && (a < BASE + 32'h3100);
              else ok = (a >= BASE + 32'h1000 * 32'(kk + 1)) && (a < BASE + 32'h1000 * 32'(kk + 1) + 32'h100);
              ok = ok && (we == (kk == NP - 1));
              access(kk, a, we, $urandom, mm, dd);
              if (mm) check(ok, "only allowed accesses reach memory");
              if (!mm && !we) check(dd == 0, "sunk read returns zero");
              n_random++;
            end
          end
        join_none
      end
      wait fork;
    end

    check(n_random == 4 * 200, "random phase completed");
    check(ovf == '0, "no lost rule updates");
    check(m_sink > 0, "mechanism: dummy sink");
    check(m_dir > 0, "mechanism: direction enforcement");
    check(m_range > 0, "mechanism: range check");
    check(m_latency > 0, "mechanism: 3-cycle rule update");
    check(m_outst > 0, "mechanism: outstanding copies round-robin");
    check(m_rate > 0, "mechanism: rate limit");
    check(m_sec > 0, "mechanism: secure disable");
    $display("mechanisms: sink=%0d dir=%0d range=%0d latency=%0d outstanding=%0d rate=%0d secure=%0d",
             m_sink, m_dir, m_range, m_latency, m_outst, m_rate, m_sec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
