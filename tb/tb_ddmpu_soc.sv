// tb_ddmpu_soc: end-to-end test of the two DD-MPU instances with every
// parameter at its default.
// Accelerator side: a CPU model writes base addresses and lengths to the
// accelerator's APB control registers (0xB0 + 0x10*k, +4); four TCDM memory
// models sit behind the protection units and the test drives the four data
// ports. It checks accesses before configuration, the 3-cycle rule-update
// latency, read-only ports 0..2 and write-only port 3, range checks, the two
// outstanding copies and their round-robin replacement, the rate limit, the
// secure disable/enable, and in a random phase on all four ports at once that
// nothing outside the allowed regions reaches memory.
// Network-controller side: the CPU model announces packet buffers (pointer
// at 0x10, frame length at 0x14) and AXI4 DMA bursts inside and outside them
// are checked against an AXI4 memory model, including outstanding buffers,
// the secure disable and the rate limit.
// Static-rules side: an APB master model accesses a memory model through the
// unit with one fixed READ_WRITE rule (0x1A10_0000, 4 KiB): inside the region
// reads and writes pass, outside they are completed by the dummy sink with
// zero data, and the secure-configuration inputs close and reopen the rule.
// Each mechanism must have occurred at least once.
module tb_ddmpu_soc;
  import ddmpu_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_ni = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready = 0;
  logic [31:0] paddr = 0, pwdata = 0;
  tcdm_req_t t_req [NP], t_mreq [NP];
  tcdm_rsp_t t_rsp [NP], t_mrsp [NP];
  // network controller side
  logic nsel = 0, nen = 0, nrdy = 0;
  logic [31:0] naddr = 0, nwdata = 0;
  axi_req_t ip_req, n_mreq;
  axi_rsp_t ip_rsp, n_mrsp;
  logic nset = 0, nclr = 0, n_denied, n_limited, n_ovf;
  // static-rules side
  apb_req_t s_req, s_mreq;
  apb_rsp_t s_rsp, s_mrsp;
  logic s_set = 0, s_clr = 0, s_denied, s_limited;
  int m_st_pass = 0, m_st_sink = 0, m_st_sec = 0;
  int m_nic_dyn = 0, m_nic_sink = 0, m_nic_outst = 0, m_nic_rate = 0, m_nic_sec = 0;
  logic [NP-1:0] sec_set = 0, sec_clr = 0, denied, limited, ovf;
  int checks = 0, failures = 0;
  int cyc = 0, n_random = 0;
  // mechanism counters
  int m_sink = 0, m_dir = 0, m_range = 0, m_latency = 0, m_outst = 0, m_rate = 0, m_sec = 0;

  ddmpu_soc dut (
    .clk_i(clk), .rst_ni(rst_ni),
    .hwpe_apb_psel_i(psel), .hwpe_apb_penable_i(penable), .hwpe_apb_pwrite_i(pwrite),
    .hwpe_apb_paddr_i(paddr), .hwpe_apb_pwdata_i(pwdata), .hwpe_apb_prdata_i(32'h0),
    .hwpe_apb_pready_i(pready),
    .hwpe_ip_req_i(t_req), .hwpe_ip_rsp_o(t_rsp), .hwpe_mem_req_o(t_mreq), .hwpe_mem_rsp_i(t_mrsp),
    .hwpe_sec_en_set_i(sec_set), .hwpe_sec_en_clr_i(sec_clr),
    .hwpe_denied_o(denied), .hwpe_limited_o(limited), .hwpe_overflow_o(ovf),
    .nic_apb_psel_i(nsel), .nic_apb_penable_i(nen), .nic_apb_pwrite_i(1'b1),
    .nic_apb_paddr_i(naddr), .nic_apb_pwdata_i(nwdata), .nic_apb_prdata_i(32'h0),
    .nic_apb_pready_i(nrdy),
    .nic_ip_req_i(ip_req), .nic_ip_rsp_o(ip_rsp), .nic_mem_req_o(n_mreq), .nic_mem_rsp_i(n_mrsp),
    .nic_sec_en_set_i(nset), .nic_sec_en_clr_i(nclr),
    .nic_denied_o(n_denied), .nic_limited_o(n_limited), .nic_overflow_o(n_ovf),
    .st_ip_req_i(s_req), .st_ip_rsp_o(s_rsp), .st_mem_req_o(s_mreq), .st_mem_rsp_i(s_mrsp),
    .st_sec_en_set_i(s_set), .st_sec_en_clr_i(s_clr),
    .st_denied_o(s_denied), .st_limited_o(s_limited));
  apb_mem_model #(.WORDS(1024), .WAIT_PCT(30)) u_smem (.clk_i(clk), .req_i(s_mreq), .rsp_o(s_mrsp));
  axi_mem_model #(.WORDS(1024), .READY_PCT(70)) u_nmem (.clk_i(clk), .req_i(n_mreq), .rsp_o(n_mrsp));

  for (genvar k = 0; k < NP; k++) begin : g_mem
    tcdm_mem_model #(.WORDS(1024)) u_mem (.clk_i(clk), .req_i(t_mreq[k]), .rsp_o(t_mrsp[k]));
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (|limited) m_rate++;
    if (|denied) m_sink++;
    if (n_limited) m_nic_rate++;
    if (n_denied) m_nic_sink++;
  end

  `include "axi_tb_tasks.svh"

  // One APB transfer of the static-rules IP; returns whether it reached
  // memory and the read data.
  task automatic st_xfer(logic [31:0] a, bit w, logic [31:0] wd, output bit to_mem,
                         output logic [31:0] rd);
    @(negedge clk);
    s_req = '0; s_req.psel = 1; s_req.pwrite = w; s_req.paddr = a; s_req.pwdata = wd;
    s_req.pstrb = 4'hF;
    #1 to_mem = s_mreq.psel;
    @(negedge clk); s_req.penable = 1;
    #1 while (!s_rsp.pready) begin @(negedge clk); #1; end
    rd = s_rsp.prdata;
    @(posedge clk); #1 s_req = '0;
    if (to_mem) m_st_pass++; else m_st_sink++;
  endtask

  task automatic nic_apb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk); nsel = 1; nen = 0; naddr = a; nwdata = d;
    @(negedge clk); nen = 1; nrdy = 1;
    @(negedge clk); nsel = 0; nen = 0; nrdy = 0;
  endtask

  // One NIC DMA burst of `len`+1 words; returns whether it reached memory.
  task automatic nic_burst(bit we, logic [31:0] a, logic [7:0] len, output bit to_mem,
                           output logic [31:0] d [$]);
    automatic int n0 = we ? u_nmem.n_aw : u_nmem.n_ar;
    axi_resp_e r; bit ok;
    if (we) begin
      d = {};
      for (int b = 0; b <= int'(len); b++) d.push_back($urandom);
      axi_write(4'h3, a, len, AXI_BURST_INCR, d, r, ok);
      check(ok && r == AXI_RESP_OKAY, "NIC write completes");
    end else begin
      axi_read(4'h5, a, len, AXI_BURST_INCR, d, ok);
      check(ok, "NIC read completes");
    end
    to_mem = ((we ? u_nmem.n_aw : u_nmem.n_ar) != n0);
  endtask

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
    t_req[k] = '0; t_req[k].req = 1; t_req[k].we = we; t_req[k].addr = a;
    t_req[k].be = 4'hF; t_req[k].wdata = wd;
    #1;
    while (!t_rsp[k].gnt) begin @(negedge clk); #1; end
    to_mem = t_mreq[k].req;
    @(negedge clk); t_req[k] = '0; #1;
    check(t_rsp[k].r_valid, "response after grant");
    rd = t_rsp[k].r_rdata;
  endtask

  function automatic logic [31:0] init_word(logic [31:0] a);
    return 32'hA500_0000 + ((a >> 2) % 1024);
  endfunction

  localparam logic [31:0] BASE = 32'h1C00_0000;

  initial begin
    bit m;
    logic [31:0] d;
    int hs;
    for (int k = 0; k < NP; k++) t_req[k] = '0;
    ip_req = '0;
    s_req = '0;
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
    t_req[0] = '0; t_req[0].req = 1; t_req[0].addr = BASE + 32'h1000; t_req[0].be = 4'hF;
    @(negedge clk); psel = 1; pwrite = 1; paddr = 32'hB4; pwdata = 32'h100;
    @(negedge clk); penable = 1; pready = 1; hs = cyc;     // handshake cycle t
    #1 check(!t_mreq[0].req, "t: old rule");
    @(negedge clk); psel = 0; penable = 0; pready = 0;
    #1 check(!t_mreq[0].req, "t+1: old rule");
    @(negedge clk); #1 check(!t_mreq[0].req, "t+2: old rule");
    @(negedge clk); #1 check(t_mreq[0].req, "t+3: new rule active");
    if (t_mreq[0].req && cyc - hs == 3) m_latency++;
    @(negedge clk); t_req[0] = '0;
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
      t_req[2] = '0; t_req[2].req = 1; t_req[2].addr = BASE + 32'h3000; t_req[2].be = 4'hF;
      repeat (64) begin #1; if (t_mreq[2].req && t_rsp[2].gnt) fwd++; @(negedge clk); end
      t_req[2] = '0;
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

    // I: network controller: buffers announced through its control registers
    begin
      logic [31:0] nd [$];
      bit nm;
      nic_burst(0, 32'h8000_0000, 8'd3, nm, nd);
      check(!nm && nd[0] == 0, "NIC: no buffer announced, read sunk");
      nic_apb_write(32'h10, 32'h8000_0400);           // packet buffer pointer
      nic_apb_write(32'h14, 32'd64);                  // frame length in bytes
      repeat (3) @(negedge clk);
      nic_burst(1, 32'h8000_0400, 8'd15, nm, nd);
      check(nm && u_nmem.mem[(32'h8000_0400 >> 2) % 1024] == nd[0] &&
            u_nmem.mem[(32'h8000_043C >> 2) % 1024] == nd[15], "NIC: frame written to its buffer");
      if (nm) m_nic_dyn++;
      nic_burst(0, 32'h8000_0400, 8'd15, nm, nd);
      check(nm && nd[15] == u_nmem.mem[(32'h8000_043C >> 2) % 1024], "NIC: frame read back");
      nic_burst(1, 32'h8000_0430, 8'd7, nm, nd);
      check(!nm, "NIC: burst past the frame sunk");
      nic_apb_write(32'h10, 32'h8000_0800);
      nic_apb_write(32'h14, 32'd32);
      repeat (3) @(negedge clk);
      nic_burst(0, 32'h8000_0400, 8'd0, nm, nd); check(nm, "NIC: first buffer still outstanding");
      nic_apb_write(32'h10, 32'h8000_0C00);
      nic_apb_write(32'h14, 32'd32);
      repeat (3) @(negedge clk);
      nic_burst(0, 32'h8000_0400, 8'd0, nm, nd); check(!nm, "NIC: oldest buffer replaced");
      if (!nm) m_nic_outst++;
      nic_burst(0, 32'h8000_0C00, 8'd7, nm, nd); check(nm, "NIC: newest buffer");
      @(negedge clk); nclr = 1; @(negedge clk); nclr = 0;
      nic_burst(0, 32'h8000_0C00, 8'd0, nm, nd); check(!nm, "NIC: disabled by secure clear");
      if (!nm) m_nic_sec++;
      @(negedge clk); nset = 1; @(negedge clk); nset = 0;
      // rate limit: 16-beat bursts back to back
      nic_apb_write(32'h14, 32'd64);
      repeat (3) @(negedge clk);
      for (int i = 0; i < 12; i++) nic_burst(0, 32'h8000_0C00, 8'd15, nm, nd);
    end

    // static-rules APB unit
    begin
      bit sm;
      logic [31:0] sd;
      for (int i = 0; i < 40; i++) begin
        automatic bit in_rgn = 1'($urandom);
        automatic logic [31:0] a = (in_rgn ? 32'h1A10_0000 : 32'h1A10_1000 + 32'h1000 * 32'($urandom_range(0, 3)))
                                   + (32'($urandom_range(0, 1023)) << 2);
        automatic bit w = 1'($urandom);
        automatic logic [31:0] wd = $urandom;
        automatic logic [31:0] old = u_smem.mem[(a >> 2) % 1024];
        st_xfer(a, w, wd, sm, sd);
        @(negedge clk);
        check(sm == in_rgn, "static rule decides by region");
        if (!w) check(sd == (in_rgn ? old : 32'h0), "static side read data");
        else    check(u_smem.mem[(a >> 2) % 1024] == (in_rgn ? wd : old), "static side write effect");
        check(!s_limited, "static side: no rate limit at APB speed");
      end
      @(negedge clk); s_clr = 1; @(negedge clk); s_clr = 0;
      st_xfer(32'h1A10_0010, 0, 0, sm, sd);
      check(!sm && sd == 0, "static rule closed by secure clear");
      if (!sm) m_st_sec++;
      @(negedge clk); s_set = 1; @(negedge clk); s_set = 0;
      st_xfer(32'h1A10_0010, 0, 0, sm, sd);
      check(sm, "static rule reopened by secure set");
    end

    check(ovf == '0, "no lost rule updates");
    check(m_sink > 0, "mechanism: dummy sink");
    check(m_dir > 0, "mechanism: direction enforcement");
    check(m_range > 0, "mechanism: range check");
    check(m_latency > 0, "mechanism: 3-cycle rule update");
    check(m_outst > 0, "mechanism: outstanding copies round-robin");
    check(m_rate > 0, "mechanism: rate limit");
    check(m_sec > 0, "mechanism: secure disable");
    check(n_ovf == 0, "NIC: no lost rule updates");
    check(m_nic_dyn > 0, "mechanism: NIC dynamic buffer rule");
    check(m_nic_sink > 0, "mechanism: NIC AXI4 dummy sink");
    check(m_nic_outst > 0, "mechanism: NIC outstanding buffers");
    check(m_nic_rate > 0, "mechanism: NIC rate limit");
    check(m_nic_sec > 0, "mechanism: NIC secure disable");
    check(m_st_pass > 0, "mechanism: static rule pass");
    check(m_st_sink > 0, "mechanism: APB dummy sink");
    check(m_st_sec > 0, "mechanism: static rule secure disable");
    $display("mechanisms: sink=%0d dir=%0d range=%0d latency=%0d outstanding=%0d rate=%0d secure=%0d",
             m_sink, m_dir, m_range, m_latency, m_outst, m_rate, m_sec);
    $display("NIC mechanisms: dynamic=%0d sink=%0d outstanding=%0d rate=%0d secure=%0d",
             m_nic_dyn, m_nic_sink, m_nic_outst, m_nic_rate, m_nic_sec);
    $display("static-rules mechanisms: pass=%0d sink=%0d secure=%0d", m_st_pass, m_st_sink, m_st_sec);
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
