// tb_hwpe_ports: runs the accelerator DD-MPU (ddmpu_hwpe) in the port counts
// compared in the evaluation of the scheme: one, two, three and four
// protected TCDM data ports. Four independent instances with N_PORTS = 1..4
// run side by side, each with its own APB control bus, TCDM memory models and
// test process. Every other parameter keeps its default.
// For each instance the test checks that every port is closed until its base
// and length registers (0xB0 + 0x10*k, +4) have been written; that after
// configuration each read-only port reads inside its region, has writes sunk
// and has reads past the region end sunk; and that the last port, the only
// write-only one, writes inside its region and has reads and writes before the
// region sunk. The port numbering (last port write-only) follows the four-port
// case; which ports the smaller configurations keep is this test's choice.
module tb_hwpe_ports;
  import ddmpu_pkg::*;
  localparam int N_CFG = 4;
  localparam logic [31:0] BASE = 32'h1C00_0000;
  logic clk = 0, rst_ni = 0;
  int checks = 0, failures = 0, cyc = 0, n_done = 0;
  int n_fwd = 0, n_sunk = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  function automatic logic [31:0] init_word(logic [31:0] a);
    return 32'hA500_0000 + ((a >> 2) % 1024);
  endfunction

  for (genvar c = 0; c < N_CFG; c++) begin : g_cfg
    localparam int NP = c + 1;
    logic psel = 0, penable = 0, pwrite = 0, pready = 0;
    logic [31:0] paddr = 0, pwdata = 0;
    tcdm_req_t ip_req [NP], mem_req [NP];
    tcdm_rsp_t ip_rsp [NP], mem_rsp [NP];
    logic [NP-1:0] denied, limited, ovf;

    ddmpu_hwpe #(.N_PORTS(NP)) dut (
      .clk_i(clk), .rst_ni(rst_ni),
      .apb_psel_i(psel), .apb_penable_i(penable), .apb_pwrite_i(pwrite), .apb_paddr_i(paddr),
      .apb_pwdata_i(pwdata), .apb_prdata_i(32'h0), .apb_pready_i(pready),
      .ip_req_i(ip_req), .ip_rsp_o(ip_rsp), .mem_req_o(mem_req), .mem_rsp_i(mem_rsp),
      .sec_en_set_i('0), .sec_en_clr_i('0),
      .denied_o(denied), .limited_o(limited), .overflow_o(ovf));

    for (genvar k = 0; k < NP; k++) begin : g_mem
      tcdm_mem_model #(.WORDS(1024)) u_mem (.clk_i(clk), .req_i(mem_req[k]), .rsp_o(mem_rsp[k]));
    end

    task automatic check(bit cond, string msg);
      checks++;
      if (!cond) begin failures++; $display("FAIL @%0d (%0d ports): %s", cyc, NP, msg); end
    endtask

    task automatic apb_write(logic [31:0] a, logic [31:0] d);
      @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
      @(negedge clk); penable = 1; pready = 1;
      @(negedge clk); psel = 0; penable = 0; pready = 0;
    endtask

    // One TCDM access on port k; reports whether it reached memory, whether
    // the port flagged it as denied, and the read data.
    task automatic access(int k, logic [31:0] a, bit we, logic [31:0] wd,
                          output bit to_mem, output bit den, output logic [31:0] rd);
      @(negedge clk);
      ip_req[k] = '0; ip_req[k].req = 1; ip_req[k].we = we; ip_req[k].addr = a;
      ip_req[k].be = 4'hF; ip_req[k].wdata = wd;
      #1;
      while (!ip_rsp[k].gnt) begin @(negedge clk); #1; end
      to_mem = mem_req[k].req;
      den = denied[k];
      @(negedge clk); ip_req[k] = '0; #1;
      check(ip_rsp[k].r_valid, "response one cycle after grant");
      rd = ip_rsp[k].r_rdata;
      if (to_mem) n_fwd++; else n_sunk++;
      repeat (2) @(negedge clk);
    endtask

    function automatic logic [31:0] region(int k);
      return BASE + 32'h1000 * 32'(k + 1);
    endfunction

    initial begin
      bit m, dn;
      logic [31:0] d;
      for (int k = 0; k < NP; k++) ip_req[k] = '0;
      wait (rst_ni);
      repeat (2) @(negedge clk);

      // closed before configuration
      for (int k = 0; k < NP; k++) begin
        access(k, region(k) + 32'h10, k == NP - 1, 32'h1234_5678, m, dn, d);
        check(!m && dn && d == 0, "unconfigured port sunk");
      end

      for (int k = 0; k < NP; k++) begin
        apb_write(32'hB0 + 32'h10 * 32'(k), region(k));
        apb_write(32'hB4 + 32'h10 * 32'(k), 32'h100);
      end
      repeat (3) @(negedge clk);

      for (int k = 0; k < NP; k++) begin
        automatic logic [31:0] a = region(k) + 32'h10 * 32'($urandom_range(0, 15));
        if (k < NP - 1) begin
          access(k, a, 0, 0, m, dn, d);
          check(m && !dn && d == init_word(a), "read-only port reads its region");
          access(k, a, 1, 32'hBAD0_0000, m, dn, d);
          check(!m && dn, "read-only port write sunk");
          access(k, region(k) + 32'h100, 0, 0, m, dn, d);
          check(!m && d == 0, "read past region end sunk");
          access(k, region(k) + 32'hFC, 0, 0, m, dn, d);
          check(m && d == init_word(region(k) + 32'hFC), "last word of region read");
        end else begin
          automatic logic [31:0] wd = $urandom;
          access(k, a, 1, wd, m, dn, d);
          @(negedge clk);
          check(m && !dn && g_mem[NP-1].u_mem.mem[(a >> 2) % 1024] == wd, "write-only port writes its region");
          access(k, a, 0, 0, m, dn, d);
          check(!m && dn && d == 0, "write-only port read sunk");
          access(k, region(k) - 32'h4, 1, 32'h1, m, dn, d);
          check(!m && dn, "write before region start sunk");
        end
      end
      check(ovf == '0, "no detection FIFO overflow");
      n_done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_ni = 1;
    wait (n_done == N_CFG);
    checks++;
    if (n_fwd == 0 || n_sunk == 0) begin failures++; $display("FAIL: forwarded=%0d sunk=%0d", n_fwd, n_sunk); end
    $display("port configurations 1..%0d: forwarded=%0d sunk=%0d", N_CFG, n_fwd, n_sunk);
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
