// tb_static_rules: the single-port static configurations (1, 8 and 16 fixed
// rules, no dynamic updates, no rate limit) on a TCDM protection unit.
// Rule i allows the 256-byte region at 0x1000*(i+1); even rules are
// READ_WRITE, odd ones READ_ONLY, and the last one starts default-disabled
// until the secure enable is pulsed. Random accesses across and around the
// regions are compared with a model of the rule list.
module tb_static_rules;
  import ddmpu_pkg::*;
  localparam int NCFG = 3;
  localparam int NR [NCFG] = '{1, 8, 16};
  logic clk = 0, rst_ni = 0;
  int checks = 0, failures = 0, n_pass = 0, n_sink = 0;

  function automatic rule_cfg_t rule_i(int i, int n);
    return make_rule(32'h1000 * 32'(i + 1), 32'h100,
                     (i == n - 1 && n > 1) ? DEFAULT_DISABLED : DEFAULT_ENABLED,
                     (i % 2 == 0) ? READ_WRITE : READ_ONLY, DYN_NONE, 8'd1);
  endfunction

  function automatic rule_cfg_t [15:0] rules16(int n);
    rule_cfg_t [15:0] r;
    r = '0;
    for (int i = 0; i < n; i++) r[i] = rule_i(i, n);
    return r;
  endfunction

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  tcdm_req_t req [NCFG], mreq [NCFG];
  tcdm_rsp_t rsp [NCFG], mrsp [NCFG];
  logic [15:0] set [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int N = NR[c];
    localparam rule_cfg_t [15:0] R16 = rules16(N);
    logic dn, lim;
    tcdm_protection_unit #(.N_RULES(N), .RULES(R16[N-1:0]), .RL_ENABLE(0)) u_pu (
      .clk_i(clk), .rst_ni(rst_ni), .det_i('0), .sec_en_set_i(set[c][N-1:0]),
      .sec_en_clr_i('0), .ip_req_i(req[c]), .ip_rsp_o(rsp[c]), .mem_req_o(mreq[c]),
      .mem_rsp_i(mrsp[c]), .denied_o(dn), .limited_o(lim));
    tcdm_mem_model #(.WORDS(64)) u_mem (.clk_i(clk), .req_i(mreq[c]), .rsp_o(mrsp[c]));
  end

  function automatic bit allowed(int n, logic [31:0] a, bit we, bit last_on);
    for (int i = 0; i < n; i++) begin
      if (i == n - 1 && n > 1 && !last_on) continue;
      if (a >= 32'h1000 * 32'(i + 1) && a + 4 <= 32'h1000 * 32'(i + 1) + 32'h100 &&
          (i % 2 == 0 || !we)) return 1;
    end
    return 0;
  endfunction

  initial begin
    for (int c = 0; c < NCFG; c++) begin req[c] = '0; set[c] = '0; end
    repeat (3) @(negedge clk); rst_ni = 1;
    for (int phase = 0; phase < 2; phase++) begin
      if (phase == 1) begin
        @(negedge clk); for (int c = 0; c < NCFG; c++) set[c] = '1;
        @(negedge clk); for (int c = 0; c < NCFG; c++) set[c] = '0;
      end
      for (int i = 0; i < 400; i++) begin
        @(negedge clk);
        for (int c = 0; c < NCFG; c++) begin
          automatic logic [31:0] a = 32'h1000 * 32'($urandom_range(0, 17)) +
                                     32'($urandom_range(0, 70) * 4) - 32'h8;
          req[c] = '0; req[c].req = 1; req[c].we = $urandom_range(0, 1); req[c].addr = a;
          req[c].be = 4'hF;
        end
        #1;
        for (int c = 0; c < NCFG; c++) begin
          automatic bit exp = allowed(NR[c], req[c].addr, req[c].we, phase == 1);
          check(mreq[c].req == exp, $sformatf("%0d rules: addr %h we %0d", NR[c], req[c].addr, req[c].we));
          if (exp) n_pass++; else n_sink++;
        end
      end
    end
    check(n_pass > 100 && n_sink > 100, "both outcomes exercised");
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
