// tb_axi4_protection_unit: self-checking test of the AXI4 protection unit in
// front of a memory model with random stalls. Rules: a static read/write
// region 0x1000..0x10FF (default enabled) and a write-only rule whose start
// and length are set through the detection input (two outstanding copies).
// Checks INCR, WRAP and FIXED bursts inside and outside the regions, that
// denied bursts complete with OKAY, the right ID and zero read data while the
// memory sees neither their address nor their data, concurrent read and
// write traffic through the AW/AR arbitration, and the rate limit (LIMIT 32
// beats, 1 beat per 4 cycles).
module tb_axi4_protection_unit;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  det_t det;
  axi_req_t ip_req, mem_req;
  axi_rsp_t ip_rsp, mem_rsp;
  logic denied, limited;
  int checks = 0, failures = 0, n_denied = 0, n_limited = 0;
  logic [31:0] shadow [256];

  localparam rule_cfg_t [1:0] RULES = {
    make_rule(32'h0, 32'h0, DEFAULT_ENABLED, WRITE_ONLY, DYN_ADDRESS_LENGTH, 8'd2),
    make_rule(32'h1000, 32'h100, DEFAULT_ENABLED, READ_WRITE, DYN_NONE, 8'd1)};

  axi4_protection_unit #(.N_RULES(2), .RULES(RULES), .RL_ENABLE(1), .RL_LIMIT(32), .RL_PERIOD(4),
                         .RL_DEC(1)) dut (
    .clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(2'b0), .sec_en_clr_i(2'b0),
    .ip_req_i(ip_req), .ip_rsp_o(ip_rsp), .mem_req_o(mem_req), .mem_rsp_i(mem_rsp),
    .denied_o(denied), .limited_o(limited));
  axi_mem_model #(.WORDS(256), .READY_PCT(60)) u_mem (.clk_i(clk), .req_i(mem_req), .rsp_o(mem_rsp));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (denied) n_denied++;
    if (limited) n_limited++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  `include "axi_tb_tasks.svh"

  function automatic int widx(logic [31:0] a);
    return int'((a >> 2) % 256);
  endfunction

  task automatic wr(logic [3:0] id, logic [31:0] a, logic [7:0] len, axi_burst_e bt, bit expect_mem);
    logic [31:0] d [$];
    axi_resp_e r; bit ok;
    int aw0 = u_mem.n_aw, w0 = u_mem.n_w;
    for (int b = 0; b <= int'(len); b++) d.push_back($urandom);
    axi_write(id, a, len, bt, d, r, ok);
    check(r == AXI_RESP_OKAY && ok, "write completes with OKAY and its ID");
    if (expect_mem) begin
      check(u_mem.n_aw == aw0 + 1 && u_mem.n_w == w0 + int'(len) + 1, "write reached memory");
      for (int b = 0; b <= int'(len); b++) begin
        logic [31:0] bytes = 32'd4, total = (32'(len) + 1) * 4, ba;
        ba = (bt == AXI_BURST_WRAP) ? ((a & ~(total - 1)) | ((a + 32'(b) * bytes) & (total - 1)))
           : (bt == AXI_BURST_FIXED) ? a : a + 32'(b) * bytes;
        shadow[widx(ba)] = d[b];
      end
    end else begin
      check(u_mem.n_aw == aw0 && u_mem.n_w == w0, "denied write never reached memory");
    end
  endtask

  task automatic rd(logic [3:0] id, logic [31:0] a, logic [7:0] len, axi_burst_e bt, bit expect_mem);
    logic [31:0] d [$];
    bit ok;
    int ar0 = u_mem.n_ar;
    axi_read(id, a, len, bt, d, ok);
    check(ok && d.size() == int'(len) + 1, "read beats, IDs and RLAST");
    if (expect_mem) begin
      check(u_mem.n_ar == ar0 + 1, "read reached memory");
      for (int b = 0; b <= int'(len); b++) begin
        logic [31:0] total = (32'(len) + 1) * 4, ba;
        ba = (bt == AXI_BURST_WRAP) ? ((a & ~(total - 1)) | ((a + 32'(b) * 4) & (total - 1)))
           : (bt == AXI_BURST_FIXED) ? a : a + 32'(b) * 4;
        check(d[b] == shadow[widx(ba)], "read data from memory");
      end
    end else begin
      check(u_mem.n_ar == ar0, "denied read never reached memory");
      foreach (d[b]) check(d[b] == 0, "denied read returns zero");
    end
  endtask

  initial begin
    det = '0; ip_req = '0;
    for (int i = 0; i < 256; i++) shadow[i] = 32'hB700_0000 + i;
    repeat (3) @(negedge clk); rst_ni = 1;
    repeat (2) @(negedge clk);
    // static region
    wr(4'h1, 32'h1000, 8'd3, AXI_BURST_INCR, 1);
    rd(4'h2, 32'h1000, 8'd3, AXI_BURST_INCR, 1);
    rd(4'h3, 32'h10F0, 8'd3, AXI_BURST_INCR, 1);
    rd(4'h4, 32'h10F8, 8'd3, AXI_BURST_INCR, 0);          // runs past the end
    wr(4'h5, 32'h0FFC, 8'd1, AXI_BURST_INCR, 0);          // starts before
    rd(4'h6, 32'h1018, 8'd3, AXI_BURST_WRAP, 1);          // wraps inside 0x1010..0x101F
    wr(4'h7, 32'h10FC, 8'd7, AXI_BURST_FIXED, 1);         // fixed: one word
    rd(4'h8, 32'h10FC, 8'd0, AXI_BURST_INCR, 1);
    repeat (40) @(negedge clk);
    // dynamic write-only region 0x2000..0x203F
    @(negedge clk); det.kind = DET_ADDRESS; det.value = 32'h2000;
    @(negedge clk); det.kind = DET_LENGTH; det.value = 32'h40;
    @(negedge clk); det.kind = DET_INVALID;
    wr(4'h9, 32'h2000, 8'd15, AXI_BURST_INCR, 1);
    rd(4'hA, 32'h2000, 8'd3, AXI_BURST_INCR, 0);          // write-only
    wr(4'hB, 32'h2030, 8'd7, AXI_BURST_INCR, 0);          // too long
    repeat (40) @(negedge clk);
    // concurrent read and write traffic, both allowed and denied
    fork
      for (int i = 0; i < 6; i++) wr(4'(i), 32'h2000 + 32'(i % 4) * 16, 8'd3, AXI_BURST_INCR, 1);
      for (int i = 0; i < 6; i++) begin
        logic [31:0] d [$]; bit ok;
        axi_read(4'(i), (i % 2) ? 32'h1040 : 32'h3000, 8'd1, AXI_BURST_INCR, d, ok);
        check(ok, "concurrent read completes");
        if (i % 2 == 0) check(d[0] == 0 && d[1] == 0, "concurrent denied read zero");
        else check(d[0] == shadow[widx(32'h1040)], "concurrent allowed read");
      end
    join
    // rate limit: 16-beat bursts back to back (more than 1 beat per 4 cycles)
    repeat (100) @(negedge clk);
    for (int i = 0; i < 15; i++) begin
      logic [31:0] d [$]; bit ok;
      axi_read(4'h1, 32'h1000, 8'd15, AXI_BURST_INCR, d, ok);
    end
    check(n_limited > 0, "rate limit reached");
    check(n_denied > 0, "dummy sink used");
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
