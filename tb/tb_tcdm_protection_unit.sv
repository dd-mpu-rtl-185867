// tb_tcdm_protection_unit: self-checking test of a TCDM protection unit with
// one DYN_ADDRESS_LENGTH read/write rule (two outstanding copies) and a rate
// limiter (LIMIT 4, PERIOD 8, DEC 2), in front of a memory model.
// Before any update every access goes to the dummy sink. After the region
// 0x40..0x7F is set through the detection input, accesses inside it reach
// memory and those outside are sunk; a back-to-back stream must run into the
// rate limit and later be released.
module tb_tcdm_protection_unit;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  det_t det;
  tcdm_req_t ip_req, mem_req;
  tcdm_rsp_t ip_rsp, mem_rsp;
  logic denied, limited;
  int checks = 0, failures = 0, n_limited = 0, n_denied = 0;

  localparam rule_cfg_t RULE = make_rule(32'h0, 32'h0, DEFAULT_ENABLED, READ_WRITE,
                                         DYN_ADDRESS_LENGTH, 8'd2);

  tcdm_protection_unit #(.N_RULES(1), .RULES(RULE), .RL_ENABLE(1), .RL_LIMIT(4), .RL_PERIOD(8),
                         .RL_DEC(2)) dut (
    .clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(1'b0), .sec_en_clr_i(1'b0),
    .ip_req_i(ip_req), .ip_rsp_o(ip_rsp), .mem_req_o(mem_req), .mem_rsp_i(mem_rsp),
    .denied_o(denied), .limited_o(limited));
  tcdm_mem_model #(.WORDS(64)) u_mem (.clk_i(clk), .req_i(mem_req), .rsp_o(mem_rsp));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (limited) n_limited++;
    if (denied) n_denied++;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One read; returns the data and whether it reached memory.
  task automatic rd(logic [31:0] a, output logic [31:0] d, output bit to_mem);
    @(negedge clk);
    ip_req = '0; ip_req.req = 1; ip_req.addr = a; ip_req.be = 4'hF;
    #1; to_mem = mem_req.req;
    while (!ip_rsp.gnt) begin @(negedge clk); #1; to_mem = mem_req.req; end
    @(negedge clk); ip_req = '0; #1;
    d = ip_rsp.r_rdata;
  endtask

  initial begin
    logic [31:0] d;
    bit m;
    det = '0; ip_req = '0;
    repeat (2) @(negedge clk); rst_ni = 1;
    repeat (20) @(negedge clk);
    rd(32'h40, d, m); check(!m && d == 0, "no region yet: sunk, zero data");
    @(negedge clk); det.kind = DET_ADDRESS; det.value = 32'h40;
    @(negedge clk); det.kind = DET_LENGTH; det.value = 32'h40;
    @(negedge clk); det.kind = DET_INVALID;
    repeat (20) @(negedge clk);
    rd(32'h40, d, m); check(m && d == 32'hA500_0010, "region start reaches memory");
    repeat (4) @(negedge clk);
    rd(32'h7C, d, m); check(m && d == 32'hA500_001F, "region end reaches memory");
    repeat (4) @(negedge clk);
    rd(32'h80, d, m); check(!m && d == 0, "past region: sunk");
    rd(32'h3C, d, m); check(!m && d == 0, "before region: sunk");
    // stream 20 back-to-back reads inside the region
    @(negedge clk);
    ip_req = '0; ip_req.req = 1; ip_req.addr = 32'h50; ip_req.be = 4'hF;
    begin
      int to_mem = 0;
      repeat (20) begin #1; if (mem_req.req) to_mem++; @(negedge clk); end
      ip_req = '0;
      check(to_mem >= 4 && to_mem < 20, "stream throttled by rate limit");
    end
    check(n_limited > 0, "rate limit reached");
    repeat (40) @(negedge clk);
    rd(32'h50, d, m); check(m, "released after decrements");
    check(n_denied > 0, "dummy sink used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
