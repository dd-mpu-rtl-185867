// tb_pu_core: self-checking test of the protection-unit decision logic with
// two rules (static read-only 0x1000..0x10FF; dynamic-address write-only
// 0x40 bytes, default disabled) and a rate limiter (LIMIT 3, PERIOD 8, DEC 1).
// Checks the OR over rules, the direction and range rejection, the secure
// enable, a dynamic update, and that the allow output drops at the limit for
// an in-range transfer and comes back after a periodic decrement.
module tb_pu_core;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  det_t det;
  logic [1:0] set = 0, clr = 0, match;
  xfer_t x;
  logic done = 0, allow, below;
  int checks = 0, failures = 0;

  localparam rule_cfg_t [1:0] RULES = {
    make_rule(32'h0, 32'h40, DEFAULT_DISABLED, WRITE_ONLY, DYN_ADDRESS, 8'd1),
    make_rule(32'h1000, 32'h100, DEFAULT_ENABLED, READ_ONLY, DYN_NONE, 8'd1)};

  pu_core #(.N_RULES(2), .RULES(RULES), .RL_ENABLE(1), .RL_LIMIT(3), .RL_PERIOD(8), .RL_DEC(1)) dut (
    .clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(set), .sec_en_clr_i(clr),
    .xfer_i(x), .done_i(done), .beats_i(9'd1), .allow_o(allow), .match_o(match), .below_limit_o(below));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic look(logic [31:0] a, bit wr, bit exp_allow, logic [1:0] exp_match, string msg);
    x.addr = a; x.write = wr; x.len = 4; #1;
    check(allow == exp_allow && match == exp_match, msg);
  endtask

  initial begin
    det = '0; x = '0;
    repeat (2) @(negedge clk); rst_ni = 1;
    @(negedge clk);
    look(32'h1000, 0, 1, 2'b01, "static read allowed");
    look(32'h1000, 1, 0, 2'b00, "static write denied (read-only)");
    look(32'h2000, 0, 0, 2'b00, "outside every rule");
    // enable rule 1 and move it to 0x8000
    set = 2'b10; @(negedge clk); set = 0;
    det.kind = DET_ADDRESS; det.value = 32'h8000; @(negedge clk); det.kind = DET_INVALID;
    look(32'h8000, 1, 1, 2'b10, "dynamic rule write allowed");
    look(32'h803C, 1, 1, 2'b10, "dynamic rule last word");
    look(32'h8040, 1, 0, 2'b00, "dynamic rule end");
    look(32'h8000, 0, 0, 2'b00, "dynamic rule read denied");
    clr = 2'b01; @(negedge clk); clr = 0;
    look(32'h1000, 0, 0, 2'b00, "static rule disabled by secure clear");
    set = 2'b01; @(negedge clk); set = 0;
    // rate limit: three counted transfers reach LIMIT 3
    look(32'h1000, 0, 1, 2'b01, "allowed before limit");
    begin
      int n = 0;
      done = 1;
      while (allow && n < 10) begin @(negedge clk); n++; #1; end
      done = 0;
      // three or four transfers, depending on where a decrement falls
      check(n >= 3 && n <= 4, "limit reached after LIMIT transfers");
    end
    check(!below && !allow && match == 2'b01, "in-range transfer held back at the limit");
    // a decrement every 8 cycles brings the count back below the limit
    begin
      int waited = 0;
      while (!allow && waited < 20) begin @(negedge clk); waited++; end
      check(allow && waited <= 8, "released by periodic decrement");
    end
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
