// tb_pu_rule: self-checking test of a single rule in five configurations:
//  ex  - start 0, length 0x60, DEFAULT_DISABLED, WRITE_ONLY, DYN_ADDRESS,
//        two outstanding copies (round-robin replacement)
//  st  - static READ_WRITE region 0x1000..0x10FF, DEFAULT_ENABLED
//  al  - ALWAYS_ENABLED, READ_ONLY, DYN_ADDRESS_LENGTH, one copy
//  en  - DYN_ENABLE, DEFAULT_ENABLED region 0..0xFF
//  ln  - DYN_LENGTH, start 0x4000, one copy
// Expected results are the region bounds worked out by hand.
module tb_pu_rule;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  det_t det;
  logic set = 0, clr = 0;
  xfer_t x;
  logic m_ex, m_st, m_al, m_en, m_ln;
  logic e_ex, e_st, e_al, e_en, e_ln;
  int checks = 0, failures = 0;

  localparam rule_cfg_t R_ST = make_rule(32'h1000, 32'h100, DEFAULT_ENABLED, READ_WRITE, DYN_NONE, 8'd1);
  localparam rule_cfg_t R_AL = make_rule(32'h100, 32'h10, ALWAYS_ENABLED, READ_ONLY, DYN_ADDRESS_LENGTH, 8'd1);
  localparam rule_cfg_t R_EN = make_rule(32'h0, 32'h100, DEFAULT_ENABLED, READ_WRITE, DYN_ENABLE, 8'd1);
  localparam rule_cfg_t R_LN = make_rule(32'h4000, 32'h10, DEFAULT_ENABLED, READ_WRITE, DYN_LENGTH, 8'd1);

  pu_rule u_ex (.clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(set), .sec_en_clr_i(clr),
                .xfer_i(x), .match_o(m_ex), .enabled_o(e_ex));
  pu_rule #(.RULE(R_ST)) u_st (.clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(1'b0),
                .sec_en_clr_i(1'b0), .xfer_i(x), .match_o(m_st), .enabled_o(e_st));
  pu_rule #(.RULE(R_AL)) u_al (.clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(set),
                .sec_en_clr_i(clr), .xfer_i(x), .match_o(m_al), .enabled_o(e_al));
  pu_rule #(.RULE(R_EN)) u_en (.clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(1'b0),
                .sec_en_clr_i(1'b0), .xfer_i(x), .match_o(m_en), .enabled_o(e_en));
  pu_rule #(.RULE(R_LN)) u_ln (.clk_i(clk), .rst_ni(rst_ni), .det_i(det), .sec_en_set_i(1'b0),
                .sec_en_clr_i(1'b0), .xfer_i(x), .match_o(m_ln), .enabled_o(e_ln));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Apply a transfer and return the five match outputs {ex, st, al, en, ln}.
  function automatic logic [4:0] probe_now();
    return {m_ex, m_st, m_al, m_en, m_ln};
  endfunction

  task automatic expect_match(logic [31:0] a, bit wr, logic [4:0] exp, string msg);
    x.addr = a; x.write = wr; x.len = 4;
    #1;
    checks++;
    if (probe_now() != exp) begin
      failures++;
      $display("FAIL: %s addr=%h wr=%0d got=%b exp=%b", msg, a, wr, probe_now(), exp);
    end
  endtask

  task automatic send(det_kind_e k, logic [31:0] v);
    @(negedge clk); det.kind = k; det.value = v;
    @(negedge clk); det.kind = DET_INVALID;
  endtask

  initial begin
    det = '0; x = '0;
    repeat (2) @(negedge clk); rst_ni = 1;
    @(negedge clk);
    //                        ex st al en ln
    expect_match(32'h0000, 1, 5'b00010, "reset: ex disabled, en covers 0");
    expect_match(32'h1000, 0, 5'b01000, "static region read");
    expect_match(32'h10FC, 1, 5'b01000, "static region last word");
    expect_match(32'h1100, 1, 5'b00000, "static region end");
    expect_match(32'h0FFE, 0, 5'b00000, "straddles static start");
    expect_match(32'h0100, 0, 5'b00100, "al static region read");
    expect_match(32'h0100, 1, 5'b00000, "al read-only");
    expect_match(32'h010C, 0, 5'b00100, "al last word");
    expect_match(32'h4008, 0, 5'b00001, "ln static length");
    expect_match(32'h4010, 0, 5'b00000, "ln beyond static length");
    check(!e_ex && e_st && e_al && e_en && e_ln, "reset enable states");

    // secure enable of the DEFAULT_DISABLED rule; copies still invalid
    @(negedge clk); set = 1; @(negedge clk); set = 0;
    check(e_ex, "ex enabled by secure set");
    expect_match(32'h0010, 1, 5'b00010, "ex copies invalid before first update");

    // first dynamic address: not yet in the update cycle, active the next
    @(negedge clk); det.kind = DET_ADDRESS; det.value = 32'h2000_0000;
    expect_match(32'h2000_0000, 1, 5'b00000, "update not active in its own cycle");
    @(negedge clk); det.kind = DET_INVALID;
    expect_match(32'h2000_0000, 1, 5'b10000, "ex copy 0 active");
    expect_match(32'h2000_005C, 1, 5'b10000, "ex last word");
    expect_match(32'h2000_0060, 1, 5'b00000, "ex end");
    expect_match(32'h2000_0000, 0, 5'b00100, "ex write-only (al took the same address)");
    expect_match(32'h0000_0100, 0, 5'b00000, "al left its static region");
    send(DET_ADDRESS, 32'h3000_0000);
    expect_match(32'h2000_0000, 1, 5'b10000, "ex copy 0 still active");
    expect_match(32'h3000_0000, 1, 5'b10000, "ex copy 1 active");
    send(DET_ADDRESS, 32'h4000_0000);
    expect_match(32'h2000_0000, 1, 5'b00000, "ex copy 0 replaced round-robin");
    expect_match(32'h3000_0000, 1, 5'b10000, "ex copy 1 kept");
    expect_match(32'h4000_0000, 1, 5'b10000, "ex copy 0 new");
    send(DET_LENGTH, 32'h1000);
    expect_match(32'h3000_0100, 1, 5'b00000, "ex ignores length values");

    // al followed the addresses: last was 0x4000_0000, length back to 0x10, then 0x1000
    expect_match(32'h4000_0000, 0, 5'b00100, "al took address, read");
    expect_match(32'h4000_0FFC, 0, 5'b00100, "al took length");
    expect_match(32'h4000_1000, 0, 5'b00000, "al end");
    expect_match(32'h0000_0100, 0, 5'b00000, "al old region gone");
    send(DET_ADDRESS, 32'h5000_0000);
    expect_match(32'h5000_0010, 0, 5'b00000, "al new copy has static length");
    expect_match(32'h5000_000C, 0, 5'b00100, "al new copy start");
    // ln took the length 0x1000
    expect_match(32'h0000_4FFC, 0, 5'b00001, "ln new length");

    // secure clear: ex off, al cannot be disabled; clear wins over set
    @(negedge clk); set = 1; clr = 1; @(negedge clk); set = 0; clr = 0;
    check(!e_ex && e_al, "clear wins, always-enabled stays");
    expect_match(32'h4000_0000, 1, 5'b00000, "ex disabled");

    // dynamic enable
    send(DET_ENABLE, 32'h0);
    check(!e_en, "en disabled by Enable 0");
    expect_match(32'h0000_0000, 0, 5'b00000, "en off");
    send(DET_ENABLE, 32'h1);
    expect_match(32'h0000_0000, 0, 5'b00010, "en on again");

    // wrap-around never matches
    send(DET_ADDRESS, 32'hFFFF_FFF0);
    expect_match(32'hFFFF_FFFC, 0, 5'b00100, "al top of memory");
    expect_match(32'hFFFF_FFFE, 0, 5'b00000, "al wrap rejected");

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
