// tb_reg_trigger: self-checking test of the register-matching trigger.
// Writes to the address, length and enable registers must produce Address,
// Length and Enable values carrying the written data; reads, other
// addresses, invalid records and switched-off matches must produce nothing.
module tb_reg_trigger;
  import ddmpu_pkg::*;
  trace_t tr;
  det_t d_all, d_def;
  int checks = 0, failures = 0;

  reg_trigger #(.ADDR_REG(32'hC0), .LEN_REG(32'hC4), .EN_REG(32'hC8),
                .USE_ADDR(1), .USE_LEN(1), .USE_EN(1)) dut_all (.trace_i(tr), .det_o(d_all));
  reg_trigger dut_def (.trace_i(tr), .det_o(d_def));   // 0xB0 / 0xB4, enable off

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic det_kind_e expect_kind(trace_t t, logic [31:0] a, logic [31:0] l,
                                            logic [31:0] e, bit use_e);
    if (!t.valid || !t.write) return DET_INVALID;
    if (t.addr == a) return DET_ADDRESS;
    if (t.addr == l) return DET_LENGTH;
    if (use_e && t.addr == e) return DET_ENABLE;
    return DET_INVALID;
  endfunction

  initial begin
    logic [31:0] addrs [8] = '{32'hB0, 32'hB4, 32'hB8, 32'hC0, 32'hC4, 32'hC8, 32'h0, 32'hD0};
    for (int i = 0; i < 400; i++) begin
      tr.valid = ($urandom_range(0, 7) != 0);
      tr.write = ($urandom_range(0, 3) != 0);
      tr.addr  = addrs[$urandom_range(0, 7)];
      tr.data  = $urandom;
      tr.len   = 4;
      #1;
      check(d_all.kind == expect_kind(tr, 32'hC0, 32'hC4, 32'hC8, 1), "kind, all matches on");
      check(d_def.kind == expect_kind(tr, 32'hB0, 32'hB4, 32'h0, 0), "kind, default trigger");
      if (d_all.kind != DET_INVALID) check(d_all.value == tr.data, "value is written data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
