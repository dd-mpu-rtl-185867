// tb_detection_module: self-checking test of the detection module with its
// default two channels (registers 0xB0/0xB4 and 0xC0/0xC4).
// Random trace records are applied; each write to a channel's register must
// appear on that channel, and only there, exactly one cycle later with the
// right kind and value.
module tb_detection_module;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  trace_t tr;
  det_t det [2];
  logic ovf [2];
  int checks = 0, failures = 0;
  int seen [2] = '{0, 0};

  detection_module dut (.clk_i(clk), .rst_ni(rst_ni), .trace_i(tr), .det_o(det), .overflow_o(ovf));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic det_t expect_det(trace_t t, int ch);
    det_t d;
    logic [31:0] base = (ch == 0) ? 32'hB0 : 32'hC0;
    d.value = t.data;
    d.kind  = DET_INVALID;
    if (t.valid && t.write && t.addr == base)      d.kind = DET_ADDRESS;
    if (t.valid && t.write && t.addr == base + 4)  d.kind = DET_LENGTH;
    return d;
  endfunction

  initial begin
    logic [31:0] addrs [6] = '{32'hB0, 32'hB4, 32'hB8, 32'hC0, 32'hC4, 32'h10};
    trace_t prev;
    tr = '0;
    repeat (2) @(negedge clk); rst_ni = 1;
    prev = '0;
    for (int i = 0; i < 500; i++) begin
      tr.valid = $urandom_range(0, 1);
      tr.write = ($urandom_range(0, 3) != 0);
      tr.addr  = addrs[$urandom_range(0, 5)];
      tr.data  = $urandom;
      tr.len   = 4;
      #1;
      for (int c = 0; c < 2; c++) begin
        automatic det_t e = expect_det(prev, c);
        check(det[c].kind == e.kind, "kind one cycle after trace");
        if (e.kind != DET_INVALID) begin
          check(det[c].value == e.value, "value");
          seen[c]++;
        end
        check(!ovf[c], "no overflow");
      end
      @(negedge clk);
      prev = tr;
    end
    check(seen[0] > 10 && seen[1] > 10, "both channels exercised");
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
