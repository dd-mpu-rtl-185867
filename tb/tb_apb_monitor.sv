// tb_apb_monitor: self-checking test of the APB monitor.
// Drives APB writes and reads, with and without wait states, and checks that
// exactly one trace record appears, one cycle after each completed handshake,
// carrying address, direction, data (pwdata or prdata) and a 4-byte length.
module tb_apb_monitor;
  import ddmpu_pkg::*;
  logic clk = 0, rst_ni = 0;
  logic psel = 0, penable = 0, pwrite = 0, pready = 0;
  logic [31:0] paddr = 0, pwdata = 0, prdata = 0;
  trace_t tr;
  int checks = 0, failures = 0;

  apb_monitor dut (.clk_i(clk), .rst_ni(rst_ni), .apb_psel_i(psel), .apb_penable_i(penable),
    .apb_pwrite_i(pwrite), .apb_paddr_i(paddr), .apb_pwdata_i(pwdata), .apb_prdata_i(prdata),
    .apb_pready_i(pready), .trace_o(tr));

  always #5 clk = ~clk;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One APB transfer with `waits` wait states, then check the trace record.
  task automatic apb(bit wr, logic [31:0] a, logic [31:0] d, int waits);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wr ? d : $urandom;
    prdata = wr ? $urandom : d; pready = 0;
    @(negedge clk); penable = 1;
    for (int i = 0; i < waits; i++) begin
      @(negedge clk); check(!tr.valid, "no trace during wait state");
    end
    pready = 1;
    @(negedge clk); psel = 0; penable = 0; pready = 0;
    check(tr.valid, "trace valid one cycle after handshake");
    check(tr.write == wr && tr.addr == a && tr.data == d && tr.len == 4, "trace fields");
    @(negedge clk); check(!tr.valid, "trace valid for one cycle only");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_ni = 1;
    check(!tr.valid, "idle after reset");
    apb(1, 32'hB0, 32'h1C00_0100, 0);
    apb(0, 32'hC0, 32'hDEAD_BEEF, 0);
    apb(1, 32'hB4, 32'h40, 2);
    for (int i = 0; i < 20; i++) apb($urandom_range(0, 1), $urandom, $urandom, $urandom_range(0, 3));
    // psel/penable without pready never produces a record
    @(negedge clk); psel = 1; penable = 1; pready = 0;
    repeat (3) begin @(negedge clk); check(!tr.valid, "no record without pready"); end
    psel = 0; penable = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
