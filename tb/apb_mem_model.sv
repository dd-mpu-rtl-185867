// apb_mem_model: behavioural APB slave memory for testbenches.
// In the access phase it raises pready in a random cycle (each cycle is a
// wait state with probability WAIT_PCT percent), returns the addressed word on
// prdata for reads, and writes under pstrb when the transfer completes. It
// never signals an error. The array has WORDS words, indexed by the word
// address modulo WORDS, initialised to word i = 32'hC300_0000 + i.
// n_access counts completed transfers.
module apb_mem_model
  import ddmpu_pkg::*;
#(
  parameter int unsigned WORDS    = 256,
  parameter int unsigned WAIT_PCT = 30
) (
  input  logic     clk_i,
  input  apb_req_t req_i,
  output apb_rsp_t rsp_o
);
  logic [31:0] mem [WORDS];
  logic        rdy_rand = 1'b1;
  int unsigned n_access = 0;
  int          idx;

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'hC300_0000 + i;

  always @(negedge clk_i) rdy_rand = ($urandom_range(0, 99) >= WAIT_PCT);

  assign idx = int'((req_i.paddr >> 2) % WORDS);
  assign rsp_o.pready  = req_i.psel & req_i.penable & rdy_rand;
  assign rsp_o.prdata  = (req_i.psel & req_i.penable & ~req_i.pwrite) ? mem[idx] : 32'h0;
  assign rsp_o.pslverr = 1'b0;

  always @(posedge clk_i) begin
    if (req_i.psel && req_i.penable && rsp_o.pready) begin
      n_access++;
      if (req_i.pwrite)
        for (int b = 0; b < 4; b++) if (req_i.pstrb[b]) mem[idx][8*b +: 8] <= req_i.pwdata[8*b +: 8];
    end
  end
endmodule
