// tcdm_mem_model: behavioural model of a TCDM memory port for testbenches.
// Grants a request in the cycle it is presented (with probability
// GNT_PCT percent), applies writes under byte enables, and returns r_valid
// with the read data one cycle after the grant. The array has WORDS words,
// indexed by the word address modulo WORDS, initialised to a known pattern
// (word i holds 32'hA500_0000 + i). n_access counts granted requests.
module tcdm_mem_model
  import ddmpu_pkg::*;
#(
  parameter int unsigned WORDS   = 1024,
  parameter int unsigned GNT_PCT = 100
) (
  input  logic      clk_i,
  input  tcdm_req_t req_i,
  output tcdm_rsp_t rsp_o
);
  logic [31:0] mem [WORDS];
  logic        gnt_rand;
  int unsigned n_access = 0;

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'hA500_0000 + i;

  always @(negedge clk_i) gnt_rand = ($urandom_range(0, 99) < GNT_PCT);

  assign rsp_o.gnt = req_i.req & gnt_rand;

  always @(posedge clk_i) begin
    rsp_o.r_valid <= 1'b0;
    if (req_i.req && rsp_o.gnt) begin
      automatic int idx = int'((req_i.addr >> 2) % WORDS);
      n_access++;
      rsp_o.r_valid <= 1'b1;
      rsp_o.r_rdata <= mem[idx];
      if (req_i.we)
        for (int b = 0; b < 4; b++) if (req_i.be[b]) mem[idx][8*b +: 8] <= req_i.wdata[8*b +: 8];
    end
  end

  initial begin rsp_o.r_valid = 1'b0; rsp_o.r_rdata = '0; gnt_rand = 1'b1; end
endmodule
