// tcdm_dummy_sink: protocol-compliant responder for denied TCDM transfers.
//
// A denied transfer must still complete, or the IP would stall waiting for
// its handshake. The sink grants every request in the cycle it is presented
// and answers one cycle later with r_valid high and all-zero read data; it
// stores nothing, so writes have no effect and reads reveal nothing.
// Interface: TCDM request in, TCDM response out (grant combinational,
// response registered). The behaviour follows the DD-MPU dummy sink; the
// TCDM timing (grant in the request cycle, response one cycle later) is the
// usual TCDM convention.
module tcdm_dummy_sink
  import ddmpu_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t req_i,
  output tcdm_rsp_t rsp_o
);

  logic rvalid_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_q <= 1'b0;
    else         rvalid_q <= req_i.req;
  end

  assign rsp_o.gnt     = req_i.req;
  assign rsp_o.r_valid = rvalid_q;
  assign rsp_o.r_rdata = '0;

endmodule
