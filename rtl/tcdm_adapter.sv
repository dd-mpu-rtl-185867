// tcdm_adapter: TCDM bus adapter and output multiplexer of a protection unit.
//
// It converts the IP's TCDM request into the protocol-independent transfer
// description (address, length = one DATA_W word, write flag) for the
// decision logic, and uses the decision allow_i to steer the request: allowed
// requests go to the memory port, denied ones to the dummy sink. A request
// that is not forwarded shows nothing on the memory port (all fields zero).
// The grant returned to the IP comes from whichever side the request went to;
// the read response is the sink's in a cycle where the sink answers and the
// memory's otherwise. Both answer one cycle after their grant, so the two can
// never collide (asserted). done_o marks a completed request handshake and
// denied_o one that went to the sink.
// Timing: combinational from request to memory port and grant; no added
// latency on the data path.
// Adapter, multiplexer and dummy sink follow the DD-MPU protection unit; the
// TCDM signal set and zeroing of non-forwarded requests are this design's.
module tcdm_adapter
  import ddmpu_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  tcdm_req_t ip_req_i,
  output tcdm_rsp_t ip_rsp_o,
  output tcdm_req_t mem_req_o,
  input  tcdm_rsp_t mem_rsp_i,
  output xfer_t     xfer_o,
  input  logic      allow_i,
  output logic      done_o,
  output logic [8:0] beats_o,
  output logic      denied_o
);

  tcdm_req_t sink_req;
  tcdm_rsp_t sink_rsp;

  assign xfer_o.addr  = ip_req_i.addr;
  assign xfer_o.len   = LEN_W'(DATA_W / 8);
  assign xfer_o.write = ip_req_i.we;

  assign mem_req_o = allow_i ? ip_req_i : '0;
  assign sink_req  = allow_i ? '0 : ip_req_i;

  tcdm_dummy_sink u_sink (
    .clk_i (clk_i),
    .rst_ni(rst_ni),
    .req_i (sink_req),
    .rsp_o (sink_rsp)
  );

  assign ip_rsp_o.gnt     = allow_i ? mem_rsp_i.gnt : sink_rsp.gnt;
  assign ip_rsp_o.r_valid = sink_rsp.r_valid | mem_rsp_i.r_valid;
  assign ip_rsp_o.r_rdata = sink_rsp.r_valid ? sink_rsp.r_rdata : mem_rsp_i.r_rdata;

  assign done_o   = ip_req_i.req & ip_rsp_o.gnt;
  assign beats_o  = 9'd1;
  assign denied_o = ip_req_i.req & ~allow_i & sink_rsp.gnt;

  a_no_collision: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(sink_rsp.r_valid && mem_rsp_i.r_valid))
    else $error("dummy sink and memory answered in the same cycle");

endmodule
