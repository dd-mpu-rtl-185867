// apb_adapter: APB bus adapter, output multiplexer and dummy sink of a
// protection unit on an APB master port.
//
// It turns the IP's APB transfer into the protocol-independent transfer
// description (address, length = one DATA_W word, write flag) and steers the
// transfer with the decision allow_i. The decision is taken in the setup
// phase (psel high, penable low) and registered, so the access phase that
// follows goes to the same side even if a rule changes in between: an allowed
// transfer is passed to the memory side unchanged in both phases, and the
// memory's pready, prdata and pslverr are returned. A denied transfer never
// appears on the memory side (all fields zero); the built-in dummy sink
// completes its access phase at once with pready high, prdata zero and
// pslverr low, so the IP neither stalls nor learns anything.
// done_o marks a setup phase (the point where a transfer is judged, counted
// once), beats_o is 1 and denied_o marks a setup phase sent to the sink.
// Timing: combinational from the IP to the memory side; a denied transfer
// takes the minimum two cycles.
// Adapter, multiplexer and dummy sink follow the DD-MPU protection unit; the
// APB4 signal set, the setup-phase decision and the error-free sink response
// are this design's choices.
module apb_adapter
  import ddmpu_pkg::*;
(
  input  logic       clk_i,
  input  logic       rst_ni,
  input  apb_req_t   ip_req_i,
  output apb_rsp_t   ip_rsp_o,
  output apb_req_t   mem_req_o,
  input  apb_rsp_t   mem_rsp_i,
  output xfer_t      xfer_o,
  input  logic       allow_i,
  output logic       done_o,
  output logic [8:0] beats_o,
  output logic       denied_o
);

  logic setup, access, dec_q, to_mem;

  assign setup  = ip_req_i.psel & ~ip_req_i.penable;
  assign access = ip_req_i.psel & ip_req_i.penable;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)    dec_q <= 1'b0;
    else if (setup) dec_q <= allow_i;
  end

  assign to_mem = setup ? allow_i : dec_q;

  assign xfer_o.addr  = ip_req_i.paddr;
  assign xfer_o.len   = LEN_W'(DATA_W / 8);
  assign xfer_o.write = ip_req_i.pwrite;

  assign mem_req_o = (ip_req_i.psel && to_mem) ? ip_req_i : '0;

  always_comb begin
    ip_rsp_o = '0;
    if (access) begin
      if (dec_q) ip_rsp_o = mem_rsp_i;
      else       ip_rsp_o.pready = 1'b1;   // dummy sink
    end
  end

  assign done_o   = setup;
  assign beats_o  = 9'd1;
  assign denied_o = setup & ~allow_i;

  // APB: an access phase always follows a setup phase of the same transfer.
  a_setup_before_access: assert property (@(posedge clk_i) disable iff (!rst_ni)
    setup |=> access)
    else $error("APB setup phase not followed by an access phase");

endmodule
