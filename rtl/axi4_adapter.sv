// axi4_adapter: AXI4 bus adapter and router of a protection unit.
//
// Address check: AW and AR requests share the one decision input. When both
// are valid they are served alternately; a request that is not accepted in
// the cycle it is checked keeps its turn and its decision (registered) until
// its handshake, so the valid/payload seen downstream stays stable as AXI
// requires. The checked byte range is the one the burst touches: for INCR
// (len+1)*2^size bytes from the beat-aligned address, for WRAP the aligned
// wrap container, for FIXED one beat. Allowed bursts go to the memory port,
// denied ones to an AXI4 dummy sink.
// Ordering: all bursts in flight in one direction go to a single destination.
// A burst for the other destination waits until the outstanding ones (counted
// from address handshake to B response / last R beat) have completed, so the
// B and R responses need no reordering and keep AXI ID order. W beats follow
// the destination of the writes in flight and wait while none is.
// done_o marks an address handshake (either direction), with beats_o the
// burst's number of data beats, and denied_o one that went to the sink. Timing: no register on the forward path; the check adds
// only combinational delay to AW/AR. Up to 2^CNT_W - 1 bursts may be in flight
// per direction.
// Adapter, multiplexer and dummy sink follow the DD-MPU protection unit; the
// arbitration, the single-destination ordering rule and the burst range
// formula are this design's choices.
module axi4_adapter
  import ddmpu_pkg::*;
#(
  parameter int unsigned CNT_W = 4
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  input  axi_req_t ip_req_i,
  output axi_rsp_t ip_rsp_o,
  output axi_req_t mem_req_o,
  input  axi_rsp_t mem_rsp_i,
  output xfer_t    xfer_o,
  input  logic     allow_i,
  output logic     done_o,
  output logic [8:0] beats_o,
  output logic     denied_o
);

  axi_req_t sink_req;
  axi_rsp_t sink_rsp;

  axi4_dummy_sink u_sink (
    .clk_i (clk_i),
    .rst_ni(rst_ni),
    .req_i (sink_req),
    .rsp_o (sink_rsp)
  );

  // ---------------- address arbitration and decision ----------------
  logic       lock_q, lock_sel_q, lock_dec_q;  // sel: 1 = write (AW)
  logic       rr_q;                             // next preferred: 1 = AW
  logic       sel_w, dec, any;
  logic [CNT_W-1:0] wr_mem_q, wr_sink_q, rd_mem_q, rd_sink_q;

  always_comb begin
    any = ip_req_i.aw_valid | ip_req_i.ar_valid;
    if (lock_q)                                   sel_w = lock_sel_q;
    else if (ip_req_i.aw_valid && ip_req_i.ar_valid) sel_w = rr_q;
    else                                          sel_w = ip_req_i.aw_valid;
  end

  assign xfer_o = sel_w ? axi_xfer(ip_req_i.aw, 1'b1) : axi_xfer(ip_req_i.ar, 1'b0);
  assign dec    = lock_q ? lock_dec_q : allow_i;

  // The selected request may go out only when no burst of the same direction
  // is in flight to the other destination.
  logic go;
  always_comb begin
    if (sel_w) go = dec ? (wr_sink_q == '0) : (wr_mem_q == '0);
    else       go = dec ? (rd_sink_q == '0) : (rd_mem_q == '0);
    // keep headroom in the counters
    if (sel_w) go = go & ~(&wr_mem_q) & ~(&wr_sink_q);
    else       go = go & ~(&rd_mem_q) & ~(&rd_sink_q);
  end

  logic aw_out, ar_out, aw_hs, ar_hs;
  assign aw_out = any && sel_w  && go && ip_req_i.aw_valid;
  assign ar_out = any && !sel_w && go && ip_req_i.ar_valid;

  // ---------------- forward channels ----------------
  // W beats go where the accepted bursts still missing data went; B comes
  // from the destination of the writes in flight.
  logic [CNT_W-1:0] wd_mem_q, wd_sink_q;
  logic w_to_mem, w_to_sink, b_from_sink;
  assign w_to_mem    = (wd_mem_q  != '0);
  assign w_to_sink   = (wd_sink_q != '0);
  assign b_from_sink = (wr_sink_q != '0);

  always_comb begin
    mem_req_o  = '0;
    sink_req   = '0;
    // AW
    mem_req_o.aw = ip_req_i.aw;
    sink_req.aw  = ip_req_i.aw;
    mem_req_o.aw_valid = aw_out &&  dec;
    sink_req.aw_valid  = aw_out && !dec;
    // AR
    mem_req_o.ar = ip_req_i.ar;
    sink_req.ar  = ip_req_i.ar;
    mem_req_o.ar_valid = ar_out &&  dec;
    sink_req.ar_valid  = ar_out && !dec;
    // W: data only toward memory when memory owns the writes in flight
    if (w_to_mem) begin
      mem_req_o.w       = ip_req_i.w;
      mem_req_o.w_valid = ip_req_i.w_valid;
    end
    sink_req.w       = ip_req_i.w;
    sink_req.w_valid = w_to_sink && ip_req_i.w_valid;
    mem_req_o.b_ready = ip_req_i.b_ready && !b_from_sink;
    sink_req.b_ready  = ip_req_i.b_ready && b_from_sink;
    mem_req_o.r_ready = ip_req_i.r_ready && (rd_sink_q == '0);
    sink_req.r_ready  = ip_req_i.r_ready && (rd_sink_q != '0);
    // memory side sees nothing of a denied burst's address
    if (!mem_req_o.aw_valid) mem_req_o.aw = '0;
    if (!mem_req_o.ar_valid) mem_req_o.ar = '0;
  end

  // ---------------- backward channels ----------------
  always_comb begin
    ip_rsp_o = '0;
    ip_rsp_o.aw_ready = aw_out && (dec ? mem_rsp_i.aw_ready : sink_rsp.aw_ready);
    ip_rsp_o.ar_ready = ar_out && (dec ? mem_rsp_i.ar_ready : sink_rsp.ar_ready);
    ip_rsp_o.w_ready  = w_to_mem ? mem_rsp_i.w_ready : (w_to_sink && sink_rsp.w_ready);
    if (b_from_sink) begin
      ip_rsp_o.b       = sink_rsp.b;
      ip_rsp_o.b_valid = sink_rsp.b_valid;
    end else begin
      ip_rsp_o.b       = mem_rsp_i.b;
      ip_rsp_o.b_valid = mem_rsp_i.b_valid;
    end
    if (rd_sink_q != '0) begin
      ip_rsp_o.r       = sink_rsp.r;
      ip_rsp_o.r_valid = sink_rsp.r_valid;
    end else begin
      ip_rsp_o.r       = mem_rsp_i.r;
      ip_rsp_o.r_valid = mem_rsp_i.r_valid;
    end
  end

  assign aw_hs    = ip_req_i.aw_valid && ip_rsp_o.aw_ready;
  assign ar_hs    = ip_req_i.ar_valid && ip_rsp_o.ar_ready;
  assign done_o   = aw_hs | ar_hs;
  assign beats_o  = 9'(sel_w ? ip_req_i.aw.len : ip_req_i.ar.len) + 9'd1;
  assign denied_o = done_o & ~dec;

  logic b_hs, rlast_hs, wlast_hs;
  assign b_hs     = ip_rsp_o.b_valid && ip_req_i.b_ready;
  assign wlast_hs = ip_req_i.w_valid && ip_rsp_o.w_ready && ip_req_i.w.last;
  assign rlast_hs = ip_rsp_o.r_valid && ip_req_i.r_ready && ip_rsp_o.r.last;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      lock_q     <= 1'b0;
      lock_sel_q <= 1'b0;
      lock_dec_q <= 1'b0;
      rr_q       <= 1'b0;
      wr_mem_q   <= '0;
      wr_sink_q  <= '0;
      rd_mem_q   <= '0;
      rd_sink_q  <= '0;
      wd_mem_q   <= '0;
      wd_sink_q  <= '0;
    end else begin
      // hold the choice and decision of a request that has been presented
      // downstream but not yet accepted
      if ((aw_out && !aw_hs) || (ar_out && !ar_hs)) begin
        lock_q     <= 1'b1;
        lock_sel_q <= sel_w;
        lock_dec_q <= dec;
      end else if (aw_hs || ar_hs) begin
        lock_q <= 1'b0;
      end
      if (aw_hs || ar_hs) rr_q <= ~sel_w;
      // bursts in flight per direction and destination
      wr_mem_q  <= wr_mem_q  + CNT_W'(aw_hs &&  dec) - CNT_W'(b_hs && !b_from_sink);
      wr_sink_q <= wr_sink_q + CNT_W'(aw_hs && !dec) - CNT_W'(b_hs &&  b_from_sink);
      wd_mem_q  <= wd_mem_q  + CNT_W'(aw_hs &&  dec) - CNT_W'(wlast_hs && w_to_mem);
      wd_sink_q <= wd_sink_q + CNT_W'(aw_hs && !dec) - CNT_W'(wlast_hs && !w_to_mem);
      rd_mem_q  <= rd_mem_q  + CNT_W'(ar_hs &&  dec) - CNT_W'(rlast_hs && (rd_sink_q == '0));
      rd_sink_q <= rd_sink_q + CNT_W'(ar_hs && !dec) - CNT_W'(rlast_hs && (rd_sink_q != '0));
    end
  end

  a_aw_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    mem_req_o.aw_valid && !mem_rsp_i.aw_ready |=> mem_req_o.aw_valid)
    else $error("AW valid to memory dropped before its handshake");
  a_ar_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    mem_req_o.ar_valid && !mem_rsp_i.ar_ready |=> mem_req_o.ar_valid)
    else $error("AR valid to memory dropped before its handshake");
  a_one_dest_w: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(wr_mem_q != '0 && wr_sink_q != '0))
    else $error("writes in flight to both destinations");
  a_one_dest_r: assert property (@(posedge clk_i) disable iff (!rst_ni)
    !(rd_mem_q != '0 && rd_sink_q != '0))
    else $error("reads in flight to both destinations");

endmodule
