// axi4_dummy_sink: protocol-compliant AXI4 slave that completes denied bursts
// without touching memory.
//
// Writes: it accepts one AW at a time, takes all of its W beats (discarding
// them) and then returns a B response with the burst's ID. Reads: it accepts
// one AR at a time and returns len+1 R beats with the burst's ID, all-zero
// data and RLAST on the final beat. Responses are OKAY, so the master
// finishes normally and learns nothing from the data. Read and write sides
// are independent. AW/AR ready are high only while the side is idle.
// Timing: B follows the cycle of the last W handshake; the first R beat
// follows the AR handshake by one cycle, then one beat per cycle while
// RREADY is high.
// Completing denied transfers with harmless responses follows the DD-MPU dummy
// sink; one-burst-at-a-time operation and the OKAY response are this design's
// choices.
module axi4_dummy_sink
  import ddmpu_pkg::*;
(
  input  logic     clk_i,
  input  logic     rst_ni,
  input  axi_req_t req_i,
  output axi_rsp_t rsp_o
);

  typedef enum logic [1:0] {W_IDLE, W_DATA, W_RESP} wstate_e;
  wstate_e             wstate_q;
  logic [AXI_ID_W-1:0] wid_q;

  logic                r_busy_q;
  logic [AXI_ID_W-1:0] rid_q;
  logic [7:0]          rleft_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      wstate_q <= W_IDLE;
      wid_q    <= '0;
    end else begin
      unique case (wstate_q)
        W_IDLE: if (req_i.aw_valid) begin
          wid_q    <= req_i.aw.id;
          wstate_q <= W_DATA;
        end
        W_DATA: if (req_i.w_valid && req_i.w.last) wstate_q <= W_RESP;
        W_RESP: if (req_i.b_ready) wstate_q <= W_IDLE;
        default: wstate_q <= W_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      r_busy_q <= 1'b0;
      rid_q    <= '0;
      rleft_q  <= '0;
    end else if (!r_busy_q) begin
      if (req_i.ar_valid) begin
        r_busy_q <= 1'b1;
        rid_q    <= req_i.ar.id;
        rleft_q  <= req_i.ar.len;
      end
    end else if (req_i.r_ready) begin
      if (rleft_q == '0) r_busy_q <= 1'b0;
      else               rleft_q  <= rleft_q - 1'b1;
    end
  end

  always_comb begin
    rsp_o          = '0;
    rsp_o.aw_ready = (wstate_q == W_IDLE);
    rsp_o.w_ready  = (wstate_q == W_DATA);
    rsp_o.b_valid  = (wstate_q == W_RESP);
    rsp_o.b.id     = wid_q;
    rsp_o.b.resp   = AXI_RESP_OKAY;
    rsp_o.ar_ready = !r_busy_q;
    rsp_o.r_valid  = r_busy_q;
    rsp_o.r.id     = rid_q;
    rsp_o.r.data   = '0;
    rsp_o.r.resp   = AXI_RESP_OKAY;
    rsp_o.r.last   = (rleft_q == '0);
  end

endmodule
