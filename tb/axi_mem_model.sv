// axi_mem_model: behavioural AXI4 slave memory for testbenches.
// Accepts one write burst and one read burst at a time, with AWREADY,
// WREADY, ARREADY and RVALID gated by random stalls (READY_PCT percent).
// Supports FIXED, INCR and WRAP bursts of 32-bit beats. WORDS words, indexed
// by word address modulo WORDS, initialised to 32'hB700_0000 + index.
// n_aw / n_ar count accepted bursts, n_w the write beats it received.
module axi_mem_model
  import ddmpu_pkg::*;
#(
  parameter int unsigned WORDS     = 1024,
  parameter int unsigned READY_PCT = 70
) (
  input  logic     clk_i,
  input  axi_req_t req_i,
  output axi_rsp_t rsp_o
);
  logic [31:0] mem [WORDS];
  int unsigned n_aw = 0, n_ar = 0, n_w = 0;
  logic rnd_aw, rnd_w, rnd_ar, rnd_r;

  typedef enum {IDLE, DATA, RESP} st_e;
  st_e ws = IDLE, rs = IDLE;
  axi_ax_t wax, rax;
  int wbeat, rbeat;

  function automatic int beat_index(axi_ax_t ax, int beat);
    logic [31:0] bytes = 32'd1 << ax.size;
    logic [31:0] total = (32'(ax.len) + 1) * bytes;
    logic [31:0] a;
    case (ax.burst)
      AXI_BURST_FIXED: a = ax.addr;
      AXI_BURST_WRAP:  a = (ax.addr & ~(total - 1)) | ((ax.addr + 32'(beat) * bytes) & (total - 1));
      default:         a = ax.addr + 32'(beat) * bytes;
    endcase
    return int'((a >> 2) % WORDS);
  endfunction

  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'hB700_0000 + i;

  always @(negedge clk_i) begin
    rnd_aw = ($urandom_range(0, 99) < READY_PCT);
    rnd_w  = ($urandom_range(0, 99) < READY_PCT);
    rnd_ar = ($urandom_range(0, 99) < READY_PCT);
    rnd_r  = ($urandom_range(0, 99) < READY_PCT);
  end

  always_comb begin
    rsp_o          = '0;
    rsp_o.aw_ready = (ws == IDLE) && rnd_aw;
    rsp_o.w_ready  = (ws == DATA) && rnd_w;
    rsp_o.b_valid  = (ws == RESP);
    rsp_o.b.id     = wax.id;
    rsp_o.b.resp   = AXI_RESP_OKAY;
    rsp_o.ar_ready = (rs == IDLE) && rnd_ar;
    rsp_o.r_valid  = (rs == DATA) && rnd_r;
    rsp_o.r.id     = rax.id;
    rsp_o.r.data   = mem[beat_index(rax, rbeat)];
    rsp_o.r.resp   = AXI_RESP_OKAY;
    rsp_o.r.last   = (rbeat == int'(rax.len));
  end

  always @(posedge clk_i) begin
    case (ws)
      IDLE: if (req_i.aw_valid && rsp_o.aw_ready) begin wax <= req_i.aw; wbeat <= 0; ws <= DATA; n_aw++; end
      DATA: if (req_i.w_valid && rsp_o.w_ready) begin
        automatic int idx = beat_index(wax, wbeat);
        for (int b = 0; b < 4; b++) if (req_i.w.strb[b]) mem[idx][8*b +: 8] <= req_i.w.data[8*b +: 8];
        n_w++;
        wbeat <= wbeat + 1;
        if (req_i.w.last) ws <= RESP;
      end
      RESP: if (req_i.b_ready) ws <= IDLE;
      default: ws <= IDLE;
    endcase
    case (rs)
      IDLE: if (req_i.ar_valid && rsp_o.ar_ready) begin rax <= req_i.ar; rbeat <= 0; rs <= DATA; n_ar++; end
      DATA: if (rsp_o.r_valid && req_i.r_ready) begin
        if (rsp_o.r.last) rs <= IDLE;
        rbeat <= rbeat + 1;
      end
      default: rs <= IDLE;
    endcase
  end

  initial begin wax = '0; rax = '0; wbeat = 0; rbeat = 0; end
endmodule
