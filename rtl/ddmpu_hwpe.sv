// ddmpu_hwpe: DD-MPU instance protecting a hardware processing engine with
// one APB control port and N_PORTS TCDM data master ports (the MAC engine
// case: four ports, the first three only read, the last only writes).
//
// Detection side: an APB monitor watches the engine's control port and feeds
// a detection module with one trigger per data port. Port k's trigger takes
// the base address written to REG_BASE + k*REG_STRIDE and the length in bytes
// written to the register 4 bytes above. Protection side: one protection unit
// per data port holds a single DYN_ADDRESS_LENGTH rule (OUTSTANDING copies,
// READ_ONLY for ports 0..N_PORTS-2, WRITE_ONLY for the last) and optionally a
// rate limiter. Until the CPU has written a region for a port, every access
// of that port goes to the dummy sink.
// sec_en_set_i / sec_en_clr_i are the hard-wired secure-configuration enables
// of the port rules (the rules reset enabled). denied_o and limited_o flag,
// per port, requests answered by the dummy sink and requests held back only
// by the rate limit; overflow_o flags a lost rule update.
// Timing: a rule update is active in the third cycle after the APB handshake
// that wrote it; data requests pass to memory with no added cycle.
// The port count, the read/write split and the 3-cycle update latency follow
// the DD-MPU case study; the register map, OUTSTANDING and the rate-limit
// numbers are this design's choices (0xB0/0xC0 are the example addresses).
module ddmpu_hwpe
  import ddmpu_pkg::*;
#(
  parameter int unsigned       N_PORTS     = 4,
  parameter logic [7:0]        OUTSTANDING = 8'd2,
  parameter logic [ADDR_W-1:0] REG_BASE    = 32'hB0,
  parameter logic [ADDR_W-1:0] REG_STRIDE  = 32'h10,
  parameter bit                RL_ENABLE   = 1'b1,
  parameter int unsigned       RL_LIMIT    = 16,
  parameter int unsigned       RL_PERIOD   = 8,
  parameter int unsigned       RL_DEC      = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // monitored APB control bus of the engine
  input  logic              apb_psel_i,
  input  logic              apb_penable_i,
  input  logic              apb_pwrite_i,
  input  logic [ADDR_W-1:0] apb_paddr_i,
  input  logic [DATA_W-1:0] apb_pwdata_i,
  input  logic [DATA_W-1:0] apb_prdata_i,
  input  logic              apb_pready_i,
  // engine data ports
  input  tcdm_req_t         ip_req_i  [N_PORTS],
  output tcdm_rsp_t         ip_rsp_o  [N_PORTS],
  // memory side
  output tcdm_req_t         mem_req_o [N_PORTS],
  input  tcdm_rsp_t         mem_rsp_i [N_PORTS],
  // secure configuration
  input  logic [N_PORTS-1:0] sec_en_set_i,
  input  logic [N_PORTS-1:0] sec_en_clr_i,
  // status
  output logic [N_PORTS-1:0] denied_o,
  output logic [N_PORTS-1:0] limited_o,
  output logic [N_PORTS-1:0] overflow_o
);

  typedef logic [N_PORTS-1:0][ADDR_W-1:0] addr_arr_t;

  function automatic addr_arr_t reg_map(logic [ADDR_W-1:0] offset);
    addr_arr_t a;
    for (int k = 0; k < N_PORTS; k++) a[k] = REG_BASE + ADDR_W'(k) * REG_STRIDE + offset;
    return a;
  endfunction

  trace_t trace;
  det_t   det      [N_PORTS];
  logic   overflow [N_PORTS];

  apb_monitor u_monitor (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .apb_psel_i   (apb_psel_i),
    .apb_penable_i(apb_penable_i),
    .apb_pwrite_i (apb_pwrite_i),
    .apb_paddr_i  (apb_paddr_i),
    .apb_pwdata_i (apb_pwdata_i),
    .apb_prdata_i (apb_prdata_i),
    .apb_pready_i (apb_pready_i),
    .trace_o      (trace)
  );

  detection_module #(
    .N_PU     (N_PORTS),
    .ADDR_REGS(reg_map(32'h0)),
    .LEN_REGS (reg_map(32'h4)),
    .EN_REGS  (reg_map(32'h8)),
    .USE_ADDR ('1),
    .USE_LEN  ('1),
    .USE_EN   ('0)
  ) u_dm (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .trace_i   (trace),
    .det_o     (det),
    .overflow_o(overflow)
  );

  for (genvar k = 0; k < N_PORTS; k++) begin : g_pu
    localparam rule_cfg_t RULE = make_rule(32'h0, 32'h0, DEFAULT_ENABLED,
                                           (k == N_PORTS - 1) ? WRITE_ONLY : READ_ONLY,
                                           DYN_ADDRESS_LENGTH, OUTSTANDING);
    tcdm_protection_unit #(
      .N_RULES  (1),
      .RULES    (RULE),
      .RL_ENABLE(RL_ENABLE),
      .RL_LIMIT (RL_LIMIT),
      .RL_PERIOD(RL_PERIOD),
      .RL_DEC   (RL_DEC)
    ) u_pu (
      .clk_i       (clk_i),
      .rst_ni      (rst_ni),
      .det_i       (det[k]),
      .sec_en_set_i(sec_en_set_i[k]),
      .sec_en_clr_i(sec_en_clr_i[k]),
      .ip_req_i    (ip_req_i[k]),
      .ip_rsp_o    (ip_rsp_o[k]),
      .mem_req_o   (mem_req_o[k]),
      .mem_rsp_i   (mem_rsp_i[k]),
      .denied_o    (denied_o[k]),
      .limited_o   (limited_o[k])
    );
    assign overflow_o[k] = overflow[k];
  end

endmodule
