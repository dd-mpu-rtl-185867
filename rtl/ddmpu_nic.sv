// ddmpu_nic: DD-MPU instance for a network-controller-like IP with an APB
// configuration port and one AXI4 DMA master port.
//
// The CPU programs the controller by writing a packet-buffer pointer and a
// frame length into its control registers. The APB monitor sees these writes
// and a trigger turns a write to REG_PTR into an Address update and a write to
// REG_LEN into a Length update for the single DYN_ADDRESS_LENGTH rule
// (READ_WRITE, OUTSTANDING copies) of the AXI4 protection unit. The DMA may
// then read or write exactly the announced buffers; any other burst is
// completed by the AXI4 dummy sink. Since the buffers may lie anywhere in
// memory, no fixed rule could do this.
// Timing: a rule update is active in the third cycle after the APB handshake;
// AXI requests pass with no added cycle.
// Deriving the rule from the written pointer and frame length follows the
// DD-MPU description of this use; the register offsets, the AXI4 master port
// and the other numbers are this design's choices.
module ddmpu_nic
  import ddmpu_pkg::*;
#(
  parameter logic [ADDR_W-1:0] REG_PTR     = 32'h10,
  parameter logic [ADDR_W-1:0] REG_LEN     = 32'h14,
  parameter logic [7:0]        OUTSTANDING = 8'd2,
  parameter bit                RL_ENABLE   = 1'b1,
  parameter int unsigned       RL_LIMIT    = 16,
  parameter int unsigned       RL_PERIOD   = 8,
  parameter int unsigned       RL_DEC      = 4
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              apb_psel_i,
  input  logic              apb_penable_i,
  input  logic              apb_pwrite_i,
  input  logic [ADDR_W-1:0] apb_paddr_i,
  input  logic [DATA_W-1:0] apb_pwdata_i,
  input  logic [DATA_W-1:0] apb_prdata_i,
  input  logic              apb_pready_i,
  input  axi_req_t          ip_req_i,
  output axi_rsp_t          ip_rsp_o,
  output axi_req_t          mem_req_o,
  input  axi_rsp_t          mem_rsp_i,
  input  logic              sec_en_set_i,
  input  logic              sec_en_clr_i,
  output logic              denied_o,
  output logic              limited_o,
  output logic              overflow_o
);

  localparam rule_cfg_t RULE = make_rule(32'h0, 32'h0, DEFAULT_ENABLED, READ_WRITE,
                                         DYN_ADDRESS_LENGTH, OUTSTANDING);

  trace_t trace;
  det_t   det      [1];
  logic   overflow [1];

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
    .N_PU     (1),
    .ADDR_REGS(REG_PTR),
    .LEN_REGS (REG_LEN),
    .EN_REGS  (32'h0),
    .USE_ADDR (1'b1),
    .USE_LEN  (1'b1),
    .USE_EN   (1'b0)
  ) u_dm (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .trace_i   (trace),
    .det_o     (det),
    .overflow_o(overflow)
  );

  axi4_protection_unit #(
    .N_RULES  (1),
    .RULES    (RULE),
    .RL_ENABLE(RL_ENABLE),
    .RL_LIMIT (RL_LIMIT),
    .RL_PERIOD(RL_PERIOD),
    .RL_DEC   (RL_DEC)
  ) u_pu (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .det_i       (det[0]),
    .sec_en_set_i(sec_en_set_i),
    .sec_en_clr_i(sec_en_clr_i),
    .ip_req_i    (ip_req_i),
    .ip_rsp_o    (ip_rsp_o),
    .mem_req_o   (mem_req_o),
    .mem_rsp_i   (mem_rsp_i),
    .denied_o    (denied_o),
    .limited_o   (limited_o)
  );

  assign overflow_o = overflow[0];

endmodule
