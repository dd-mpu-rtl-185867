// axi4_protection_unit: protection unit for one AXI4 (or AXI4-Lite) master
// port of an untrusted IP.
//
// It sits between the IP's AXI4 master port and the memory interconnect and
// combines the AXI4 bus adapter (with dummy sink) and the protocol-independent
// decision logic. A burst whose whole byte range matches at least one
// enabled rule, while the transfer counter is below its limit, is passed to
// memory unchanged and without added latency; any other burst is completed by
// the AXI4 dummy sink. The rate limiter counts data beats, added when the
// burst's address is accepted.
// det_i is the channel from the detection module that updates the dynamic
// rules; sec_en_set_i / sec_en_clr_i are the hard-wired secure-configuration
// enables of each rule.
// The structure follows the DD-MPU protection unit; the AXI4 details are this
// design's.
module axi4_protection_unit
  import ddmpu_pkg::*;
#(
  parameter int unsigned             N_RULES   = 1,
  parameter rule_cfg_t [N_RULES-1:0] RULES     = {make_rule(32'h0, 32'h60, DEFAULT_DISABLED,
                                                            WRITE_ONLY, DYN_ADDRESS, 8'd2)},
  parameter bit                      RL_ENABLE = 1'b1,
  parameter int unsigned             RL_LIMIT  = 16,
  parameter int unsigned             RL_PERIOD = 8,
  parameter int unsigned             RL_DEC    = 4
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  det_t               det_i,
  input  logic [N_RULES-1:0] sec_en_set_i,
  input  logic [N_RULES-1:0] sec_en_clr_i,
  input  axi_req_t          ip_req_i,
  output axi_rsp_t          ip_rsp_o,
  output axi_req_t          mem_req_o,
  input  axi_rsp_t          mem_rsp_i,
  output logic               denied_o,
  output logic               limited_o
);

  xfer_t              xfer;
  logic               allow, done, below;
  logic [8:0]         beats;
  logic [N_RULES-1:0] match;

  axi4_adapter u_adapter (
    .clk_i    (clk_i),
    .rst_ni   (rst_ni),
    .ip_req_i (ip_req_i),
    .ip_rsp_o (ip_rsp_o),
    .mem_req_o(mem_req_o),
    .mem_rsp_i(mem_rsp_i),
    .xfer_o   (xfer),
    .allow_i  (allow),
    .done_o   (done),
    .beats_o  (beats),
    .denied_o (denied_o)
  );

  pu_core #(
    .N_RULES  (N_RULES),
    .RULES    (RULES),
    .RL_ENABLE(RL_ENABLE),
    .RL_LIMIT (RL_LIMIT),
    .RL_PERIOD(RL_PERIOD),
    .RL_DEC   (RL_DEC)
  ) u_core (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .det_i        (det_i),
    .sec_en_set_i (sec_en_set_i),
    .sec_en_clr_i (sec_en_clr_i),
    .xfer_i       (xfer),
    .done_i       (done),
    .beats_i      (beats),
    .allow_o      (allow),
    .match_o      (match),
    .below_limit_o(below)
  );

  // A request checked while only the rate limit holds it back.
  assign limited_o = (ip_req_i.aw_valid | ip_req_i.ar_valid) & (|match) & ~below;

endmodule
