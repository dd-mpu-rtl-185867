// ddmpu_soc: the DD-MPU instances of an example SoC with two untrusted
// bus masters, each wrapped by its own DD-MPU (the "distributed" part: every
// IP gets a unit at its own ports, no central address decoder is involved).
//
//  - u_hwpe: the accelerator case (ddmpu_hwpe): APB control port monitored,
//    four TCDM data ports protected (three read-only, one write-only), each
//    port's region taken from the base/length the CPU writes to 0xB0+0x10*k
//    and 0xB4+0x10*k.
//  - u_nic:  a network-controller case (ddmpu_nic): APB control port
//    monitored, one AXI4 DMA port protected, its buffer region taken from the
//    pointer and frame length written to 0x10 and 0x14.
//  - u_static: a simple IP whose single APB master port needs only fixed,
//    MPU-like protection: one APB protection unit with N_STATIC_RULES static
//    READ_WRITE rules (rule i covers STATIC_BASE + i*STATIC_SIZE, STATIC_SIZE
//    bytes), no detection module and no trigger. Its rules can still be
//    switched by the hard-wired secure-configuration inputs.
//
// The CPU, the interconnect, the memories and the two IPs themselves are
// outside this module; their connections are the ports. All ports are plain
// signals and structs (see ddmpu_pkg for the TCDM and AXI4 bundles).
// Timing: rule updates take effect in the third cycle after the APB
// handshake; protected requests pass with no added cycle.
// The accelerator wrapper follows the DD-MPU case study; pairing it with a
// second, AXI4-mastering IP follows the document's network-controller example
// and its per-IP placement, with this design's register offsets. The
// static-only unit follows the single-port, static-rules configuration the
// scheme is also evaluated in; its APB port, region and rule count default
// are this design's choices.
module ddmpu_soc
  import ddmpu_pkg::*;
#(
  parameter int unsigned       N_HWPE_PORTS   = 4,
  parameter int unsigned       N_STATIC_RULES = 1,
  parameter logic [ADDR_W-1:0] STATIC_BASE    = 32'h1A10_0000,
  parameter logic [LEN_W-1:0]  STATIC_SIZE    = 32'h0000_1000
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // accelerator: monitored APB control bus
  input  logic              hwpe_apb_psel_i,
  input  logic              hwpe_apb_penable_i,
  input  logic              hwpe_apb_pwrite_i,
  input  logic [ADDR_W-1:0] hwpe_apb_paddr_i,
  input  logic [DATA_W-1:0] hwpe_apb_pwdata_i,
  input  logic [DATA_W-1:0] hwpe_apb_prdata_i,
  input  logic              hwpe_apb_pready_i,
  // accelerator: TCDM data ports, IP side and memory side
  input  tcdm_req_t         hwpe_ip_req_i  [N_HWPE_PORTS],
  output tcdm_rsp_t         hwpe_ip_rsp_o  [N_HWPE_PORTS],
  output tcdm_req_t         hwpe_mem_req_o [N_HWPE_PORTS],
  input  tcdm_rsp_t         hwpe_mem_rsp_i [N_HWPE_PORTS],
  input  logic [N_HWPE_PORTS-1:0] hwpe_sec_en_set_i,
  input  logic [N_HWPE_PORTS-1:0] hwpe_sec_en_clr_i,
  output logic [N_HWPE_PORTS-1:0] hwpe_denied_o,
  output logic [N_HWPE_PORTS-1:0] hwpe_limited_o,
  output logic [N_HWPE_PORTS-1:0] hwpe_overflow_o,
  // network controller: monitored APB control bus
  input  logic              nic_apb_psel_i,
  input  logic              nic_apb_penable_i,
  input  logic              nic_apb_pwrite_i,
  input  logic [ADDR_W-1:0] nic_apb_paddr_i,
  input  logic [DATA_W-1:0] nic_apb_pwdata_i,
  input  logic [DATA_W-1:0] nic_apb_prdata_i,
  input  logic              nic_apb_pready_i,
  // network controller: AXI4 DMA port, IP side and memory side
  input  axi_req_t          nic_ip_req_i,
  output axi_rsp_t          nic_ip_rsp_o,
  output axi_req_t          nic_mem_req_o,
  input  axi_rsp_t          nic_mem_rsp_i,
  input  logic              nic_sec_en_set_i,
  input  logic              nic_sec_en_clr_i,
  output logic              nic_denied_o,
  output logic              nic_limited_o,
  output logic              nic_overflow_o,
  // static-rules IP: APB master port, IP side and memory side
  input  apb_req_t          st_ip_req_i,
  output apb_rsp_t          st_ip_rsp_o,
  output apb_req_t          st_mem_req_o,
  input  apb_rsp_t          st_mem_rsp_i,
  input  logic [N_STATIC_RULES-1:0] st_sec_en_set_i,
  input  logic [N_STATIC_RULES-1:0] st_sec_en_clr_i,
  output logic              st_denied_o,
  output logic              st_limited_o
);

  function automatic rule_cfg_t [N_STATIC_RULES-1:0] static_rules();
    rule_cfg_t [N_STATIC_RULES-1:0] r;
    for (int i = 0; i < N_STATIC_RULES; i++)
      r[i] = make_rule(STATIC_BASE + ADDR_W'(i) * STATIC_SIZE, STATIC_SIZE, DEFAULT_ENABLED,
                       READ_WRITE, DYN_NONE, 8'd1);
    return r;
  endfunction

  ddmpu_hwpe #(.N_PORTS(N_HWPE_PORTS)) u_hwpe (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .apb_psel_i   (hwpe_apb_psel_i),
    .apb_penable_i(hwpe_apb_penable_i),
    .apb_pwrite_i (hwpe_apb_pwrite_i),
    .apb_paddr_i  (hwpe_apb_paddr_i),
    .apb_pwdata_i (hwpe_apb_pwdata_i),
    .apb_prdata_i (hwpe_apb_prdata_i),
    .apb_pready_i (hwpe_apb_pready_i),
    .ip_req_i     (hwpe_ip_req_i),
    .ip_rsp_o     (hwpe_ip_rsp_o),
    .mem_req_o    (hwpe_mem_req_o),
    .mem_rsp_i    (hwpe_mem_rsp_i),
    .sec_en_set_i (hwpe_sec_en_set_i),
    .sec_en_clr_i (hwpe_sec_en_clr_i),
    .denied_o     (hwpe_denied_o),
    .limited_o    (hwpe_limited_o),
    .overflow_o   (hwpe_overflow_o)
  );

  ddmpu_nic u_nic (
    .clk_i        (clk_i),
    .rst_ni       (rst_ni),
    .apb_psel_i   (nic_apb_psel_i),
    .apb_penable_i(nic_apb_penable_i),
    .apb_pwrite_i (nic_apb_pwrite_i),
    .apb_paddr_i  (nic_apb_paddr_i),
    .apb_pwdata_i (nic_apb_pwdata_i),
    .apb_prdata_i (nic_apb_prdata_i),
    .apb_pready_i (nic_apb_pready_i),
    .ip_req_i     (nic_ip_req_i),
    .ip_rsp_o     (nic_ip_rsp_o),
    .mem_req_o    (nic_mem_req_o),
    .mem_rsp_i    (nic_mem_rsp_i),
    .sec_en_set_i (nic_sec_en_set_i),
    .sec_en_clr_i (nic_sec_en_clr_i),
    .denied_o     (nic_denied_o),
    .limited_o    (nic_limited_o),
    .overflow_o   (nic_overflow_o)
  );

  apb_protection_unit #(
    .N_RULES(N_STATIC_RULES),
    .RULES  (static_rules())
  ) u_static (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .det_i       ('0),
    .sec_en_set_i(st_sec_en_set_i),
    .sec_en_clr_i(st_sec_en_clr_i),
    .ip_req_i    (st_ip_req_i),
    .ip_rsp_o    (st_ip_rsp_o),
    .mem_req_o   (st_mem_req_o),
    .mem_rsp_i   (st_mem_rsp_i),
    .denied_o    (st_denied_o),
    .limited_o   (st_limited_o)
  );

endmodule
