// ddmpu_pkg: types and constants shared by the DD-MPU blocks.
//
// The rule configuration enums mirror the rule grammar of the DD-MPU: a rule
// has a start address, a length, an enable configuration, an allowed
// direction, a choice of which fields are updated at run time, and a number
// of outstanding copies. rule_cfg_t bundles them so a protection unit can take
// its rule list as one packed-array parameter. trace_t is the
// protocol-independent record the bus monitor extracts from the monitored
// configuration bus; det_t is what a trigger hands to a protection unit
// (an Address, Length or Enable value, or nothing). tcdm_req_t / tcdm_rsp_t,
// apb_req_t / apb_rsp_t and the axi_* bundles carry the master port of the
// protected IP for the three bus protocols.
// The enum names follow the grammar; their encodings, the 32-bit widths and
// the bus field sets are this design's choices.
package ddmpu_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned LEN_W  = 32;

  typedef enum logic [1:0] {
    DEFAULT_DISABLED = 2'd0,
    DEFAULT_ENABLED  = 2'd1,
    ALWAYS_ENABLED   = 2'd2
  } rule_config_e;

  typedef enum logic [1:0] {
    READ_WRITE = 2'd0,
    WRITE_ONLY = 2'd1,
    READ_ONLY  = 2'd2
  } rule_dir_e;

  typedef enum logic [2:0] {
    DYN_NONE           = 3'd0,
    DYN_ADDRESS        = 3'd1,
    DYN_LENGTH         = 3'd2,
    DYN_ADDRESS_LENGTH = 3'd3,
    DYN_ENABLE         = 3'd4
  } rule_dyn_e;

  typedef struct packed {
    logic [ADDR_W-1:0] start_addr;
    logic [LEN_W-1:0]  length;      // bytes
    rule_config_e      configuration;
    rule_dir_e         direction;
    rule_dyn_e         is_dynamic;
    logic [7:0]        outstanding; // number of copies, at least 1
  } rule_cfg_t;

  // Record of one transfer seen on the monitored bus.
  typedef struct packed {
    logic              valid;
    logic              write;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [LEN_W-1:0]  len;
  } trace_t;

  typedef enum logic [1:0] {
    DET_INVALID = 2'd0,
    DET_ADDRESS = 2'd1,
    DET_LENGTH  = 2'd2,
    DET_ENABLE  = 2'd3
  } det_kind_e;

  // Value handed from a trigger to the rules of a protection unit.
  typedef struct packed {
    det_kind_e         kind;
    logic [DATA_W-1:0] value;
  } det_t;

  localparam int unsigned DET_W = $bits(det_t);

  // Protocol-independent transfer description checked by a protection unit.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
    logic              write;
  } xfer_t;

  typedef struct packed {
    logic              req;
    logic              we;      // 1: write, 0: read
    logic [ADDR_W-1:0] addr;
    logic [DATA_W/8-1:0] be;
    logic [DATA_W-1:0] wdata;
  } tcdm_req_t;

  typedef struct packed {
    logic              gnt;
    logic              r_valid;
    logic [DATA_W-1:0] r_rdata;
  } tcdm_rsp_t;

  // APB master port of a protected IP (APB4 signal set, without pprot).
  typedef struct packed {
    logic                psel;
    logic                penable;
    logic                pwrite;
    logic [ADDR_W-1:0]   paddr;
    logic [DATA_W-1:0]   pwdata;
    logic [DATA_W/8-1:0] pstrb;
  } apb_req_t;

  typedef struct packed {
    logic              pready;
    logic [DATA_W-1:0] prdata;
    logic              pslverr;
  } apb_rsp_t;

  // AXI4 (AXI4-Lite is the case len = 0, size = word) channel payloads and
  // the request/response bundles of one AXI4 port.
  localparam int unsigned AXI_ID_W = 4;

  typedef enum logic [1:0] {
    AXI_BURST_FIXED = 2'b00,
    AXI_BURST_INCR  = 2'b01,
    AXI_BURST_WRAP  = 2'b10
  } axi_burst_e;

  typedef enum logic [1:0] {
    AXI_RESP_OKAY   = 2'b00,
    AXI_RESP_EXOKAY = 2'b01,
    AXI_RESP_SLVERR = 2'b10,
    AXI_RESP_DECERR = 2'b11
  } axi_resp_e;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [ADDR_W-1:0]   addr;
    logic [7:0]          len;    // beats - 1
    logic [2:0]          size;   // log2(bytes per beat)
    axi_burst_e          burst;
  } axi_ax_t;

  typedef struct packed {
    logic [DATA_W-1:0]   data;
    logic [DATA_W/8-1:0] strb;
    logic                last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    axi_resp_e           resp;
  } axi_b_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    logic [DATA_W-1:0]   data;
    axi_resp_e           resp;
    logic                last;
  } axi_r_t;

  typedef struct packed {
    axi_ax_t aw;
    logic    aw_valid;
    axi_w_t  w;
    logic    w_valid;
    logic    b_ready;
    axi_ax_t ar;
    logic    ar_valid;
    logic    r_ready;
  } axi_req_t;

  typedef struct packed {
    logic    aw_ready;
    logic    w_ready;
    axi_b_t  b;
    logic    b_valid;
    logic    ar_ready;
    axi_r_t  r;
    logic    r_valid;
  } axi_rsp_t;

  // Byte range [addr, addr+len) touched by an AXI4 burst.
  function automatic xfer_t axi_xfer(axi_ax_t ax, logic write);
    xfer_t x;
    logic [LEN_W-1:0] beat, total;
    beat  = LEN_W'(1) << ax.size;
    total = (LEN_W'(ax.len) + 1) << ax.size;
    x.write = write;
    unique case (ax.burst)
      AXI_BURST_FIXED: begin x.addr = ax.addr & ~(beat - 1); x.len = beat; end
      AXI_BURST_WRAP:  begin x.addr = ax.addr & ~(total - 1); x.len = total; end
      default:         begin x.addr = ax.addr & ~(beat - 1); x.len = total; end
    endcase
    return x;
  endfunction

  function automatic rule_cfg_t make_rule(logic [ADDR_W-1:0] start_addr,
                                          logic [LEN_W-1:0] length,
                                          rule_config_e configuration,
                                          rule_dir_e direction,
                                          rule_dyn_e is_dynamic,
                                          logic [7:0] outstanding);
    rule_cfg_t r;
    r.start_addr    = start_addr;
    r.length        = length;
    r.configuration = configuration;
    r.direction     = direction;
    r.is_dynamic    = is_dynamic;
    r.outstanding   = outstanding;
    return r;
  endfunction

endpackage
