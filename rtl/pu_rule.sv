// pu_rule: one firewall rule of a protection unit.
//
// A transfer (address, length in bytes, read/write) matches the rule when the
// rule is enabled, the direction is allowed (READ_ONLY, WRITE_ONLY or
// READ_WRITE) and the byte range [addr, addr+len) lies inside
// [start, start+length). The bounds are compared one bit wider, so a range
// that wraps around the address space never matches.
//
// Dynamic fields: with DYN_ADDRESS / DYN_LENGTH / DYN_ADDRESS_LENGTH the
// start address and/or length are overwritten by Address / Length values from
// the detection module; with DYN_ENABLE an Enable value (bit 0) switches the
// rule on or off. Outstanding transfers: the rule is held in N = outstanding
// copies. Each update goes to the next copy in round-robin order and a copy
// becomes valid with its first update, so regions of transfers still in
// flight stay allowed while new ones are added. With one copy the rule starts
// valid with its static start/length. For DYN_ADDRESS_LENGTH an Address value
// starts a new copy (its length reset to the static length) and a Length
// value completes the copy last started.
//
// Enable state: DEFAULT_DISABLED resets to off, DEFAULT_ENABLED to on,
// ALWAYS_ENABLED cannot be switched off. sec_en_set_i / sec_en_clr_i are the
// hard-wired secure-configuration signals that enable or disable the rule;
// clear wins over set, and both win over an Enable value in the same cycle.
//
// Timing: det_i is taken at the clock edge, so an update seen in cycle t is
// used for matching from cycle t+1. match_o is combinational in xfer_i.
// The rule fields, their meaning and round-robin outstanding copies follow the
// DD-MPU description; the slot-start policy for address+length updates and
// the set/clear priority are this design's choices.
module pu_rule
  import ddmpu_pkg::*;
#(
  parameter rule_cfg_t RULE = make_rule(32'h0, 32'h60, DEFAULT_DISABLED,
                                        WRITE_ONLY, DYN_ADDRESS, 8'd2)
) (
  input  logic  clk_i,
  input  logic  rst_ni,
  input  det_t  det_i,
  input  logic  sec_en_set_i,
  input  logic  sec_en_clr_i,
  input  xfer_t xfer_i,
  output logic  match_o,
  output logic  enabled_o
);

  localparam int unsigned N  = (RULE.outstanding == 8'd0) ? 1 : int'(RULE.outstanding);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  localparam bit DYN_A = (RULE.is_dynamic == DYN_ADDRESS) || (RULE.is_dynamic == DYN_ADDRESS_LENGTH);
  localparam bit DYN_L = (RULE.is_dynamic == DYN_LENGTH)  || (RULE.is_dynamic == DYN_ADDRESS_LENGTH);
  localparam bit DYN_E = (RULE.is_dynamic == DYN_ENABLE);
  localparam bit SLOT_RESET_VALID = (N == 1) || !(DYN_A || DYN_L);

  logic [ADDR_W-1:0] start_q [N];
  logic [LEN_W-1:0]  len_q   [N];
  logic [N-1:0]      valid_q;
  logic [PW-1:0]     ptr_q;    // copy written last
  logic              en_q;
  logic [PW-1:0]     ptr_next;

  assign ptr_next = (ptr_q == PW'(N - 1)) ? '0 : ptr_q + 1'b1;

  // Round-robin update of the copies.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < N; i++) begin
        start_q[i] <= RULE.start_addr;
        len_q[i]   <= RULE.length;
      end
      valid_q <= SLOT_RESET_VALID ? '1 : '0;
      ptr_q   <= PW'(N - 1);
    end else begin
      if (DYN_A && det_i.kind == DET_ADDRESS) begin
        start_q[ptr_next] <= det_i.value;
        if (DYN_L) len_q[ptr_next] <= RULE.length;
        valid_q[ptr_next] <= 1'b1;
        ptr_q             <= ptr_next;
      end else if (DYN_L && det_i.kind == DET_LENGTH) begin
        if (DYN_A) begin
          len_q[ptr_q]   <= det_i.value;
          valid_q[ptr_q] <= 1'b1;
        end else begin
          len_q[ptr_next]   <= det_i.value;
          valid_q[ptr_next] <= 1'b1;
          ptr_q             <= ptr_next;
        end
      end
    end
  end

  // Enable state.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      en_q <= (RULE.configuration != DEFAULT_DISABLED);
    end else if (RULE.configuration != ALWAYS_ENABLED) begin
      if (sec_en_clr_i)      en_q <= 1'b0;
      else if (sec_en_set_i) en_q <= 1'b1;
      else if (DYN_E && det_i.kind == DET_ENABLE) en_q <= det_i.value[0];
    end
  end

  assign enabled_o = (RULE.configuration == ALWAYS_ENABLED) ? 1'b1 : en_q;

  logic dir_ok;
  always_comb begin
    unique case (RULE.direction)
      WRITE_ONLY: dir_ok = xfer_i.write;
      READ_ONLY:  dir_ok = !xfer_i.write;
      default:    dir_ok = 1'b1;
    endcase
  end

  logic [N-1:0] in_range;
  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic [ADDR_W:0] lo, hi, xlo, xhi;
      lo  = {1'b0, start_q[i]};
      hi  = {1'b0, start_q[i]} + {1'b0, len_q[i]};
      xlo = {1'b0, xfer_i.addr};
      xhi = {1'b0, xfer_i.addr} + {1'b0, xfer_i.len};
      in_range[i] = valid_q[i] && (xlo >= lo) && (xhi <= hi);
    end
  end

  assign match_o = enabled_o && dir_ok && (|in_range);

endmodule
