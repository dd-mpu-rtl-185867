// pu_core: protocol-independent decision logic of a protection unit.
//
// The transfer description from the bus adapter (address, length, direction)
// is checked against N_RULES rules in parallel; the transfer is allowed when
// at least one rule matches (OR) and, with rate limiting on, the transfer
// counter is below its limit (AND). Every handshake the adapter reports while
// allow_o is high (i.e. a transfer forwarded to memory) is counted by the
// rate limiter with its number of data beats (beats_i). All rules listen to the same detection channel det_i and each
// takes the update kinds its configuration names.
// Timing: allow_o is combinational in xfer_i; rule updates and the counter
// act from the cycle after det_i / done_i.
// The OR/AND structure, the rule list and the optional transfer counter follow
// the DD-MPU protection unit; the rate-limit numbers are this design's.
module pu_core
  import ddmpu_pkg::*;
#(
  parameter int unsigned                N_RULES   = 1,
  parameter rule_cfg_t [N_RULES-1:0]    RULES     = {make_rule(32'h0, 32'h60, DEFAULT_DISABLED,
                                                               WRITE_ONLY, DYN_ADDRESS, 8'd2)},
  parameter bit                         RL_ENABLE = 1'b1,
  parameter int unsigned                RL_LIMIT  = 16,
  parameter int unsigned                RL_PERIOD = 8,
  parameter int unsigned                RL_DEC    = 4
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  input  det_t               det_i,
  input  logic [N_RULES-1:0] sec_en_set_i,
  input  logic [N_RULES-1:0] sec_en_clr_i,
  input  xfer_t              xfer_i,
  input  logic               done_i,
  input  logic [8:0]         beats_i,
  output logic               allow_o,
  output logic [N_RULES-1:0] match_o,
  output logic               below_limit_o
);

  for (genvar r = 0; r < N_RULES; r++) begin : g_rule
    logic unused_en;
    pu_rule #(.RULE(RULES[r])) u_rule (
      .clk_i       (clk_i),
      .rst_ni      (rst_ni),
      .det_i       (det_i),
      .sec_en_set_i(sec_en_set_i[r]),
      .sec_en_clr_i(sec_en_clr_i[r]),
      .xfer_i      (xfer_i),
      .match_o     (match_o[r]),
      .enabled_o   (unused_en)
    );
  end

  if (RL_ENABLE) begin : g_rl
    rate_limiter #(
      .LIMIT (RL_LIMIT),
      .PERIOD(RL_PERIOD),
      .DEC   (RL_DEC)
    ) u_rl (
      .clk_i        (clk_i),
      .rst_ni       (rst_ni),
      .count_i      (done_i & allow_o),
      .amount_i     (beats_i),
      .below_limit_o(below_limit_o)
    );
  end else begin : g_no_rl
    assign below_limit_o = 1'b1;
  end

  assign allow_o = (|match_o) & below_limit_o;

endmodule
