// apb_monitor: passive monitor of an APB configuration bus.
//
// It watches the slave (configuration) port of the protected IP without
// driving it. Each completed APB transfer (psel, penable and pready high in
// the same cycle) is turned into one protocol-independent trace record:
// address, data (pwdata for writes, prdata for reads), direction and length.
// An APB transfer carries one data word, so the length is DATA_W/8 bytes.
// Timing: the record is registered and trace_o.valid is high for exactly one
// cycle, the cycle after the APB handshake. This register is the first of the
// three pipeline stages between a control-register write and the rule update.
// Extracting address, data and direction follows the DD-MPU description; the
// register stage and the APB completion rule are this design's choices.
module apb_monitor
  import ddmpu_pkg::*;
(
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              apb_psel_i,
  input  logic              apb_penable_i,
  input  logic              apb_pwrite_i,
  input  logic [ADDR_W-1:0] apb_paddr_i,
  input  logic [DATA_W-1:0] apb_pwdata_i,
  input  logic [DATA_W-1:0] apb_prdata_i,
  input  logic              apb_pready_i,
  output trace_t            trace_o
);

  logic done;
  assign done = apb_psel_i & apb_penable_i & apb_pready_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      trace_o <= '0;
    end else begin
      trace_o.valid <= done;
      if (done) begin
        trace_o.write <= apb_pwrite_i;
        trace_o.addr  <= apb_paddr_i;
        trace_o.data  <= apb_pwrite_i ? apb_pwdata_i : apb_prdata_i;
        trace_o.len   <= LEN_W'(DATA_W / 8);
      end
    end
  end

endmodule
