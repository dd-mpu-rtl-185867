// detection_module: distributes monitored transfers to triggers and delivers
// their results to protection units.
//
// Every trace record from the bus monitor is offered to N_PU trigger modules
// (one per protection unit), each matching its own control-register
// addresses. A trigger that fires pushes its Address/Length/Enable value into
// a FIFO channel; the protection unit drains the channel one value per cycle
// (it always accepts). det_o[i] carries DET_INVALID when channel i is empty.
// Timing: APB handshake in cycle t, trace record in t+1 (monitor register),
// value at det_o in t+2 (FIFO register), rule register updated at the end of
// t+2, so the new value is active in the rule in cycle t+3.
// One trigger per protection unit and FIFO channels follow the DD-MPU
// description (two PUs matching 0xB0 and 0xC0 by default); the length and
// enable register addresses are this design's choice.
module detection_module
  import ddmpu_pkg::*;
#(
  parameter int unsigned                   N_PU      = 2,
  parameter logic [N_PU-1:0][ADDR_W-1:0]   ADDR_REGS = {32'hC0, 32'hB0},
  parameter logic [N_PU-1:0][ADDR_W-1:0]   LEN_REGS  = {32'hC4, 32'hB4},
  parameter logic [N_PU-1:0][ADDR_W-1:0]   EN_REGS   = {32'hC8, 32'hB8},
  parameter logic [N_PU-1:0]               USE_ADDR  = '1,
  parameter logic [N_PU-1:0]               USE_LEN   = '1,
  parameter logic [N_PU-1:0]               USE_EN    = '0,
  parameter int unsigned                   FIFO_DEPTH = 2
) (
  input  logic   clk_i,
  input  logic   rst_ni,
  input  trace_t trace_i,
  output det_t   det_o      [N_PU],
  output logic   overflow_o [N_PU]
);

  for (genvar i = 0; i < N_PU; i++) begin : g_ch
    det_t trig;
    logic valid;
    det_t head;

    reg_trigger #(
      .ADDR_REG(ADDR_REGS[i]),
      .LEN_REG (LEN_REGS[i]),
      .EN_REG  (EN_REGS[i]),
      .USE_ADDR(USE_ADDR[i]),
      .USE_LEN (USE_LEN[i]),
      .USE_EN  (USE_EN[i])
    ) u_trigger (
      .trace_i(trace_i),
      .det_o  (trig)
    );

    channel_fifo #(
      .WIDTH(DET_W),
      .DEPTH(FIFO_DEPTH)
    ) u_channel (
      .clk_i     (clk_i),
      .rst_ni    (rst_ni),
      .push_i    (trig.kind != DET_INVALID),
      .data_i    (trig),
      .pop_i     (1'b1),
      .valid_o   (valid),
      .data_o    (head),
      .full_o    (),
      .overflow_o(overflow_o[i])
    );

    always_comb begin
      det_o[i] = head;
      if (!valid) det_o[i].kind = DET_INVALID;
    end
  end

endmodule
